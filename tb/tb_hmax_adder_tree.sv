// tb_hmax_adder_tree: self-checking test of the RCengine adder tree. Random
// primitive results in each mode; each lane is checked one clock edge later
// against sums over the primitive groups listed here by number.
module tb_hmax_adder_tree;
  import hmax_pkg::*;

  logic clk = 0, rst_n = 0;
  rc_mode_e mode;
  acc_t [15:0] prim_in, lanes;
  int checks = 0, failures = 0;

  hmax_adder_tree dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int grp8 [4][4] = '{'{0,1,4,5}, '{2,3,6,7}, '{8,9,12,13}, '{10,11,14,15}};
  acc_t e [16];

  initial begin
    mode = MODE_4X4; prim_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      mode = rc_mode_e'(it % 4);
      for (int k = 0; k < 16; k++) begin
        logic [63:0] rv;
        rv = {$urandom, $urandom};
        prim_in[k] = rv[ACC_W-1:0] >> 6;
      end
      for (int l = 0; l < 16; l++) e[l] = '0;
      case (mode)
        MODE_4X4:  for (int l = 0; l < 16; l++) e[l] = prim_in[l];
        MODE_8X8:  for (int g = 0; g < 4; g++)
                     for (int m = 0; m < 4; m++) e[g] = e[g] + prim_in[grp8[g][m]];
        MODE_12X12: foreach (grp8[g]) begin
                     // P1-P3, P5-P7, P9-P11
                     if (g == 0) for (int k = 0; k < 11; k++)
                       if (k != 3 && k != 7) e[0] = e[0] + prim_in[k];
                   end
        default:   for (int k = 0; k < 16; k++) e[0] = e[0] + prim_in[k];
      endcase
      @(negedge clk);
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (lanes[l] !== e[l]) begin
          failures++;
          if (failures < 10) $display("mode %0d lane %0d got %0d exp %0d", mode, l, lanes[l], e[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
