// tb_hmax_cr: self-checking test of the routing fabric. For random row
// inputs in each mode, checks which image row every primitive row receives
// against a table of first rows written out per mode.
module tb_hmax_cr;
  import hmax_pkg::*;
  localparam int N = 2;

  rc_mode_e mode;
  pix_t [15:0][N-1:0] rows_in;
  pix_t [15:0][3:0][N-1:0] prim_rows;
  int checks = 0, failures = 0;

  hmax_cr #(.N_THETA(N)) dut (.*);

  // first image row of each primitive (P1..P16 left to right, top to bottom)
  int first_row [4][16] = '{
    '{0,0,0,0, 0,0,0,0, 0,0,0,0, 0,0,0,0},
    '{0,0,0,0, 4,4,4,4, 0,0,0,0, 4,4,4,4},
    '{0,0,0,0, 4,4,4,4, 8,8,8,8, 0,0,0,0},
    '{0,0,0,0, 4,4,4,4, 8,8,8,8, 12,12,12,12}
  };

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 40; it++) begin
      mode = rc_mode_e'(it % 4);
      for (int m = 0; m < 16; m++)
        for (int t = 0; t < N; t++) begin
          logic [31:0] rv;
          rv = $urandom;
          rows_in[m][t] = rv[PIX_W-1:0];
        end
      #1;
      for (int k = 0; k < 16; k++)
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (prim_rows[k][r] !== rows_in[first_row[int'(mode)][k] + r]) begin
            failures++;
            if (failures < 10) $display("mode %0d prim %0d row %0d wrong", mode, k, r);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
