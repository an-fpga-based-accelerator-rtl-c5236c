// tb_hmax_pipe_adder: self-checking test of the pipeline adder tree with six
// pipelines: sparse pass-through, and dense sums for group sizes 1 to 6, with
// the enabled C2 count ceil(6 / group).
module tb_hmax_pipe_adder;
  import hmax_pkg::*;
  localparam int P = 6;

  logic clk = 0, rst_n = 0;
  logic dense, in_valid, out_valid;
  logic [3:0] group;
  logic [1:0] in_tag, out_tag;
  acc_t [P-1:0][15:0] in_lanes, out_lanes;
  logic [P-1:0] c2_en;

  int checks = 0, failures = 0;

  hmax_pipe_adder #(.N_PIPES(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  acc_t e [P][16];
  int v;

  initial begin
    dense = 0; group = 1; in_valid = 0; in_tag = 0; in_lanes = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 70; it++) begin
      dense = (it % 7 != 0);
      group = 4'(1 + it % P);
      in_valid = 1;
      in_tag = 2'(it);
      for (int p = 0; p < P; p++)
        for (int l = 0; l < 16; l++) in_lanes[p][l] = ACC_W'($urandom);
      for (int g = 0; g < P; g++)
        for (int l = 0; l < 16; l++) e[g][l] = '0;
      if (!dense) begin
        for (int p = 0; p < P; p++)
          for (int l = 0; l < 16; l++) e[p][l] = in_lanes[p][l];
        v = P;
      end else begin
        for (int p = 0; p < P; p++)
          for (int l = 0; l < 16; l++) e[p / int'(group)][l] += in_lanes[p][l];
        v = (P + int'(group) - 1) / int'(group);
      end
      @(negedge clk);
      checks++;
      if (!out_valid || out_tag != 2'(it)) failures++;
      for (int g = 0; g < P; g++) begin
        checks++;
        if (c2_en[g] != (g < v)) begin
          failures++;
          $display("c2_en[%0d] wrong for group %0d", g, group);
        end
        if (g < v)
          for (int l = 0; l < 16; l++) begin
            checks++;
            if (out_lanes[g][l] !== e[g][l]) begin
              failures++;
              if (failures < 10) $display("dense %0d group %0d out %0d lane %0d wrong", dense, group, g, l);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
