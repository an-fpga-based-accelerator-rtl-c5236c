// tb_hmax_c2: self-checking test of the C2 global-minimum unit. Runs several
// "levels" of iterations with random S2 streams and lane masks, mirrors the
// expected minima in a reference table and reads back every C2 value.
module tb_hmax_c2;
  import hmax_pkg::*;
  localparam int R = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid, commit, first;
  logic [15:0] lane_mask;
  acc_t [15:0] lanes;
  logic [2:0] commit_row, rd_row;
  logic [3:0] rd_lane;
  acc_t rd_data;

  int checks = 0, failures = 0;

  hmax_c2 #(.ROWS(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ref_c2 [R][16];
  longint run [16];
  logic [15:0] mask_of_row [R];

  initial begin
    in_valid = 0; commit = 0; first = 0; lane_mask = '0; lanes = '0;
    commit_row = 0; rd_row = 0; rd_lane = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++) mask_of_row[r] = 16'($urandom) | 16'h1;
    for (int lvl = 0; lvl < 3; lvl++) begin
      for (int r = 0; r < R; r++) begin
        for (int l = 0; l < 16; l++) run[l] = 64'h7fff_ffff_ffff_ffff;
        lane_mask = mask_of_row[r];
        for (int n = 0; n < 30; n++) begin
          in_valid = ($urandom_range(0, 3) != 0);
          for (int l = 0; l < 16; l++) begin
            lanes[l] = ACC_W'($urandom_range(0, 100000));
            if (in_valid && lane_mask[l] && longint'(lanes[l]) < run[l]) run[l] = longint'(lanes[l]);
          end
          @(negedge clk);
        end
        in_valid = 0;
        @(negedge clk);
        commit = 1; commit_row = 3'(r); first = (lvl == 0);
        for (int l = 0; l < 16; l++)
          if (lane_mask[l]) begin
            if (lvl == 0 || run[l] < ref_c2[r][l]) ref_c2[r][l] = run[l];
          end
        @(negedge clk);
        commit = 0;
      end
    end
    for (int r = 0; r < R; r++)
      for (int l = 0; l < 16; l++) begin
        if (!mask_of_row[r][l]) continue;
        rd_row = 3'(r); rd_lane = 4'(l);
        @(negedge clk);
        checks++;
        if (longint'(rd_data) != ref_c2[r][l]) begin
          failures++;
          if (failures < 10) $display("row %0d lane %0d got %0d exp %0d", r, l, rd_data, ref_c2[r][l]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
