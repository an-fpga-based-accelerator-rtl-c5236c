// hmax_c2: C2 module, the global pooling stage.
//
// HMAX's C2 value of a patch is the best match of that patch over all
// positions and all scales of the image. With the exponential of the radial
// basis function moved after C2, the best match is the global MINIMUM of the
// S2 squared distance, which is what this module keeps.
//
// During an iteration, each of the 16 lanes (one per patch processed in the
// iteration) keeps a running minimum of the S2 results that arrive with
// in_valid and whose lane is enabled in lane_mask. At the end of the
// iteration, commit writes the 16 running minima into row commit_row of the
// C2 memory (one row per iteration's set of patches, ROWS rows): with first
// set (first pyramid level) the stored value is replaced, otherwise it is
// min(stored, running). Lanes outside lane_mask keep their stored value. The
// running minima are reset on commit.
//
// Readback: rd_row/rd_lane select one C2 value, on rd_data one clock edge later.
// Timing: in_valid data is absorbed on the edge that captures it; commit must
// come at least one cycle after the last in_valid of the iteration.
// Signed comparison is used so that the unit is also well defined on Gabor
// (S1) results; distances are never negative.
module hmax_c2
  import hmax_pkg::*;
#(
  parameter int ROWS = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [15:0]                lane_mask,
  input  acc_t [15:0]                lanes,
  input  logic                       commit,
  input  logic [$clog2(ROWS)-1:0]    commit_row,
  input  logic                       first,
  input  logic [$clog2(ROWS)-1:0]    rd_row,
  input  logic [3:0]                 rd_lane,
  output acc_t                       rd_data
);

  localparam acc_t ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};

  acc_t [15:0] run_q;
  acc_t [15:0] mem [ROWS];

  function automatic acc_t smin(acc_t a, acc_t b);
    logic signed [ACC_W-1:0] sa, sb;
    sa = a;
    sb = b;
    return (sa < sb) ? a : b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < 16; l++) run_q[l] <= ACC_MAX;
    end else if (commit) begin
      for (int l = 0; l < 16; l++) run_q[l] <= ACC_MAX;
    end else if (in_valid) begin
      for (int l = 0; l < 16; l++)
        if (lane_mask[l]) run_q[l] <= smin(run_q[l], lanes[l]);
    end
  end

  acc_t [15:0] old_row, new_row;

  always_comb begin
    old_row = mem[commit_row];
    for (int l = 0; l < 16; l++) begin
      if (!lane_mask[l]) new_row[l] = old_row[l];
      else if (first)    new_row[l] = run_q[l];
      else               new_row[l] = smin(old_row[l], run_q[l]);
    end
  end

  always_ff @(posedge clk) begin
    if (commit) mem[commit_row] <= new_row;
    rd_data <= mem[rd_row][rd_lane];
  end

endmodule
