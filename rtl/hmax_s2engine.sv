// hmax_s2engine: one S2 pipeline ("S2engine").
//
// An RCengine together with its own dedicated FOCM. All S2engines of the
// accelerator see the same broadcast image stream from the FOIM; since the
// image is shared, each engine's FOCM holds a different set of patches (or,
// for dense HMAX, a different orientation of the same patches), partitioned
// by the host at configuration time.
//
// load_start/load_iter copies iteration load_iter's 256 coefficients from the
// FOCM into the RCengine in 16 cycles; load_done pulses with the last write.
// The image stream (in_valid, in_tag, rows_in) and result stream
// (out_valid, out_tag, lanes) are those of hmax_rcengine (RC_LAT edges).
// An assertion checks that no coefficient load overlaps the image stream;
// the assertion samples rst_n on the clock (`disable iff`), which is why a
// linter reports rst_n as used both synchronously and asynchronously. Every
// register uses the asynchronous reset; the sampled use is only in the check.
module hmax_s2engine
  import hmax_pkg::*;
#(
  parameter int N_THETA = 4,
  parameter bit USE_MUX = 1'b1,
  parameter int ITERS   = 1024,
  parameter int TAG_W   = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host coefficient write
  input  logic                          coef_wr_en,
  input  logic [$clog2(ITERS)-1:0]      coef_wr_iter,
  input  logic [3:0]                    coef_wr_prim,
  input  logic [3:0]                    coef_wr_elem,
  input  coef_t                         coef_wr_data,
  // per-iteration configuration
  input  logic                          load_start,
  input  logic [$clog2(ITERS)-1:0]      load_iter,
  output logic                          load_done,
  input  pe_op_e                        op,
  input  rc_mode_e                      mode,
  input  logic [THETA_W-1:0]            dense_theta,
  // image in, S results out
  input  logic                          in_valid,
  input  logic [TAG_W-1:0]              in_tag,
  input  pix_t [15:0][N_THETA-1:0]      rows_in,
  output logic                          out_valid,
  output logic [TAG_W-1:0]              out_tag,
  output acc_t [15:0]                   lanes
);

  logic         rc_we;
  logic [3:0]   rc_prim;
  coef_t [15:0] rc_data;
  logic         focm_busy;

  hmax_focm #(.ITERS(ITERS)) u_focm (
    .clk, .rst_n,
    .wr_en   (coef_wr_en),
    .wr_iter (coef_wr_iter),
    .wr_prim (coef_wr_prim),
    .wr_elem (coef_wr_elem),
    .wr_data (coef_wr_data),
    .start   (load_start),
    .iter    (load_iter),
    .busy    (focm_busy),
    .rc_we, .rc_prim, .rc_data,
    .done    (load_done)
  );

  hmax_rcengine #(.N_THETA(N_THETA), .USE_MUX(USE_MUX), .TAG_W(TAG_W)) u_rc (
    .clk, .rst_n, .op, .mode, .dense_theta,
    .coef_we   (rc_we),
    .coef_prim (rc_prim),
    .coef_data (rc_data),
    .in_valid, .in_tag, .rows_in,
    .out_valid, .out_tag, .lanes
  );

  // The coefficient load must not overlap a stream in flight.
  assert property (@(posedge clk) disable iff (!rst_n) focm_busy |-> !in_valid)
    else $error("coefficient load during an image stream");

endmodule
