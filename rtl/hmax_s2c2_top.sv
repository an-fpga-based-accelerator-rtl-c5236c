// hmax_s2c2_top: HMAX S2/C2 accelerator, the complete on-chip system.
//
// Computes, for a C1 image pyramid streamed in by the host, the C2 feature
// vector of HMAX: for every stored patch, the minimum over all positions and
// scales of the squared distance between the patch and the C1 window (the
// Gaussian of the radial basis function is applied afterwards, on this far
// smaller result). The same datapath also runs plain 2D convolutions
// (Gabor / S1) whose results leave on the s_* stream.
//
// Structure:
//   two FOIMs (hmax_foim) form a double buffer: the host writes the next
//     scale into one while the engines read the other;
//   the active FOIM's 16-row window stream is broadcast to N_PIPES S2engines
//     (hmax_s2engine), each with its own FOCM of patches;
//   the pipeline adder tree (hmax_pipe_adder) passes sparse results through
//     or sums the per-orientation results of dense HMAX;
//   one C2 unit (hmax_c2) per pipeline keeps the minima;
//   the exponential unit turns C2 minima into feature values on readback;
//   the instruction queue (hmax_instr_queue) and sequencer (hmax_controller)
//     configure every iteration and step through scales and iterations.
// Dense HMAX: pipeline p applies orientation theta_base + p of the
// instruction; with `group` pipelines per patch the summed result goes to
// C2 unit p / group.
//
// Host interface (plain ports standing in for the PCIe/DMA link):
//   cfg_*   configuration registers (see hmax_controller)
//   iq_*    instruction queue: clear, push
//   coef_*  one coefficient of pipeline coef_pipe, iteration, primitive, element
//   pix_*   one pixel bank (all orientations) of buffer pix_buf at (row, col);
//           img_loaded/img_loaded_buf then hand the buffer to the engines;
//           img_ready shows buffers still owned by the engines
//   start / busy / done run all configured scales and iterations
//   c2_rd_* read one C2 value (pipeline, row, lane) on c2_rd_data one cycle
//           later; with c2_rd_en and the patch edge c2_rd_psize the
//           exponential unit (hmax_exp_unit, pixels with PIX_FRAC fraction
//           bits) returns the feature value on c2_feat two cycles after that
//
// Latency through the datapath: FOIM read 1 edge, RCengine RC_LAT edges,
// pipeline adder 1 edge. Per iteration: 4 cycles of instruction fetch,
// 16 (+1) of coefficient load, (H - psize + 1) x (W + K - psize) streaming
// cycles, the pipeline drain and one commit cycle.
// Lint notes: the instruction queue's fill level and full flag, the
// controller's scale index and the FOIMs' busy flags are left unconnected
// on purpose (the controller's own counters already sequence the work);
// rst_n is also sampled by an assertion in hmax_s2engine.
module hmax_s2c2_top
  import hmax_pkg::*;
#(
  parameter int N_THETA  = 4,
  parameter int N_PIPES  = 4,
  parameter int MAX_W    = 256,
  parameter int MAX_H    = 256,
  parameter int ITERS    = 1024,
  parameter bit USE_MUX  = 1'b1,
  parameter int PIX_FRAC = 8,
  localparam int IW      = $clog2(ITERS),
  localparam int PW      = (N_PIPES > 1) ? $clog2(N_PIPES) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration registers
  input  logic                          cfg_we,
  input  logic [4:0]                    cfg_addr,
  input  logic [31:0]                   cfg_wdata,
  // instruction queue
  input  logic                          iq_clear,
  input  logic                          iq_push,
  input  instr_t                        iq_push_data,
  // patch coefficients
  input  logic                          coef_we,
  input  logic [PW-1:0]                 coef_pipe,
  input  logic [IW-1:0]                 coef_iter,
  input  logic [3:0]                    coef_prim,
  input  logic [3:0]                    coef_elem,
  input  coef_t                         coef_data,
  // image
  input  logic                          pix_we,
  input  logic                          pix_buf,
  input  logic [COORD_W-1:0]            pix_row,
  input  logic [COORD_W-1:0]            pix_col,
  input  pix_t [N_THETA-1:0]            pix_data,
  input  logic                          img_loaded,
  input  logic                          img_loaded_buf,
  output logic [1:0]                    img_ready,
  // run control
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // C2 readback
  input  logic [PW-1:0]                 c2_rd_pipe,
  input  logic [IW-1:0]                 c2_rd_row,
  input  logic [3:0]                    c2_rd_lane,
  output acc_t                          c2_rd_data,
  // C2 feature value exp(-c2 / (2 (M/4)^2)) of a read, M = c2_rd_psize
  input  logic                          c2_rd_en,
  input  logic [4:0]                    c2_rd_psize,
  output logic                          c2_feat_valid,
  output logic [16:0]                   c2_feat,
  // S1/S2 result stream (after the pipeline adder tree)
  output logic                          s_valid,
  output logic                          s_win,
  output acc_t [N_PIPES-1:0][15:0]      s_lanes
);

  // ---------------- control ----------------
  instr_t            instr, iq_rd_data;
  logic              iq_rewind, iq_fetch, iq_rd_valid, iq_full;
  logic [IW:0]       iq_count;
  logic [3:0]        scale, dense_group;
  logic              active_buf;
  logic [COORD_W:0]  img_w, img_h;
  logic              focm_start, foim_start, c2_commit, c2_first;
  logic [IW-1:0]     focm_iter;
  logic              pipe_last;
  logic [N_PIPES-1:0] load_done;

  hmax_instr_queue #(.DEPTH(ITERS)) u_iq (
    .clk, .rst_n,
    .clear     (iq_clear),
    .push      (iq_push),
    .push_data (iq_push_data),
    .rewind    (iq_rewind),
    .fetch     (iq_fetch),
    .rd_data   (iq_rd_data),
    .rd_valid  (iq_rd_valid),
    .count     (iq_count),
    .full      (iq_full)
  );

  hmax_controller #(.ITERS(ITERS)) u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .start, .busy, .done, .img_loaded, .img_loaded_buf, .img_ready,
    .iq_rewind, .iq_fetch, .iq_rd_valid, .iq_rd_data,
    .instr, .scale, .active_buf, .img_w, .img_h, .dense_group,
    .focm_start, .focm_iter,
    .focm_done  (load_done[0]),
    .foim_start, .pipe_last, .c2_commit, .c2_first
  );

  // ---------------- double-buffered image memory ----------------
  logic                      f_valid [2];
  logic                      f_win   [2];
  logic                      f_last  [2];
  logic                      f_busy  [2];
  pix_t [15:0][N_THETA-1:0]  f_rows  [2];

  for (genvar b = 0; b < 2; b++) begin : g_foim
    hmax_foim #(.N_THETA(N_THETA), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_foim (
      .clk, .rst_n,
      .wr_en     (pix_we && pix_buf == 1'(b)),
      .wr_row    (pix_row),
      .wr_col    (pix_col),
      .wr_data   (pix_data),
      .start     (foim_start && active_buf == 1'(b)),
      .img_w, .img_h,
      .psize     (instr.psize),
      .mode      (instr.mode),
      .busy      (f_busy[b]),
      .out_valid (f_valid[b]),
      .out_win   (f_win[b]),
      .out_last  (f_last[b]),
      .rows_out  (f_rows[b])
    );
  end

  logic                     img_valid;
  logic [1:0]               img_tag;     // {window complete, last column}
  pix_t [15:0][N_THETA-1:0] img_rows;

  always_comb begin
    img_valid = f_valid[active_buf];
    img_tag   = {f_win[active_buf], f_last[active_buf]};
    img_rows  = f_rows[active_buf];
  end

  // ---------------- S2 engines ----------------
  logic                     e_valid [N_PIPES];
  logic [1:0]               e_tag   [N_PIPES];
  acc_t [N_PIPES-1:0][15:0] e_lanes;

  for (genvar p = 0; p < N_PIPES; p++) begin : g_pipe
    hmax_s2engine #(.N_THETA(N_THETA), .USE_MUX(USE_MUX), .ITERS(ITERS), .TAG_W(2)) u_eng (
      .clk, .rst_n,
      .coef_wr_en   (coef_we && 32'(coef_pipe) == p),
      .coef_wr_iter (coef_iter),
      .coef_wr_prim (coef_prim),
      .coef_wr_elem (coef_elem),
      .coef_wr_data (coef_data),
      .load_start   (focm_start),
      .load_iter    (focm_iter),
      .load_done    (load_done[p]),
      .op           (instr.op),
      .mode         (instr.mode),
      .dense_theta  (instr.theta_base + THETA_W'(p)),
      .in_valid     (img_valid),
      .in_tag       (img_tag),
      .rows_in      (img_rows),
      .out_valid    (e_valid[p]),
      .out_tag      (e_tag[p]),
      .lanes        (e_lanes[p])
    );
  end

  // ---------------- pipeline adder tree and C2 ----------------
  logic                     pa_valid;
  logic [1:0]               pa_tag;
  logic [N_PIPES-1:0]       c2_en;
  acc_t [N_PIPES-1:0][15:0] pa_lanes;

  hmax_pipe_adder #(.N_PIPES(N_PIPES)) u_padd (
    .clk, .rst_n,
    .dense     (instr.op == OP_DENSE),
    .group     (dense_group),
    .in_valid  (e_valid[0]),
    .in_tag    (e_tag[0]),
    .in_lanes  (e_lanes),
    .out_valid (pa_valid),
    .out_tag   (pa_tag),
    .out_lanes (pa_lanes),
    .c2_en
  );

  assign pipe_last = pa_valid && pa_tag[0];
  assign s_valid   = pa_valid;
  assign s_win     = pa_tag[1];
  assign s_lanes   = pa_lanes;

  // lanes holding valid patches in this iteration
  logic [15:0] lane_mask;
  always_comb begin
    int unsigned nv;
    nv = (32'(instr.n_valid) < mode_lanes(instr.mode)) ? 32'(instr.n_valid) : mode_lanes(instr.mode);
    for (int l = 0; l < 16; l++) lane_mask[l] = unsigned'(l) < nv;
  end

  acc_t c2_data [N_PIPES];

  for (genvar p = 0; p < N_PIPES; p++) begin : g_c2
    hmax_c2 #(.ROWS(ITERS)) u_c2 (
      .clk, .rst_n,
      .in_valid   (pa_valid && pa_tag[1] && c2_en[p] && instr.op != OP_GABOR),
      .lane_mask,
      .lanes      (pa_lanes[p]),
      .commit     (c2_commit && c2_en[p] && instr.op != OP_GABOR),
      .commit_row (IW'(instr.c2_row)),
      .first      (c2_first),
      .rd_row     (c2_rd_row),
      .rd_lane    (c2_rd_lane),
      .rd_data    (c2_data[p])
    );
  end

  logic [PW-1:0] rd_pipe_q;
  logic          rd_en_q;
  logic [4:0]    rd_psize_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pipe_q  <= '0;
      rd_en_q    <= 1'b0;
      rd_psize_q <= '0;
    end else begin
      rd_pipe_q  <= c2_rd_pipe;
      rd_en_q    <= c2_rd_en;
      rd_psize_q <= c2_rd_psize;
    end
  end

  assign c2_rd_data = c2_data[rd_pipe_q];

  hmax_exp_unit #(.FRAC(PIX_FRAC)) u_exp (
    .clk, .rst_n,
    .in_valid  (rd_en_q),
    .sqdist    (c2_rd_data),
    .psize     (rd_psize_q),
    .out_valid (c2_feat_valid),
    .result    (c2_feat)
  );

  // All engines run in lockstep on the same stream.
  assert property (@(posedge clk) disable iff (!rst_n) load_done[0] == load_done[N_PIPES-1])
    else $error("engines out of step");

endmodule
