// hmax_controller: iteration sequencer and configuration registers of the
// S2C2 accelerator.
//
// Runs the accelerator's loop nest without host intervention:
//   for every scale s of the C1 pyramid (n_scales):
//     wait until the image memory buffer of this scale (s mod 2) is loaded
//     for every iteration it < n_iter[s] (instructions it of the queue):
//       fetch the instruction                        (4 cycles)
//       load the 256 patch coefficients per engine   (16 cycles)
//       stream the image window by window            (1 column per cycle)
//       commit the iteration's minima to C2
//     release the buffer, so the host can load scale s+2 into it
// The instruction queue is rewound at every scale, so the same sequence runs
// for every level; n_iter[s] lets smaller scales run fewer iterations, and an
// instruction whose patch is larger than the scale's image is skipped.
// While scale s is processed the host may fill the other buffer (double
// buffering of the image memory).
//
// Configuration registers (cfg_we, cfg_addr, cfg_wdata):
//   0        n_scales (1 .. MAX_SCALES)
//   1        dense pipeline group size (orientations summed per C2 module)
//   16 + s   scale s: [9:0] image width, [19:10] image height,
//            [30:20] iterations to run
// img_loaded with img_loaded_buf marks a buffer as holding a new image;
// img_ready shows which buffers are loaded and not yet released.
module hmax_controller
  import hmax_pkg::*;
#(
  parameter int ITERS      = 1024,
  parameter int MAX_SCALES = 11
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg_we,
  input  logic [4:0]                  cfg_addr,
  input  logic [31:0]                 cfg_wdata,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  input  logic                        img_loaded,
  input  logic                        img_loaded_buf,
  output logic [1:0]                  img_ready,
  // instruction queue
  output logic                        iq_rewind,
  output logic                        iq_fetch,
  input  logic                        iq_rd_valid,
  input  instr_t                      iq_rd_data,
  // pipeline control
  output instr_t                      instr,
  output logic [3:0]                  scale,
  output logic                        active_buf,
  output logic [COORD_W:0]            img_w,
  output logic [COORD_W:0]            img_h,
  output logic [3:0]                  dense_group,
  output logic                        focm_start,
  output logic [$clog2(ITERS)-1:0]    focm_iter,
  input  logic                        focm_done,
  output logic                        foim_start,
  input  logic                        pipe_last,
  output logic                        c2_commit,
  output logic                        c2_first
);

  ctrl_state_e   state;
  logic [1:0]    cnt;
  logic [10:0]   it;
  logic [3:0]    n_scales;
  logic [30:0]   scale_cfg [MAX_SCALES];
  logic [10:0]   n_iter;
  logic          skip;

  always_comb begin
    img_w  = scale_cfg[scale][COORD_W:0];
    img_h  = scale_cfg[scale][10 +: COORD_W+1];
    n_iter = scale_cfg[scale][30:20];
    skip   = (COORD_W+1)'(instr.psize) > img_h || (COORD_W+1)'(instr.psize) > img_w;
  end

  assign busy       = state != S_IDLE;
  assign iq_rewind  = state == S_WAIT_IMG && img_ready[active_buf];
  assign iq_fetch   = state == S_FETCH && cnt == 2'd0;
  assign focm_start = state == S_FETCH && cnt == 2'd3 && !skip;
  assign focm_iter  = $clog2(ITERS)'(it);
  assign foim_start = state == S_LOAD && focm_done;
  assign c2_commit  = state == S_COMMIT;
  assign c2_first   = scale == 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_scales    <= 4'd1;
      dense_group <= 4'd1;
      for (int s = 0; s < MAX_SCALES; s++) scale_cfg[s] <= '0;
    end else if (cfg_we) begin
      if (cfg_addr == 5'd0) n_scales <= cfg_wdata[3:0];
      if (cfg_addr == 5'd1) dense_group <= cfg_wdata[3:0];
      if (cfg_addr[4] && 32'(cfg_addr[3:0]) < MAX_SCALES) scale_cfg[cfg_addr[3:0]] <= cfg_wdata[30:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      it         <= '0;
      scale      <= '0;
      active_buf <= 1'b0;
      img_ready  <= '0;
      instr      <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (img_loaded) img_ready[img_loaded_buf] <= 1'b1;
      case (state)
        S_IDLE: if (start) begin
          scale      <= '0;
          active_buf <= 1'b0;
          state      <= S_WAIT_IMG;
        end
        S_WAIT_IMG: if (img_ready[active_buf]) begin
          it    <= '0;
          cnt   <= '0;
          state <= (n_iter == 0) ? S_NEXT : S_FETCH;
        end
        S_FETCH: begin
          cnt <= cnt + 1;
          if (iq_rd_valid) instr <= iq_rd_data;
          if (cnt == 2'd3) state <= skip ? S_NEXT : S_LOAD;
        end
        S_LOAD:   if (focm_done) state <= S_STREAM;
        S_STREAM: if (pipe_last) state <= S_COMMIT;
        S_COMMIT: state <= S_NEXT;
        S_NEXT: begin
          cnt <= '0;
          if (it + 1 < n_iter) begin
            it    <= it + 1;
            state <= S_FETCH;
          end else begin
            img_ready[active_buf] <= 1'b0;
            if (32'(scale) + 1 < 32'(n_scales) && 32'(scale) + 1 < MAX_SCALES) begin
              scale      <= scale + 1;
              active_buf <= ~active_buf;
              state      <= S_WAIT_IMG;
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
