// hmax_rcengine: reconfigurable convolution engine (RCengine).
//
// Sixteen 4x4 systolic primitives P1..P16 in a 4x4 grid (k = 0..15 in this
// code, block row k/4, block column k%4), fed through the configurable
// routing fabric (hmax_cr), followed by programmable delay elements and the
// adder tree (hmax_adder_tree). At run time it works as sixteen independent
// 4x4 convolutions, four 8x8, one 12x12 or one 16x16 convolution; patches of
// other sizes up to 16 run in the next larger mode with zero-padded
// (disabled) coefficients.
//
// Column alignment: a primitive at block column C of a composed block of
// S x S primitives covers patch columns 4*(C mod S) .. +3, so its result for a
// window is ready 4*(S-1-(C mod S)) cycles earlier than the rightmost
// primitive's. Its delay element holds it back by exactly that amount
// (12x12 mode: primitives of the fourth block column get no delay; they are
// unused). Rows need no delay because the CR presents all rows of a window in
// the same cycle.
//
// Coefficients: coef_we writes the 16 coefficients coef_data[r*4+c] of
// primitive coef_prim in one cycle; a full reload takes 16 cycles.
// Coefficient layout for a patch K (edge S*4 after padding) in lane l: the
// primitive at block (R, C) of the lane's block holds K[4*(R mod S) + r]
// [4*(C mod S) + c] at index r*4+c.
//
// Stream: one column of rows i..i+15 per cycle (in_valid, rows_in) with a
// tag that travels alongside. The result for the window whose last column is
// the tagged column appears on lanes with out_valid/out_tag RC_LAT (7) clock
// edges after the edge that captures that column. Mode, op and dense_theta
// must be held stable while a stream is in flight.
module hmax_rcengine
  import hmax_pkg::*;
#(
  parameter int N_THETA = 4,
  parameter bit USE_MUX = 1'b1,
  parameter int TAG_W   = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  pe_op_e                        op,
  input  rc_mode_e                      mode,
  input  logic [THETA_W-1:0]            dense_theta,
  input  logic                          coef_we,
  input  logic [3:0]                    coef_prim,
  input  coef_t [15:0]                  coef_data,
  input  logic                          in_valid,
  input  logic [TAG_W-1:0]              in_tag,
  input  pix_t [15:0][N_THETA-1:0]      rows_in,
  output logic                          out_valid,
  output logic [TAG_W-1:0]              out_tag,
  output acc_t [15:0]                   lanes
);

  pix_t [15:0][3:0][N_THETA-1:0] prim_rows;
  acc_t [15:0]                   prim_out, prim_dly;

  hmax_cr #(.N_THETA(N_THETA)) u_cr (
    .mode, .rows_in, .prim_rows
  );

  for (genvar k = 0; k < 16; k++) begin : g_prim
    logic [3:0] dly;

    hmax_primitive #(.N_THETA(N_THETA), .USE_MUX(USE_MUX)) u_prim (
      .clk, .rst_n, .op, .dense_theta,
      .coef_we (coef_we && coef_prim == 4'(k)),
      .coef_in (coef_data),
      .rows_in (prim_rows[k]),
      .out     (prim_out[k])
    );

    always_comb begin
      case (mode)
        MODE_4X4:   dly = 4'd0;
        MODE_8X8:   dly = 4'(4 * (1 - (k % 4) % 2));
        MODE_12X12: dly = (k % 4 < 3) ? 4'(4 * (2 - k % 4)) : 4'd0;
        default:    dly = 4'(4 * (3 - k % 4));
      endcase
    end

    hmax_delay_line #(.W(ACC_W), .MAX_DELAY(12)) u_dly (
      .clk, .rst_n, .delay(dly), .d(prim_out[k]), .q(prim_dly[k])
    );
  end

  hmax_adder_tree u_tree (
    .clk, .rst_n, .mode, .prim_in(prim_dly), .lanes
  );

  // Tag pipeline matching the datapath latency.
  logic             v_q [RC_LAT+1];
  logic [TAG_W-1:0] t_q [RC_LAT+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= RC_LAT; s++) begin
        v_q[s] <= 1'b0;
        t_q[s] <= '0;
      end
    end else begin
      v_q[0] <= in_valid;
      t_q[0] <= in_tag;
      for (int s = 1; s <= RC_LAT; s++) begin
        v_q[s] <= v_q[s-1];
        t_q[s] <= t_q[s-1];
      end
    end
  end

  assign out_valid = v_q[RC_LAT];
  assign out_tag   = t_q[RC_LAT];

endmodule
