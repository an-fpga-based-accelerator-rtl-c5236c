// hmax_pe: processing element of the HMAX convolution primitive.
//
// A PE holds one patch coefficient (the "Pc" register) and receives a bank of
// N_THETA pixels, one per orientation, of the same image position. Per cycle it
// forms one term and adds it to the partial sum arriving from the PE above:
//   OP_GABOR : term = X1 * Pc                    (S1 / Gabor filtering)
//   OP_SPARSE: term = (X[Pc.theta] - Pc)^2       (orientation mux driven by the
//                                                  coefficient's preferred orientation)
//   OP_DENSE : term = (X[dense_theta] - Pc)^2    (one orientation for the engine)
// The n:1 orientation mux, the subtractor and the two 2:1 muxes that choose the
// multiplier operands follow the PE figure; the multiplier and the accumulating
// adder form the DSP part. A coefficient with en = 0 (zero padding of patches
// whose size is not a multiple of 4) contributes nothing; this enable bit is
// this design's addition so that padding is also exact for the distance modes.
// Setting USE_MUX = 0 removes the orientation mux at compile time (dense-only
// builds); the PE then always uses X1.
//
// Timing: pixel bank in -> pixel bank out: 1 cycle (systolic shift to the right).
// Pixel in -> term registered: 2 cycles (operand register, product register,
// modelled on the DSP48E1 A/B and M registers). Partial sum in -> out: 1 cycle.
// The multiplier is full precision; the 18-bit operand truncation used to fit
// one DSP slice is not modelled.
module hmax_pe
  import hmax_pkg::*;
#(
  parameter int N_THETA = 4,
  parameter bit USE_MUX = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  pe_op_e                    op,
  input  logic [THETA_W-1:0]        dense_theta,
  input  logic                      coef_we,
  input  coef_t                     coef_in,
  input  pix_t  [N_THETA-1:0]       pix_in,
  output pix_t  [N_THETA-1:0]       pix_out,
  input  acc_t                      psum_in,
  output acc_t                      psum_out
);

  localparam int DIFF_W = PIX_W + 1;

  coef_t pc_q;                       // patch coefficient register
  logic signed [DIFF_W-1:0]   a_q, b_q;
  logic                       en_q;
  logic signed [2*DIFF_W-1:0] m_q;

  logic [THETA_W-1:0]       sel;
  pix_t                     x;
  logic signed [PIX_W-1:0]  xs, cs;
  logic signed [DIFF_W-1:0] diff, a_d, b_d;

  always_comb begin
    sel = (op == OP_DENSE) ? dense_theta : pc_q.theta;
    x   = pix_in[0];
    if (USE_MUX && op != OP_GABOR) begin
      for (int k = 0; k < N_THETA; k++)
        if (sel == THETA_W'(k)) x = pix_in[k];
    end
    xs   = x;
    cs   = pc_q.value;
    diff = DIFF_W'(xs) - DIFF_W'(cs);
    if (op == OP_GABOR) begin
      a_d = DIFF_W'(xs);
      b_d = DIFF_W'(cs);
    end else begin
      a_d = diff;
      b_d = diff;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q     <= '0;
      pix_out  <= '0;
      a_q      <= '0;
      b_q      <= '0;
      en_q     <= 1'b0;
      m_q      <= '0;
      psum_out <= '0;
    end else begin
      if (coef_we) pc_q <= coef_in;
      pix_out  <= pix_in;
      a_q      <= a_d;
      b_q      <= b_d;
      en_q     <= pc_q.en;
      if (en_q) m_q <= a_q * b_q;
      else      m_q <= '0;
      psum_out <= psum_in + {{(ACC_W-2*DIFF_W){m_q[2*DIFF_W-1]}}, m_q};
    end
  end

endmodule
