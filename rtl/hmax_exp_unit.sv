// hmax_exp_unit: radial-basis exponential applied after C2.
//
// HMAX's S2 response is the Gaussian radial basis function
//   R = exp(-||X - P||^2 / (2 * sigma^2 * alpha)),  alpha = (M / 4)^2, sigma = 1,
// for a patch of edge M. Because exp is monotonic, the accelerator takes the
// minimum of the squared distance in C2 and applies the exponential only to
// the C2 result; this unit does that last step for one value.
//
// Fixed-point formats (this design's choice): pixels carry FRAC fractional
// bits, so the distance `sqdist` carries 2*FRAC; the result is Q1.16
// (65536 = 1.0). Method: with t = log2(e) * sqdist / (2 * alpha), the result is
// 2^-t. A 16-entry table gives log2(e) * 8 / M^2 scaled by 2^24 for M = 1..16
// (2 * alpha = M^2 / 8); t is formed in Q.16, its fraction indexes a 64-entry
// table of 2^-(k/64), and its integer part becomes a right shift. Both tables
// are computed at elaboration from the formulas above. Error is below 1.1 %
// of the result from the 6-bit fraction table.
//
// Timing: in_valid/sqdist/psize captured on one edge, out_valid/result two
// edges later; one value per cycle.
module hmax_exp_unit
  import hmax_pkg::*;
#(
  parameter int FRAC = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  acc_t         sqdist,      // squared distance, >= 0
  input  logic [4:0]   psize,     // patch edge M, 1 .. 16
  output logic         out_valid,
  output logic [16:0]  result     // exp(-sqdist / (2 alpha)) in Q1.16
);

  localparam real LOG2E = 1.4426950408889634;

  typedef logic [31:0] recip_tab_t [17];
  typedef logic [16:0] pow_tab_t   [64];

  function automatic recip_tab_t make_recip();
    recip_tab_t t;
    t[0] = '0;
    for (int m = 1; m <= 16; m++)
      t[m] = 32'($rtoi(LOG2E * 8.0 / real'(m * m) * 16777216.0 + 0.5));
    return t;
  endfunction

  function automatic pow_tab_t make_pow();
    pow_tab_t t;
    for (int k = 0; k < 64; k++)
      t[k] = 17'($rtoi(65536.0 * (2.0 ** (-real'(k) / 64.0)) + 0.5));
    return t;
  endfunction

  localparam recip_tab_t RECIP = make_recip();
  localparam pow_tab_t   POW2  = make_pow();

  // t in Q.16 = sqdist * RECIP / 2^(24 + 2*FRAC - 16)
  localparam int SHIFT = 24 + 2 * FRAC - 16;

  logic [ACC_W+31:0] prod;
  logic [ACC_W+31:0] t_q;
  logic              v_q;

  always_comb prod = (ACC_W+32)'(sqdist) * (ACC_W+32)'(RECIP[psize > 5'd16 ? 5'd16 : psize]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q       <= '0;
      v_q       <= 1'b0;
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      v_q       <= in_valid;
      t_q       <= prod >> SHIFT;
      out_valid <= v_q;
      if (t_q[ACC_W+31:16] > 17) result <= '0;
      else                       result <= POW2[t_q[15:10]] >> t_q[20:16];
    end
  end

endmodule
