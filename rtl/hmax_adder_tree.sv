// hmax_adder_tree: adder tree at the output of the RCengine.
//
// Combines the (delay-aligned) results of the 16 4x4 primitives according to
// the mode. The number of primitive results summed per output is 16 in the
// 16x16 mode, 9 in the 12x12 mode, 4 in the 8x8 mode and 0 (no addition) in
// the 4x4 mode, giving 1, 1, 4 or 16 output lanes:
//   MODE_4X4  : lane k = prim k                                  (16 lanes)
//   MODE_8X8  : lane g = sum of the 2x2 block of primitives of
//               group g: {P1,P2,P5,P6}, {P3,P4,P7,P8},
//               {P9,P10,P13,P14}, {P11,P12,P15,P16}               (4 lanes)
//   MODE_12X12: lane 0 = sum of P1-P3, P5-P7, P9-P11               (1 lane)
//   MODE_16X16: lane 0 = sum of all 16                             (1 lane)
// Unused lanes are zero. One register stage: results appear one clock edge
// after the inputs are captured.
module hmax_adder_tree
  import hmax_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  rc_mode_e         mode,
  input  acc_t [15:0]      prim_in,
  output acc_t [15:0]      lanes
);

  acc_t [15:0] sum_d;
  acc_t        s;

  always_comb begin
    sum_d = '0;
    s     = '0;
    case (mode)
      MODE_4X4: sum_d = prim_in;
      MODE_8X8: begin
        for (int g = 0; g < 4; g++) begin
          int unsigned k0;
          k0 = 8 * (unsigned'(g) / 2) + 2 * (unsigned'(g) % 2);
          sum_d[g] = prim_in[k0] + prim_in[k0 + 1] + prim_in[k0 + 4] + prim_in[k0 + 5];
        end
      end
      MODE_12X12: begin
        for (int k = 0; k < 16; k++)
          if (k / 4 < 3 && k % 4 < 3) s = s + prim_in[k];
        sum_d[0] = s;
      end
      default: begin
        for (int k = 0; k < 16; k++) s = s + prim_in[k];
        sum_d[0] = s;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lanes <= '0;
    else        lanes <= sum_d;
  end

endmodule
