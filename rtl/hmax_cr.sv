// hmax_cr: configurable routing fabric (CR) of the RCengine.
//
// The image memory delivers, every cycle, one pixel bank (all orientations of
// one image column) from each of 16 consecutive rows i..i+15. The CR is a bank
// of multiplexers that hands each of the 16 4x4 primitives the four rows it
// needs. Primitive k sits at block row R = k / 4 of the 4x4 grid of
// primitives. In a mode that composes an S x S block of primitives
// (S = 1, 2, 3, 4 for 4x4, 8x8, 12x12, 16x16 convolutions), primitive k gets
// rows i + 4*(R mod S) .. i + 4*(R mod S) + 3. So in the 4x4 mode every
// primitive gets rows i..i+3 (broadcast), and in the 8x8 mode P1, P2 get rows
// i..i+3 while P5, P6 get rows i+4..i+7, as the document describes. In the
// 12x12 mode the fourth block row is unused and is given rows i..i+3.
// Block row 0 gets rows i..i+3 in every mode, so its outputs are plain
// wires from the inputs; they are kept for a uniform interface.
// Purely combinational.
module hmax_cr
  import hmax_pkg::*;
#(
  parameter int N_THETA = 4
) (
  input  rc_mode_e                          mode,
  input  pix_t [15:0][N_THETA-1:0]          rows_in,    // rows_in[m]: image row i+m
  output pix_t [15:0][3:0][N_THETA-1:0]     prim_rows   // prim_rows[k][r]: row r of primitive k
);

  always_comb begin
    for (int k = 0; k < 16; k++) begin
      int unsigned blk_row, off;
      blk_row = unsigned'(k) / 4;
      case (mode)
        MODE_4X4:   off = 0;
        MODE_8X8:   off = 4 * (blk_row % 2);
        MODE_12X12: off = (blk_row < 3) ? 4 * blk_row : 0;
        default:    off = 4 * blk_row;
      endcase
      for (int r = 0; r < 4; r++)
        prim_rows[k][r] = rows_in[off + unsigned'(r)];
    end
  end

endmodule
