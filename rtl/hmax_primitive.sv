// hmax_primitive: 4x4 two-dimensional systolic convolution primitive.
//
// Sixteen PEs in four rows and four columns. Each row r receives the pixel
// stream of image row i+r (one column per cycle, all four rows in the same
// cycle); inside the primitive row r is delayed by r cycles, the pixels then
// shift one PE to the right per cycle, and partial sums flow down each column
// of PEs (the cascade chain) so that every column's bottom PE sees, in one
// cycle, the four rows of one image column. A final adder sums the four
// column results into one 4x4 window result per cycle.
//
// Coefficients are written all at once (coef_we, coef_in[r*4+c] = patch
// element at row r, column c). Column c of PEs holds patch column 3-c, which
// aligns the four column sums on the same window without extra delays.
//
// Timing: the result of the window whose last column is x appears on out
// PRIM_LAT (6) clock edges after the edge that captures column x at rows_in.
// One result per cycle.
// Row delays, right shift and downward cascade follow the primitive figure;
// the column reversal and the exact register placement are this design's.
module hmax_primitive
  import hmax_pkg::*;
#(
  parameter int N_THETA = 4,
  parameter bit USE_MUX = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  pe_op_e                        op,
  input  logic [THETA_W-1:0]            dense_theta,
  input  logic                          coef_we,
  input  coef_t [15:0]                  coef_in,
  input  pix_t  [3:0][N_THETA-1:0]      rows_in,   // rows_in[r]: pixel bank of image row i+r
  output acc_t                          out
);

  // Row skew: row r passes through r registers.
  pix_t [3:0][N_THETA-1:0] skew_q [3];   // skew_q[k][r]: row r after k+1 registers
  pix_t [3:0][N_THETA-1:0] row_dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) skew_q[k] <= '0;
    end else begin
      skew_q[0] <= rows_in;
      skew_q[1] <= skew_q[0];
      skew_q[2] <= skew_q[1];
    end
  end

  always_comb begin
    row_dly[0] = rows_in[0];
    row_dly[1] = skew_q[0][1];
    row_dly[2] = skew_q[1][2];
    row_dly[3] = skew_q[2][3];
  end

  pix_t [N_THETA-1:0] pix_w  [4][5];   // [row][col]: bank entering PE col (col 4: leaving)
  acc_t               psum_w [5][4];   // [row][col]: partial sum entering PE row (row 4: bottom)

  for (genvar r = 0; r < 4; r++) begin : g_row
    assign pix_w[r][0] = row_dly[r];
    for (genvar c = 0; c < 4; c++) begin : g_col
      hmax_pe #(.N_THETA(N_THETA), .USE_MUX(USE_MUX)) u_pe (
        .clk, .rst_n, .op, .dense_theta, .coef_we,
        .coef_in  (coef_in[r*4 + (3-c)]),
        .pix_in   (pix_w[r][c]),
        .pix_out  (pix_w[r][c+1]),
        .psum_in  (psum_w[r][c]),
        .psum_out (psum_w[r+1][c])
      );
    end
  end

  for (genvar c = 0; c < 4; c++) begin : g_top
    assign psum_w[0][c] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= psum_w[4][0] + psum_w[4][1] + psum_w[4][2] + psum_w[4][3];
  end

endmodule
