// hmax_foim: fast on-chip image memory (FOIM) with its window address generator.
//
// Holds one scale of the C1 image pyramid: up to MAX_H x MAX_W positions, each
// a bank of N_THETA orientation pixels. Rows are interleaved over 16 banks
// (row y lives in bank y mod 16 at word (y / 16) * MAX_W + x), and each bank
// word holds all orientations side by side (the "columns" of the FOIM), so 16
// consecutive rows, all orientations, are read in one cycle.
//
// Write port (host side): wr_en writes the bank of orientation pixels of
// position (wr_row, wr_col).
//
// Address generator: start launches a raster scan for a patch of edge psize
// processed in RCengine mode `mode` (composed edge K = 4, 8, 12 or 16) on an
// img_w x img_h image. For every window row i = 0 .. img_h - psize it issues
// one column per cycle, x = 0 .. img_w - 1 + (K - psize), back to back with
// no gaps between rows. Each output cycle carries rows i .. i+15 of column x
// (rows_out[m] = image row i+m); positions outside the image read as zero, so
// the padding columns complete the last windows of padded patches. out_win
// marks columns x >= K-1, whose window (starting at x-K+1) lies within the
// row; out_last marks the final column of the scan. The image size is set per
// scan, so one FOIM serves every scale of the pyramid.
//
// Timing: one column per cycle; rows_out and its flags appear one clock edge
// after the address is issued. busy is high from start until the last read
// has been issued. Row interleaving, 16 reads per cycle and raster-order
// sliding-window reads follow the document; the exact scan order and the
// zero fill are this design's choices.
module hmax_foim
  import hmax_pkg::*;
#(
  parameter int N_THETA = 4,
  parameter int MAX_W   = 256,
  parameter int MAX_H   = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host write port
  input  logic                          wr_en,
  input  logic [COORD_W-1:0]            wr_row,
  input  logic [COORD_W-1:0]            wr_col,
  input  pix_t [N_THETA-1:0]            wr_data,
  // scan control
  input  logic                          start,
  input  logic [COORD_W:0]              img_w,
  input  logic [COORD_W:0]              img_h,
  input  logic [4:0]                    psize,
  input  rc_mode_e                      mode,
  output logic                          busy,
  // window stream
  output logic                          out_valid,
  output logic                          out_win,
  output logic                          out_last,
  output pix_t [15:0][N_THETA-1:0]      rows_out
);

  localparam int ROWS_PER_BANK = (MAX_H + 15) / 16;
  localparam int DEPTH         = ROWS_PER_BANK * MAX_W;
  localparam int AW            = $clog2(DEPTH);
  localparam int WW            = N_THETA * PIX_W;

  // ---------------- scan counters ----------------
  logic [COORD_W:0] i_q, x_q;       // current window row and column
  logic [COORD_W:0] last_row, last_col;
  logic [4:0]       ksz;

  always_comb ksz = 5'(mode_size(mode));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      i_q      <= '0;
      x_q      <= '0;
      last_row <= '0;
      last_col <= '0;
    end else if (start) begin
      // an image shorter than the patch yields no windows
      busy     <= (img_h >= (COORD_W+1)'(psize)) && (psize != 0);
      i_q      <= '0;
      x_q      <= '0;
      last_row <= img_h - (COORD_W+1)'(psize);
      last_col <= img_w - 1 + (COORD_W+1)'(ksz - psize);
    end else if (busy) begin
      if (x_q == last_col) begin
        x_q <= '0;
        i_q <= i_q + 1;
        if (i_q == last_row) busy <= 1'b0;
      end else begin
        x_q <= x_q + 1;
      end
    end
  end

  // ---------------- banks ----------------
  logic [WW-1:0] rd_q [16];
  logic [15:0]   in_img_q;             // per window row m: row i+m inside the image
  logic          col_ok_q;
  logic [3:0]    rot_q;                // i mod 16 of the issued read

  for (genvar b = 0; b < 16; b++) begin : g_bank
    logic [WW-1:0]      mem [DEPTH];
    logic [3:0]         k;             // position of this bank in the window
    logic [COORD_W:0]   row;           // image row this bank supplies
    logic [AW-1:0]      rd_addr;
    logic [AW-1:0]      wr_addr;

    always_comb begin
      k       = 4'(b) - i_q[3:0];
      row     = i_q + (COORD_W+1)'(k);
      rd_addr = AW'((32'(row) / 16) * MAX_W + 32'(x_q));
      wr_addr = AW'((32'(wr_row) / 16) * MAX_W + 32'(wr_col));
    end

    always_ff @(posedge clk) begin
      if (wr_en && wr_row[3:0] == 4'(b) && 32'(wr_row) < MAX_H && 32'(wr_col) < MAX_W)
        mem[wr_addr] <= wr_data;
      if (busy && 32'(row) < MAX_H && 32'(x_q) < MAX_W)
        rd_q[b] <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_win   <= 1'b0;
      out_last  <= 1'b0;
      in_img_q  <= '0;
      col_ok_q  <= 1'b0;
      rot_q     <= '0;
    end else begin
      out_valid <= busy;
      out_win   <= busy && (x_q >= (COORD_W+1)'(ksz - 1));
      out_last  <= busy && (x_q == last_col) && (i_q == last_row);
      col_ok_q  <= x_q < img_w;
      rot_q     <= i_q[3:0];
      for (int m = 0; m < 16; m++)
        in_img_q[m] <= (i_q + (COORD_W+1)'(m)) < img_h;
    end
  end

  always_comb begin
    for (int m = 0; m < 16; m++) begin
      if (col_ok_q && in_img_q[m]) rows_out[m] = rd_q[(int'(rot_q) + m) % 16];
      else                         rows_out[m] = '0;
    end
  end

endmodule
