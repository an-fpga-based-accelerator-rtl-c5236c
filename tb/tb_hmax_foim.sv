// tb_hmax_foim: self-checking test of the image memory and its address
// generator. Fills a random image through the write port, runs scans for
// several image sizes, patch sizes and modes, and checks every output cycle
// (16 rows of one column, zero outside the image), the window and last flags,
// and that a scan delivers one column per cycle without gaps.
module tb_hmax_foim;
  import hmax_pkg::*;
  localparam int N = 3;
  localparam int MW = 40, MH = 40;

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [COORD_W-1:0] wr_row, wr_col;
  pix_t [N-1:0] wr_data;
  logic start;
  logic [COORD_W:0] img_w, img_h;
  logic [4:0] psize;
  rc_mode_e mode;
  logic busy, out_valid, out_win, out_last;
  pix_t [15:0][N-1:0] rows_out;

  int checks = 0, failures = 0;

  hmax_foim #(.N_THETA(N), .MAX_W(MW), .MAX_H(MH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t img [MH][MW][N];
  int ei, ex, ncol, nrow, seen, k;
  logic ok;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s (row %0d col %0d)", msg, ei, ex);
    end
  endtask

  initial begin
    wr_en = 0; wr_row = 0; wr_col = 0; wr_data = '0; start = 0;
    img_w = 0; img_h = 0; psize = 4; mode = MODE_4X4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < MH; y++)
      for (int x = 0; x < MW; x++) begin
        for (int t = 0; t < N; t++) begin
          logic [31:0] rv;
          rv = $urandom;
          img[y][x][t] = rv[PIX_W-1:0];
          wr_data[t] = rv[PIX_W-1:0];
        end
        wr_en = 1; wr_row = COORD_W'(y); wr_col = COORD_W'(x);
        @(negedge clk);
      end
    wr_en = 0;
    for (int sc = 0; sc < 10; sc++) begin
      mode  = rc_mode_e'(sc % 4);
      k     = int'(mode_size(mode));
      psize = 5'(k - (sc / 4) % 3);
      img_w = (COORD_W+1)'($urandom_range(k, MW));
      img_h = (COORD_W+1)'($urandom_range(k, MH));
      if (sc == 9) img_h = (COORD_W+1)'(psize) - 1;   // no windows at all
      ncol  = int'(img_w) + k - int'(psize);
      nrow  = int'(img_h) - int'(psize) + 1;
      if (nrow < 0) nrow = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      seen = 0;
      ei = 0; ex = 0;
      while (seen < nrow * ncol) begin
        @(negedge clk);
        check(out_valid, "gap in the column stream");
        if (!out_valid) break;
        for (int m = 0; m < 16; m++) begin
          ok = 1;
          for (int t = 0; t < N; t++) begin
            if (ei + m < int'(img_h) && ex < int'(img_w)) ok &= (rows_out[m][t] == img[ei+m][ex][t]);
            else ok &= (rows_out[m][t] == '0);
          end
          check(ok, "pixel");
        end
        check(out_win == (ex >= k - 1), "window flag");
        check(out_last == (seen == nrow * ncol - 1), "last flag");
        seen++;
        ex++;
        if (ex == ncol) begin ex = 0; ei++; end
      end
      @(negedge clk);
      check(!out_valid && !busy, "scan ends on time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
