// tb_hmax_s2engine: self-checking test of one S2 pipeline (FOCM + RCengine).
// Writes the patches of two iterations (sixteen sparse 4x4 patches, one dense
// 16x16 patch) into the FOCM, then for each iteration triggers the
// coefficient load, checks it completes in 16 cycles, streams a 16-row strip
// and checks every lane result against a direct computation.
module tb_hmax_s2engine;
  import hmax_pkg::*;
  localparam int N = 4, W = 30, IT = 4;

  logic clk = 0, rst_n = 0;
  logic coef_wr_en; logic [1:0] coef_wr_iter, load_iter; logic [3:0] coef_wr_prim, coef_wr_elem;
  coef_t coef_wr_data;
  logic load_start, load_done;
  pe_op_e op; rc_mode_e mode; logic [THETA_W-1:0] dense_theta;
  logic in_valid, out_valid; logic [1:0] in_tag, out_tag;
  pix_t [15:0][N-1:0] rows_in;
  acc_t [15:0] lanes;

  int checks = 0, failures = 0;

  hmax_s2engine #(.N_THETA(N), .ITERS(IT), .TAG_W(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  coef_t pk [2][16][16][16];
  int img [16][W][N];
  int col_of_out, gs, ksz, l, R, C, t0;

  function automatic longint sx(pix_t v);
    logic signed [PIX_W-1:0] s;
    s = v;
    return longint'(s);
  endfunction

  function automatic longint distance(int it, int ln, int j);
    longint s, d;
    int t;
    s = 0;
    for (int u = 0; u < ksz; u++)
      for (int v = 0; v < ksz; v++) begin
        t = (op == OP_DENSE) ? int'(dense_theta) : int'(pk[it][ln][u][v].theta);
        d = longint'(img[u][j+v][t]) - sx(pk[it][ln][u][v].value);
        s += d * d;
      end
    return s;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    int j;
    j = col_of_out - (ksz - 1);
    col_of_out++;
    if (out_tag[1]) for (int ln = 0; ln < int'(mode_lanes(mode)); ln++) begin
      checks++;
      if (longint'(lanes[ln]) != distance(int'(load_iter), ln, j)) begin
        failures++;
        if (failures < 10) $display("iteration %0d lane %0d window %0d wrong", load_iter, ln, j);
      end
    end
  end

  initial begin
    coef_wr_en = 0; coef_wr_iter = 0; coef_wr_prim = 0; coef_wr_elem = 0; coef_wr_data = '0;
    load_start = 0; load_iter = 0; op = OP_SPARSE; mode = MODE_4X4; dense_theta = 2;
    in_valid = 0; in_tag = 0; rows_in = '0;
    for (int u = 0; u < 16; u++)
      for (int x = 0; x < W; x++)
        for (int t = 0; t < N; t++) img[u][x][t] = $urandom_range(0, 1000);
    for (int it = 0; it < 2; it++)
      for (int ln = 0; ln < 16; ln++)
        for (int u = 0; u < 16; u++)
          for (int v = 0; v < 16; v++) begin
            pk[it][ln][u][v].en = 1;
            pk[it][ln][u][v].theta = THETA_W'($urandom_range(0, N-1));
            pk[it][ln][u][v].value = PIX_W'($urandom_range(0, 1000));
          end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 2; it++) begin
      gs = (it == 0) ? 1 : 4;
      for (int k = 0; k < 16; k++) begin
        R = k / 4; C = k % 4;
        l = (gs == 1) ? k : 0;
        for (int e = 0; e < 16; e++) begin
          coef_wr_en = 1; coef_wr_iter = 2'(it); coef_wr_prim = 4'(k); coef_wr_elem = 4'(e);
          coef_wr_data = pk[it][l][4*(R%gs) + e/4][4*(C%gs) + e%4];
          @(negedge clk);
        end
      end
    end
    coef_wr_en = 0;
    for (int it = 0; it < 2; it++) begin
      mode = (it == 0) ? MODE_4X4 : MODE_16X16;
      op   = (it == 0) ? OP_SPARSE : OP_DENSE;
      ksz  = int'(mode_size(mode));
      load_iter = 2'(it);
      load_start = 1;
      @(negedge clk);
      load_start = 0;
      t0 = 0;
      while (!load_done) begin @(negedge clk); t0++; end
      checks++;
      if (t0 != 16) begin failures++; $display("load took %0d cycles", t0); end
      @(negedge clk);
      col_of_out = 0;
      for (int x = 0; x < W; x++) begin
        for (int u = 0; u < 16; u++)
          for (int t = 0; t < N; t++) rows_in[u][t] = PIX_W'(img[u][x][t]);
        in_valid = 1;
        in_tag = {x >= ksz - 1, x == W - 1};
        @(negedge clk);
      end
      in_valid = 0;
      repeat (RC_LAT + 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
