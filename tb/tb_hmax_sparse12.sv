// tb_hmax_sparse12: the sparse 12-orientation configuration of the
// accelerator (12 orientations per C1 pixel, 2 S2 pipelines, the other
// parameters at their defaults), run through one complete operation.
// One pyramid scale of 40 x 36 positions and two sparse iterations per
// pipeline: sixteen 4x4 patches, then one 11x11 patch zero-padded to the
// 12x12 mode. Every coefficient selects one of the 12 orientations at
// random, so the PE's 12:1 orientation multiplexer is exercised. All C2
// values are checked against a reference computed here, plus the streaming
// cycle count of each iteration. The 12-orientation, 2-pipeline sizing is
// the document's sparse 12-orientation build; image and patch counts are
// kept small so the run takes seconds.
module tb_hmax_sparse12;
  import hmax_pkg::*;

  localparam int NT = 12, NP = 2, NI = 2;
  localparam int SW = 40, SH = 36;

  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [4:0] cfg_addr; logic [31:0] cfg_wdata;
  logic iq_clear, iq_push; instr_t iq_push_data;
  logic coef_we; logic [0:0] coef_pipe; logic [9:0] coef_iter; logic [3:0] coef_prim, coef_elem; coef_t coef_data;
  logic pix_we, pix_buf; logic [COORD_W-1:0] pix_row, pix_col; pix_t [NT-1:0] pix_data;
  logic img_loaded, img_loaded_buf; logic [1:0] img_ready;
  logic start, busy, done;
  logic [0:0] c2_rd_pipe; logic [9:0] c2_rd_row; logic [3:0] c2_rd_lane; acc_t c2_rd_data;
  logic c2_rd_en, c2_feat_valid; logic [4:0] c2_rd_psize; logic [16:0] c2_feat;
  logic s_valid, s_win; acc_t [NP-1:0][15:0] s_lanes;

  int checks = 0, failures = 0;

  hmax_s2c2_top #(.N_THETA(NT), .N_PIPES(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t prog [NI];
  int img [SH][SW][NT];
  coef_t pk [NP][NI][16][16][16];
  longint ref_c2 [NP][NI][16];

  // sparse: pipeline p's patch over each coefficient's own orientation;
  // dense: sum over the pipelines, pipeline q applying orientation q
  function automatic longint distance(int p, int it, int l, int i, int j);
    longint sum, d;
    int q0, q1, t;
    sum = 0;
    q0 = (prog[it].op == OP_DENSE) ? 0 : p;
    q1 = (prog[it].op == OP_DENSE) ? NP - 1 : p;
    for (int q = q0; q <= q1; q++)
      for (int u = 0; u < int'(prog[it].psize); u++)
        for (int v = 0; v < int'(prog[it].psize); v++) begin
          t = (prog[it].op == OP_DENSE) ? q : int'(pk[q][it][l][u][v].theta);
          d = longint'(img[i+u][j+v][t]) - longint'(pk[q][it][l][u][v].value);
          sum += d * d;
        end
    return sum;
  endfunction

  int n_cols = 0, exp_cols, n_iters = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.img_valid) n_cols++;
    if (dut.pipe_last) begin
      int k;
      k = int'(mode_size(dut.instr.mode));
      exp_cols = (SH - int'(dut.instr.psize) + 1) * (SW + k - int'(dut.instr.psize));
      checks++;
      if (n_cols != exp_cols) begin failures++; $display("%0d columns, expected %0d", n_cols, exp_cols); end
      n_cols = 0;
      n_iters++;
    end
  end

  int R, C, gs, l, nl;

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; iq_clear = 0; iq_push = 0; iq_push_data = '0;
    coef_we = 0; coef_pipe = 0; coef_iter = 0; coef_prim = 0; coef_elem = 0; coef_data = '0;
    pix_we = 0; pix_buf = 0; pix_row = 0; pix_col = 0; pix_data = '0;
    img_loaded = 0; img_loaded_buf = 0; start = 0;
    c2_rd_pipe = 0; c2_rd_row = 0; c2_rd_lane = 0; c2_rd_en = 0; c2_rd_psize = 0;

    prog[0] = '{op: OP_SPARSE, mode: MODE_4X4,   n_valid: 5'd16, psize: 5'd4,  theta_base: '0, c2_row: 10'd0};
    prog[1] = '{op: OP_SPARSE, mode: MODE_12X12, n_valid: 5'd1,  psize: 5'd11, theta_base: '0, c2_row: 10'd1};
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++)
        for (int t = 0; t < NT; t++) img[y][x][t] = $urandom_range(0, 255);
    for (int p = 0; p < NP; p++)
      for (int it = 0; it < NI; it++)
        for (int ln = 0; ln < 16; ln++)
          for (int u = 0; u < 16; u++)
            for (int v = 0; v < 16; v++) begin
              pk[p][it][ln][u][v].en    = (u < int'(prog[it].psize) && v < int'(prog[it].psize));
              pk[p][it][ln][u][v].theta = THETA_W'($urandom_range(0, NT-1));
              pk[p][it][ln][u][v].value = PIX_W'($urandom_range(0, 255));
            end

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_we = 1; cfg_addr = 0; cfg_wdata = 1; @(negedge clk);
    cfg_addr = 1; cfg_wdata = NP; @(negedge clk);
    cfg_addr = 16; cfg_wdata = (NI << 20) | (SH << 10) | SW; @(negedge clk);
    cfg_we = 0;
    for (int it = 0; it < NI; it++) begin
      iq_push = 1; iq_push_data = prog[it];
      @(negedge clk);
    end
    iq_push = 0;
    for (int p = 0; p < NP; p++)
      for (int it = 0; it < NI; it++) begin
        gs = int'(prog[it].mode) + 1;
        for (int k = 0; k < 16; k++) begin
          R = k / 4; C = k % 4;
          for (int e = 0; e < 16; e++) begin
            coef_we = 1; coef_pipe = 1'(p); coef_iter = 10'(it); coef_prim = 4'(k); coef_elem = 4'(e);
            if (gs == 3 && (R == 3 || C == 3)) coef_data = '0;
            else begin
              l = (gs <= 2) ? (R / gs) * (4 / gs) + (C / gs) : 0;
              coef_data = pk[p][it][l][4*(R%gs) + e/4][4*(C%gs) + e%4];
            end
            @(negedge clk);
          end
        end
      end
    coef_we = 0;
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        pix_we = 1; pix_buf = 0; pix_row = COORD_W'(y); pix_col = COORD_W'(x);
        for (int t = 0; t < NT; t++) pix_data[t] = PIX_W'(img[y][x][t]);
        @(negedge clk);
      end
    pix_we = 0;
    img_loaded = 1; img_loaded_buf = 0; @(negedge clk); img_loaded = 0;
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);

    for (int p = 0; p < NP; p++)
      for (int it = 0; it < NI; it++) if (prog[it].op != OP_DENSE || p == 0) begin
        int ps;
        ps = int'(prog[it].psize);
        nl = int'(mode_lanes(prog[it].mode));
        for (int ln = 0; ln < nl; ln++) begin
          ref_c2[p][it][ln] = 64'h7fff_ffff_ffff_ffff;
          for (int i = 0; i <= SH - ps; i++)
            for (int j = 0; j <= SW - ps; j++) begin
              longint d;
              d = distance(p, it, ln, i, j);
              if (d < ref_c2[p][it][ln]) ref_c2[p][it][ln] = d;
            end
          c2_rd_pipe = 1'(p); c2_rd_row = prog[it].c2_row; c2_rd_lane = 4'(ln);
          @(negedge clk);
          checks++;
          if (longint'(c2_rd_data) != ref_c2[p][it][ln]) begin
            failures++;
            if (failures < 10) $display("C2 pipe %0d iter %0d lane %0d: got %0d exp %0d", p, it, ln, c2_rd_data, ref_c2[p][it][ln]);
          end
        end
      end
    checks++;
    if (n_iters != NI) begin failures++; $display("%0d iterations", n_iters); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
