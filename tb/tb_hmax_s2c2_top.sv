// tb_hmax_s2c2_top: end-to-end test of the S2/C2 accelerator.
//
// Configures a small instance (2 pipelines, 4 orientations, images up to
// 24 x 24) with three pyramid scales and six instructions covering every
// RCengine mode (4x4, 8x8, 12x12, 16x16), all three operations (sparse,
// dense, Gabor), a patch size that needs zero padding, iterations skipped
// on small scales, fewer iterations on the last scale, and the dense
// pipeline adder. The host loads the second scale into the other image
// buffer while the first is being processed (double buffering), then waits
// for the first buffer to be released before loading the third scale.
// Checks: every C2 value against a reference computed here from the same
// data, every Gabor result on the output stream, the per-iteration cycle
// counts (4-cycle instruction fetch, 16 coefficient writes, one image
// column per cycle), and that each mechanism occurred at least once.
module tb_hmax_s2c2_top;
  import hmax_pkg::*;

  localparam int NT = 4, NP = 2, MW = 24, MH = 24, IT = 16;
  localparam int NS = 3, NI = 6;

  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [4:0] cfg_addr; logic [31:0] cfg_wdata;
  logic iq_clear, iq_push; instr_t iq_push_data;
  logic coef_we; logic [0:0] coef_pipe; logic [3:0] coef_iter, coef_prim, coef_elem; coef_t coef_data;
  logic pix_we, pix_buf; logic [COORD_W-1:0] pix_row, pix_col; pix_t [NT-1:0] pix_data;
  logic img_loaded, img_loaded_buf; logic [1:0] img_ready;
  logic start, busy, done;
  logic [0:0] c2_rd_pipe; logic [3:0] c2_rd_row, c2_rd_lane; acc_t c2_rd_data;
  logic c2_rd_en, c2_feat_valid; logic [4:0] c2_rd_psize; logic [16:0] c2_feat;
  real fe, ferr;
  logic s_valid, s_win; acc_t [NP-1:0][15:0] s_lanes;

  int checks = 0, failures = 0;

  hmax_s2c2_top #(.N_THETA(NT), .N_PIPES(NP), .MAX_W(MW), .MAX_H(MH), .ITERS(IT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test data ----------------
  int sw [NS] = '{20, 14, 10};
  int sh [NS] = '{18, 16, 9};
  int sn [NS] = '{6, 6, 5};          // iterations run per scale
  instr_t prog [NI];
  int img [NS][MH][MW][NT];
  coef_t pk [NP][NI][16][16][16];     // [pipe][iter][lane][u][v]
  longint ref_c2 [NP][NI][16];
  logic   ref_set [NP][NI][16];

  function automatic instr_t mk(pe_op_e op, rc_mode_e m, int nv, int ps, int tb, int row);
    instr_t i;
    i.op = op; i.mode = m; i.n_valid = 5'(nv); i.psize = 5'(ps);
    i.theta_base = THETA_W'(tb); i.c2_row = 10'(row);
    return i;
  endfunction

  function automatic longint sx(pix_t v);
    logic signed [PIX_W-1:0] s;
    s = v;
    return longint'(s);
  endfunction

  // distance (or Gabor response) of pipeline p's lane l patch at window (i, j)
  function automatic longint resp(int s, int p, int it, int l, int i, int j);
    longint sum, d, x;
    int t;
    instr_t in;
    in = prog[it];
    sum = 0;
    for (int u = 0; u < int'(in.psize); u++)
      for (int v = 0; v < int'(in.psize); v++) begin
        case (in.op)
          OP_GABOR:  t = 0;
          OP_DENSE:  t = int'(in.theta_base) + p;
          default:   t = int'(pk[p][it][l][u][v].theta);
        endcase
        x = longint'(img[s][i+u][j+v][t]);
        if (in.op == OP_GABOR) sum += x * sx(pk[p][it][l][u][v].value);
        else begin
          d = x - sx(pk[p][it][l][u][v].value);
          sum += d * d;
        end
      end
    return sum;
  endfunction

  // ---------------- host tasks ----------------
  task automatic cfg(int a, int d);
    cfg_we = 1; cfg_addr = 5'(a); cfg_wdata = 32'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  int ov_writes = 0;   // image writes made while the engines were busy

  task automatic load_image(int s, int b);
    for (int y = 0; y < sh[s]; y++)
      for (int x = 0; x < sw[s]; x++) begin
        pix_we = 1; pix_buf = 1'(b); pix_row = COORD_W'(y); pix_col = COORD_W'(x);
        for (int t = 0; t < NT; t++) pix_data[t] = PIX_W'(img[s][y][x][t]);
        if (busy) ov_writes++;
        @(negedge clk);
      end
    pix_we = 0;
    img_loaded = 1; img_loaded_buf = 1'(b);
    @(negedge clk);
    img_loaded = 0;
  endtask

  // ---------------- monitors ----------------
  int n_mode [4], n_op [3], n_skip = 0, n_pad = 0, n_reexec = 0, n_dense_sum = 0;
  int fetch_len = 0, n_rcwe = 0, n_cols = 0, exp_cols = 0, n_iter_done = 0;
  int gab_n = 0;

  always @(negedge clk) if (rst_n) begin
    // instruction fetch length
    if (dut.u_ctrl.state == S_FETCH) fetch_len++;
    if (dut.u_ctrl.state == S_FETCH && dut.u_ctrl.cnt == 2'd3) begin
      checks++;
      if (fetch_len != 4) begin failures++; $display("fetch took %0d cycles", fetch_len); end
      fetch_len = 0;
      if (dut.u_ctrl.skip) n_skip++;
      if (dut.u_ctrl.scale != 0) n_reexec++;
    end
    if (dut.g_pipe[0].u_eng.rc_we) n_rcwe++;
    if (dut.img_valid) n_cols++;
    if (dut.u_ctrl.state == S_STREAM && dut.u_ctrl.pipe_last) begin
      instr_t in;
      int k;
      in = dut.instr;
      k = int'(mode_size(in.mode));
      exp_cols = (int'(dut.img_h) - int'(in.psize) + 1) * (int'(dut.img_w) + k - int'(in.psize));
      checks += 2;
      if (n_rcwe != 16) begin failures++; $display("%0d coefficient writes", n_rcwe); end
      if (n_cols != exp_cols) begin failures++; $display("%0d columns streamed, expected %0d", n_cols, exp_cols); end
      n_mode[int'(in.mode)]++;
      n_op[int'(in.op)]++;
      if (int'(in.psize) < k) n_pad++;
      if (in.op == OP_DENSE && dut.dense_group > 1) n_dense_sum++;
      n_rcwe = 0; n_cols = 0; n_iter_done++;
    end
  end

  // Gabor results on the output stream
  always @(negedge clk) if (rst_n) begin
    if (dut.u_ctrl.state == S_FETCH) gab_n = 0;
    if (s_valid && dut.instr.op == OP_GABOR) begin
      int ncol, i, x, it, s;
      it = int'(dut.u_ctrl.it);
      s  = int'(dut.u_ctrl.scale);
      ncol = int'(dut.img_w) + 4 - int'(dut.instr.psize);
      i = gab_n / ncol; x = gab_n % ncol;
      if (s_win) begin
        for (int p = 0; p < NP; p++)
          for (int l = 0; l < 16; l++) begin
            logic signed [ACC_W-1:0] got;
            got = s_lanes[p][l];
            checks++;
            if (longint'(got) != resp(s, p, it, l, i, x - 3)) begin
              failures++;
              if (failures < 10) $display("Gabor pipe %0d lane %0d at (%0d,%0d)", p, l, i, x - 3);
            end
          end
      end
      gab_n++;
    end
  end

  // ---------------- stimulus ----------------
  int R, C, gs, l, nl;

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; iq_clear = 0; iq_push = 0; iq_push_data = '0;
    coef_we = 0; coef_pipe = 0; coef_iter = 0; coef_prim = 0; coef_elem = 0; coef_data = '0;
    pix_we = 0; pix_buf = 0; pix_row = 0; pix_col = 0; pix_data = '0;
    img_loaded = 0; img_loaded_buf = 0; start = 0; c2_rd_pipe = 0; c2_rd_row = 0; c2_rd_lane = 0;
    c2_rd_en = 0; c2_rd_psize = 0;
    for (int k = 0; k < 4; k++) n_mode[k] = 0;
    for (int k = 0; k < 3; k++) n_op[k] = 0;

    prog[0] = mk(OP_SPARSE, MODE_4X4,   16, 4,  0, 0);
    prog[1] = mk(OP_SPARSE, MODE_8X8,    3, 7,  0, 1);
    prog[2] = mk(OP_SPARSE, MODE_12X12,  1, 12, 0, 2);   // skipped on scale 2
    prog[3] = mk(OP_DENSE,  MODE_16X16,  1, 16, 2, 3);   // skipped on scales 1, 2
    prog[4] = mk(OP_DENSE,  MODE_4X4,   16, 4,  1, 4);
    prog[5] = mk(OP_GABOR,  MODE_4X4,   16, 4,  0, 5);   // not run on scale 2

    for (int s = 0; s < NS; s++)
      for (int y = 0; y < MH; y++)
        for (int x = 0; x < MW; x++)
          for (int t = 0; t < NT; t++) img[s][y][x][t] = $urandom_range(0, 255);
    for (int p = 0; p < NP; p++)
      for (int it = 0; it < NI; it++)
        for (int ln = 0; ln < 16; ln++)
          for (int u = 0; u < 16; u++)
            for (int v = 0; v < 16; v++) begin
              pk[p][it][ln][u][v].en    = (u < int'(prog[it].psize) && v < int'(prog[it].psize));
              pk[p][it][ln][u][v].theta = THETA_W'($urandom_range(0, NT-1));
              pk[p][it][ln][u][v].value = PIX_W'($urandom_range(0, 255));
              if (prog[it].op == OP_GABOR) pk[p][it][ln][u][v].value = PIX_W'($urandom_range(0, 255)) - PIX_W'(128);
            end

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // configuration
    cfg(0, NS);
    cfg(1, NP);                                    // dense: both pipelines hold one patch
    for (int s = 0; s < NS; s++) cfg(16 + s, (sn[s] << 20) | (sh[s] << 10) | sw[s]);
    iq_clear = 1; @(negedge clk); iq_clear = 0;
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
            coef_we = 1; coef_pipe = 1'(p); coef_iter = 4'(it); coef_prim = 4'(k); coef_elem = 4'(e);
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

    // run: scale 0 in buffer 0, scale 1 loaded into buffer 1 while scale 0 runs
    load_image(0, 0);
    start = 1; @(negedge clk); start = 0;
    load_image(1, 1);
    while (img_ready[0]) @(negedge clk);
    load_image(2, 0);
    while (!done) @(negedge clk);
    @(negedge clk);

    // reference C2 values
    for (int p = 0; p < NP; p++)
      for (int it = 0; it < NI; it++)
        for (int ln = 0; ln < 16; ln++) ref_set[p][it][ln] = 0;
    for (int s = 0; s < NS; s++)
      for (int it = 0; it < sn[s]; it++) begin
        int ps;
        ps = int'(prog[it].psize);
        if (prog[it].op == OP_GABOR || ps > sw[s] || ps > sh[s]) continue;
        nl = int'(mode_lanes(prog[it].mode));
        if (int'(prog[it].n_valid) < nl) nl = int'(prog[it].n_valid);
        for (int ln = 0; ln < nl; ln++)
          for (int i = 0; i <= sh[s] - ps; i++)
            for (int j = 0; j <= sw[s] - ps; j++) begin
              if (prog[it].op == OP_DENSE) begin
                longint d;
                d = resp(s, 0, it, ln, i, j) + resp(s, 1, it, ln, i, j);
                if (!ref_set[0][it][ln] || d < ref_c2[0][it][ln]) ref_c2[0][it][ln] = d;
                ref_set[0][it][ln] = 1;
              end else
                for (int p = 0; p < NP; p++) begin
                  longint d;
                  d = resp(s, p, it, ln, i, j);
                  if (!ref_set[p][it][ln] || d < ref_c2[p][it][ln]) ref_c2[p][it][ln] = d;
                  ref_set[p][it][ln] = 1;
                end
            end
      end

    // read back and compare
    for (int p = 0; p < NP; p++)
      for (int it = 0; it < NI; it++)
        for (int ln = 0; ln < 16; ln++) begin
          if (!ref_set[p][it][ln]) continue;
          c2_rd_pipe = 1'(p); c2_rd_row = 4'(prog[it].c2_row); c2_rd_lane = 4'(ln);
          c2_rd_en = 1; c2_rd_psize = prog[it].psize;
          @(negedge clk);
          c2_rd_en = 0;
          checks++;
          if (longint'(c2_rd_data) != ref_c2[p][it][ln]) begin
            failures++;
            if (failures < 10)
              $display("C2 pipe %0d iter %0d lane %0d: got %0d exp %0d", p, it, ln,
                       c2_rd_data, ref_c2[p][it][ln]);
          end
          // feature value: pixels have 8 fraction bits, alpha = (M/4)^2
          fe = $exp(-(real'(ref_c2[p][it][ln]) / 65536.0) /
                    (2.0 * (real'(prog[it].psize) / 4.0) ** 2)) * 65536.0;
          repeat (2) @(negedge clk);
          ferr = real'(c2_feat) - fe;
          if (ferr < 0.0) ferr = -ferr;
          checks++;
          if (!c2_feat_valid || ferr > 0.012 * fe + 1.0) begin
            failures++;
            if (failures < 10) $display("feature got %0d expected %f", c2_feat, fe);
          end
        end

    // every mechanism must have happened
    checks++;
    if (n_iter_done != 6 + 5 + 3) begin failures++; $display("%0d iterations ran", n_iter_done); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_mode[k] == 0) begin failures++; $display("mode %0d never ran", k); end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("operation %0d never ran", k); end
    end
    checks += 5;
    if (n_skip == 0)      begin failures++; $display("no iteration skipped"); end
    if (n_pad == 0)       begin failures++; $display("no zero-padded patch"); end
    if (n_reexec == 0)    begin failures++; $display("no instruction re-executed"); end
    if (n_dense_sum == 0) begin failures++; $display("no dense pipeline sum"); end
    if (ov_writes == 0)   begin failures++; $display("no image loaded during processing"); end
    $display("modes %0d/%0d/%0d/%0d ops gabor %0d sparse %0d dense %0d skipped %0d padded %0d re-executed %0d dense sums %0d overlapped writes %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_op[0], n_op[1], n_op[2],
             n_skip, n_pad, n_reexec, n_dense_sum, ov_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
