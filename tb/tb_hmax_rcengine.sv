// tb_hmax_rcengine: self-checking test of the reconfigurable convolution
// engine in all four modes and all three operations. For each trial it
// builds random patches (sizes up to the mode's edge, the rest zero-padded and
// disabled), writes them in the engine's coefficient layout (16 cycles),
// streams a random 16-row strip and checks every lane result against a direct
// convolution computed here, and that the result arrives exactly RC_LAT
// clock edges after its last column (the tag carries the column index).
module tb_hmax_rcengine;
  import hmax_pkg::*;
  localparam int N = 4;
  localparam int W = 36;

  logic clk = 0, rst_n = 0;
  pe_op_e op;
  rc_mode_e mode;
  logic [THETA_W-1:0] dense_theta;
  logic coef_we;
  logic [3:0] coef_prim;
  coef_t [15:0] coef_data;
  logic in_valid;
  logic [7:0] in_tag;
  pix_t [15:0][N-1:0] rows_in;
  logic out_valid;
  logic [7:0] out_tag;
  acc_t [15:0] lanes;

  int checks = 0, failures = 0;
  int cyc = 0;

  hmax_rcengine #(.N_THETA(N), .TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t  img [16][W][N];
  coef_t pk  [16][16][16];   // [lane][u][v]
  int    col_cycle [W];

  function automatic longint sx(pix_t v);
    logic signed [PIX_W-1:0] s;
    s = v;
    return longint'(s);
  endfunction

  function automatic acc_t expect_lane(int l, int j, int ksz);
    acc_t sum;
    longint x, d;
    int s;
    sum = '0;
    for (int u = 0; u < ksz; u++)
      for (int v = 0; v < ksz; v++) begin
        if (!pk[l][u][v].en) continue;
        s = (op == OP_DENSE) ? int'(dense_theta) : int'(pk[l][u][v].theta);
        if (op == OP_GABOR) s = 0;
        x = sx(img[u][j+v][s]);
        if (op == OP_GABOR) sum = sum + acc_t'(x * sx(pk[l][u][v].value));
        else begin
          d = x - sx(pk[l][u][v].value);
          sum = sum + acc_t'(d * d);
        end
      end
    return sum;
  endfunction

  int gs, ksz, nl, psz, R, C, l;
  acc_t e;

  // capture and check outputs
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int x, j;
      x = int'(out_tag);
      j = x - (ksz - 1);
      checks++;
      if (cyc - col_cycle[x] - 1 != RC_LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - col_cycle[x] - 1, RC_LAT);
      end
      if (j >= 0) begin
        for (int ln = 0; ln < nl; ln++) begin
          e = expect_lane(ln, j, ksz);
          checks++;
          if (lanes[ln] !== e) begin
            failures++;
            if (failures < 10)
              $display("mode %0d op %0d lane %0d window %0d: got %0d exp %0d",
                       mode, op, ln, j, lanes[ln], e);
          end
        end
      end
    end
  end

  initial begin
    op = OP_SPARSE; mode = MODE_4X4; dense_theta = 0; coef_we = 0; coef_prim = 0;
    coef_data = '0; in_valid = 0; in_tag = 0; rows_in = '0;
    ksz = 4; nl = 16;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 16; trial++) begin
      mode = rc_mode_e'(trial % 4);
      op = pe_op_e'((trial / 4) % 3);
      dense_theta = THETA_W'($urandom_range(0, N-1));
      gs  = int'(mode) + 1;
      ksz = 4 * gs;
      nl  = int'(mode_lanes(mode));
      psz = (trial >= 8) ? ksz - int'($urandom_range(0, 3)) : ksz;
      for (int ln = 0; ln < 16; ln++)
        for (int u = 0; u < 16; u++)
          for (int v = 0; v < 16; v++) begin
            pk[ln][u][v].en    = (u < psz && v < psz);
            pk[ln][u][v].theta = THETA_W'($urandom_range(0, N-1));
            pk[ln][u][v].value = pix_t'($urandom_range(0, 1 << 16)) - pix_t'(1 << 15);
          end
      for (int u = 0; u < 16; u++)
        for (int x = 0; x < W; x++)
          for (int t = 0; t < N; t++)
            img[u][x][t] = pix_t'($urandom_range(0, 1 << 16)) - pix_t'(1 << 15);
      // coefficient load, one primitive per cycle
      for (int k = 0; k < 16; k++) begin
        R = k / 4; C = k % 4;
        for (int e2 = 0; e2 < 16; e2++) begin
          if (gs == 3 && (R == 3 || C == 3)) begin
            coef_data[e2] = '0;
            continue;
          end
          l = (gs <= 2) ? (R / gs) * (4 / gs) + (C / gs) : 0;
          coef_data[e2] = pk[l][4*(R%gs) + e2/4][4*(C%gs) + e2%4];
        end
        coef_prim = 4'(k);
        coef_we = 1;
        @(negedge clk);
      end
      coef_we = 0;
      // stream the strip
      for (int x = 0; x < W; x++) begin
        for (int u = 0; u < 16; u++)
          for (int t = 0; t < N; t++) rows_in[u][t] = img[u][x][t];
        in_valid = 1;
        in_tag = 8'(x);
        col_cycle[x] = cyc;
        @(negedge clk);
      end
      in_valid = 0;
      repeat (RC_LAT + 2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
