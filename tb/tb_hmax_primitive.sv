// tb_hmax_primitive: self-checking test of the 4x4 systolic primitive.
// Streams random 4-row image strips through the primitive in the three
// operations, with random patches (including disabled, zero-padding
// coefficients), and checks every window result against a direct 4x4
// convolution computed here, at exactly PRIM_LAT cycles after the window's
// last column entered.
module tb_hmax_primitive;
  import hmax_pkg::*;
  localparam int N = 4;
  localparam int W = 24;

  logic clk = 0, rst_n = 0;
  pe_op_e op;
  logic [THETA_W-1:0] dense_theta;
  logic coef_we;
  coef_t [15:0] coef_in;
  pix_t [3:0][N-1:0] rows_in;
  acc_t out;

  int checks = 0, failures = 0;
  int cyc = 0;

  hmax_primitive #(.N_THETA(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t  img [4][W][N];
  coef_t k   [16];
  acc_t  got [W + 20];

  function automatic longint sx(pix_t v);
    logic signed [PIX_W-1:0] s;
    s = v;
    return longint'(s);
  endfunction

  function automatic acc_t window(int j);
    acc_t sum;
    longint x, d;
    int s;
    sum = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        if (!k[r*4+c].en) continue;
        s = (op == OP_DENSE) ? int'(dense_theta) : int'(k[r*4+c].theta);
        if (op == OP_GABOR) s = 0;
        x = sx(img[r][j+c][s]);
        if (op == OP_GABOR) sum = sum + acc_t'(x * sx(k[r*4+c].value));
        else begin
          d = x - sx(k[r*4+c].value);
          sum = sum + acc_t'(d * d);
        end
      end
    return sum;
  endfunction

  int base;

  initial begin
    op = OP_SPARSE; dense_theta = 0; coef_we = 0; coef_in = '0; rows_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      op = pe_op_e'(trial % 3);
      dense_theta = THETA_W'($urandom_range(0, N-1));
      for (int e = 0; e < 16; e++) begin
        k[e].en    = ($urandom_range(0, 5) != 0);
        k[e].theta = THETA_W'($urandom_range(0, N-1));
        k[e].value = pix_t'($urandom_range(0, 1 << 20)) - pix_t'(1 << 19);
        coef_in[e] = k[e];
      end
      for (int r = 0; r < 4; r++)
        for (int x = 0; x < W; x++)
          for (int t = 0; t < N; t++)
            img[r][x][t] = pix_t'($urandom_range(0, 1 << 20)) - pix_t'(1 << 19);
      @(negedge clk);
      coef_we = 1;
      @(negedge clk);
      coef_we = 0;
      base = cyc;
      // stream W columns, then zeros while the pipeline drains
      for (int x = 0; x < W + 12; x++) begin
        for (int r = 0; r < 4; r++)
          for (int t = 0; t < N; t++)
            rows_in[r][t] = (x < W) ? img[r][x][t] : '0;
        @(negedge clk);
        if (cyc - base - 1 < W + 20) got[cyc - base - 1] = out;
      end
      // window j ends at column j+3, which entered at relative cycle j+3
      for (int j = 0; j + 3 < W; j++) begin
        checks++;
        if (got[j + 3 + PRIM_LAT] !== window(j)) begin
          failures++;
          if (failures < 10)
            $display("trial %0d op %0d window %0d: got %0d exp %0d", trial, op, j,
                     got[j + 3 + PRIM_LAT], window(j));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
