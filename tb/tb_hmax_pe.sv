// tb_hmax_pe: self-checking test of one processing element.
// Drives random pixel banks, coefficients and partial sums in all three
// operations and checks, cycle by cycle, psum_out against the term computed
// here from the inputs two cycles earlier, and the one-cycle pixel shift.
module tb_hmax_pe;
  import hmax_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  pe_op_e op;
  logic [THETA_W-1:0] dense_theta;
  logic coef_we;
  coef_t coef_in;
  pix_t [N-1:0] pix_in, pix_out;
  acc_t psum_in, psum_out;

  int checks = 0, failures = 0;

  hmax_pe #(.N_THETA(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic acc_t term(pe_op_e o, logic [THETA_W-1:0] dt, coef_t c, pix_t p [N]);
    longint x, d;
    pix_t px;
    acc_t r;
    logic [THETA_W-1:0] s;
    if (!c.en) return '0;
    s = (o == OP_DENSE) ? dt : c.theta;
    px = p[0];
    if (o != OP_GABOR && s < N) px = p[s];
    x = longint'(signed'(px));
    if (o == OP_GABOR) r = x * longint'(signed'(c.value));
    else begin
      d = x - longint'(signed'(c.value));
      r = d * d;
    end
    return r;
  endfunction

  function automatic pix_t rpix();
    logic [31:0] r;
    r = $urandom;
    return r[PIX_W-1:0];
  endfunction

  pix_t hist_pix [3][N];
  pix_t [N-1:0] prev_pix;
  acc_t prev_psum;
  int n;
  logic [63:0] r64;

  initial begin
    op = OP_SPARSE; dense_theta = 0; coef_we = 0; coef_in = '0; pix_in = '0; psum_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int seg = 0; seg < 30; seg++) begin
      // load a coefficient, then let the pipeline settle
      @(negedge clk);
      op = pe_op_e'(seg % 3);
      dense_theta = THETA_W'($urandom_range(0, N-1));
      coef_in.en = (seg % 7 != 6);
      coef_in.theta = THETA_W'($urandom_range(0, N-1));
      coef_in.value = rpix();
      coef_we = 1;
      @(negedge clk);
      coef_we = 0;
      n = 0;
      for (int k = 0; k < 40; k++) begin
        for (int t = 0; t < N; t++) pix_in[t] = rpix();
        r64 = {$urandom, $urandom};
        psum_in = r64[ACC_W-1:0] >>> 4;
        @(posedge clk);
        hist_pix[2] = hist_pix[1]; hist_pix[1] = hist_pix[0];
        for (int t = 0; t < N; t++) hist_pix[0][t] = pix_in[t];
        prev_pix = pix_in; prev_psum = psum_in;
        n++;
        @(negedge clk);
        checks++;
        if (pix_out !== prev_pix) begin
          failures++;
          $display("pixel shift mismatch");
        end
        if (n >= 3) begin
          checks++;
          if (psum_out !== prev_psum + term(op, dense_theta, coef_in, hist_pix[2])) begin
            failures++;
            if (failures < 10)
              $display("psum mismatch op=%0d got %0d exp %0d prev %0d px %0d c %0d", op, psum_out,
                       prev_psum + term(op, dense_theta, coef_in, hist_pix[2]), prev_psum, hist_pix[2][0], coef_in.value);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
