// tb_hmax_exp_unit: self-checking test of the post-C2 exponential. Random
// distances for every patch size are compared with exp(-d / (2 (M/4)^2))
// computed here in floating point; the result must be within 1.2 % (plus one
// LSB) and arrive two clock edges after the input.
module tb_hmax_exp_unit;
  import hmax_pkg::*;
  localparam int FRAC = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  acc_t sqdist;
  logic [4:0] psize;
  logic [16:0] result;

  int checks = 0, failures = 0;

  hmax_exp_unit #(.FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real e_q [2];
  real e, d_real, alpha, err;

  initial begin
    in_valid = 0; sqdist = '0; psize = 4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      psize = 5'($urandom_range(1, 16));
      alpha = (real'(psize) / 4.0) ** 2;
      // distances spanning results from ~1 down to ~0
      d_real = real'($urandom_range(0, 100000)) / 100000.0 * 14.0 * alpha;
      if (n % 50 == 0) d_real = 0.0;
      sqdist = ACC_W'($rtoi(d_real * real'(1 << (2 * FRAC))));
      e = $exp(-(real'(sqdist) / real'(1 << (2 * FRAC))) / (2.0 * alpha)) * 65536.0;
      in_valid = 1;
      @(negedge clk);
      e_q[1] = e_q[0];
      e_q[0] = e;
      if (n >= 2) begin
        checks++;
        err = real'(result) - e_q[1];
        if (err < 0.0) err = -err;
        if (!out_valid || err > 0.012 * e_q[1] + 1.0) begin
          failures++;
          if (failures < 10) $display("got %0d expected %f", result, e_q[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
