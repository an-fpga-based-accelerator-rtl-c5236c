// tb_hmax_focm: self-checking test of the coefficient memory. Writes random
// coefficients for several iterations, loads iterations in random order and
// checks that exactly 16 writes of 16 coefficients reach the engine port, in
// primitive order, with the right words, and that done comes 16 edges after
// start.
module tb_hmax_focm;
  import hmax_pkg::*;
  localparam int IT = 8;

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [2:0] wr_iter, iter;
  logic [3:0] wr_prim, wr_elem;
  coef_t wr_data;
  logic start, busy, rc_we, done;
  logic [3:0] rc_prim;
  coef_t [15:0] rc_data;

  int checks = 0, failures = 0;

  hmax_focm #(.ITERS(IT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  coef_t ref_mem [IT][16][16];
  int nwe, t_done;

  initial begin
    wr_en = 0; wr_iter = 0; wr_prim = 0; wr_elem = 0; wr_data = '0; start = 0; iter = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < IT; i++)
      for (int p = 0; p < 16; p++)
        for (int e = 0; e < 16; e++) begin
          logic [31:0] rv;
          rv = $urandom;
          ref_mem[i][p][e] = rv[$bits(coef_t)-1:0];
          wr_en = 1; wr_iter = 3'(i); wr_prim = 4'(p); wr_elem = 4'(e);
          wr_data = ref_mem[i][p][e];
          @(negedge clk);
        end
    wr_en = 0;
    for (int n = 0; n < 12; n++) begin
      int it;
      it = $urandom_range(0, IT-1);
      iter = 3'(it);
      start = 1;
      @(negedge clk);
      start = 0;
      nwe = 0; t_done = -1;
      for (int c = 1; c <= 20; c++) begin
        @(negedge clk);
        if (rc_we) begin
          checks++;
          for (int e = 0; e < 16; e++) begin
            checks++;
            if (rc_data[e] !== ref_mem[it][nwe][e] || rc_prim != 4'(nwe)) begin
              failures++;
              if (failures < 10) $display("iter %0d prim %0d elem %0d wrong", it, nwe, e);
            end
          end
          nwe++;
        end
        if (done) t_done = c;
      end
      checks++;
      if (nwe != 16 || t_done != 16) begin
        failures++;
        $display("load of iteration %0d: %0d writes, done at %0d", it, nwe, t_done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
