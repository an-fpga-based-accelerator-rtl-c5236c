// tb_hmax_instr_queue: self-checking test of the circular instruction queue.
// Pushes random instructions, fetches more than the queue holds and checks the
// wrap-around order, then rewind, clear and the full flag.
module tb_hmax_instr_queue;
  import hmax_pkg::*;
  localparam int D = 8;

  logic clk = 0, rst_n = 0;
  logic clear, push, rewind, fetch, rd_valid, full;
  instr_t push_data, rd_data;
  logic [3:0] count;

  int checks = 0, failures = 0;

  hmax_instr_queue #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t ref_q [D];
  int n;

  task automatic fetch_check(int idx);
    fetch = 1;
    @(negedge clk);
    fetch = 0;
    checks++;
    if (!rd_valid || rd_data !== ref_q[idx]) begin
      failures++;
      if (failures < 10) $display("fetch expected entry %0d", idx);
    end
  endtask

  initial begin
    clear = 0; push = 0; rewind = 0; fetch = 0; push_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      n = 3 + round * 2;     // 3, 5, 7 entries
      clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < n; i++) begin
        logic [63:0] rv;
        rv = {$urandom, $urandom};
        ref_q[i] = rv[$bits(instr_t)-1:0];
        push = 1; push_data = ref_q[i];
        @(negedge clk);
      end
      push = 0;
      checks++;
      if (count != 4'(n)) failures++;
      for (int f = 0; f < 2 * n + 1; f++) fetch_check(f % n);
      rewind = 1; @(negedge clk); rewind = 0;
      fetch_check(0);
      fetch_check(1);
    end
    // fill to full: the extra push is refused
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < D + 2; i++) begin
      push = 1; push_data = instr_t'(i);
      @(negedge clk);
    end
    push = 0;
    checks++;
    if (!full || count != 4'(D)) begin
      failures++;
      $display("full flag/count wrong: %0d", count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
