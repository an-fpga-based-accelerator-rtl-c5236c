// tb_hmax_controller: self-checking test of the sequencer. Stands in for the
// instruction queue, FOCM, image memory and pipeline: answers fetches from a
// table, reports the coefficient load done 16 cycles after it starts and the
// last result a fixed time after the stream starts. Checks the order of
// iterations and scales, the 4-cycle fetch, skipped iterations, the per-scale
// iteration limit, waiting for and releasing image buffers, C2 commits with
// the first-level flag, and done.
module tb_hmax_controller;
  import hmax_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [4:0] cfg_addr; logic [31:0] cfg_wdata;
  logic start, busy, done, img_loaded, img_loaded_buf;
  logic [1:0] img_ready;
  logic iq_rewind, iq_fetch, iq_rd_valid;
  instr_t iq_rd_data, instr;
  logic [3:0] scale, dense_group;
  logic active_buf;
  logic [COORD_W:0] img_w, img_h;
  logic focm_start, focm_done, foim_start, pipe_last, c2_commit, c2_first;
  logic [3:0] focm_iter;

  int checks = 0, failures = 0;

  hmax_controller #(.ITERS(16), .MAX_SCALES(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t prog [4];
  int rd_ptr = 0;
  int focm_t = -1, foim_t = -1;
  int fetch_cyc = 0;
  string log_s = "";

  // stand-ins for the queue, FOCM and pipeline
  always @(posedge clk) begin
    iq_rd_valid <= iq_fetch;
    if (iq_fetch) begin
      iq_rd_data <= prog[rd_ptr];
      rd_ptr <= (rd_ptr + 1) % 4;
    end
    if (iq_rewind) rd_ptr <= 0;
    focm_done <= (focm_t == 15);
    pipe_last <= (foim_t == 30);
    focm_t <= focm_start ? 0 : (focm_t >= 0 && focm_t < 15) ? focm_t + 1 : -1;
    foim_t <= foim_start ? 0 : (foim_t >= 0 && foim_t < 30) ? foim_t + 1 : -1;
  end

  // event log: C<scale>.<iter>f for commits (f = first level), R<buf> releases
  logic [1:0] ready_q;
  always @(negedge clk) if (rst_n) begin
    if (dut.state == S_FETCH) fetch_cyc++;
    if (focm_start) begin
      checks++;
      if (fetch_cyc != 4) begin failures++; $display("fetch %0d cycles", fetch_cyc); end
    end
    if (dut.state != S_FETCH) fetch_cyc = 0;
    if (c2_commit) begin
      log_s = {log_s, $sformatf("C%0d.%0d", scale, instr.c2_row)};
      if (c2_first) log_s = {log_s, "f"};
      log_s = {log_s, " "};
    end
    for (int b = 0; b < 2; b++)
      if (ready_q[b] && !img_ready[b]) log_s = {log_s, $sformatf("R%0d ", b)};
    ready_q = img_ready;
  end

  task automatic cfg(int a, int d);
    cfg_we = 1; cfg_addr = 5'(a); cfg_wdata = 32'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic loaded(int b);
    img_loaded = 1; img_loaded_buf = 1'(b);
    @(negedge clk);
    img_loaded = 0;
  endtask

  string expect_s;

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; start = 0; img_loaded = 0; img_loaded_buf = 0;
    ready_q = 0;
    for (int i = 0; i < 4; i++) begin
      prog[i] = '0;
      prog[i].op = OP_SPARSE; prog[i].mode = MODE_4X4; prog[i].n_valid = 16;
      prog[i].psize = 5'(4 + 4 * i);   // 4, 8, 12, 16
      prog[i].c2_row = 10'(i);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg(0, 3);
    cfg(1, 2);
    cfg(16, (4 << 20) | (20 << 10) | 20);   // scale 0: 20x20, 4 iterations
    cfg(17, (4 << 20) | (10 << 10) | 14);   // scale 1: 14 wide, 10 high: 12, 16 skipped
    cfg(18, (1 << 20) | (8 << 10) | 8);     // scale 2: 8x8, 1 iteration
    checks++;
    if (dense_group != 2) begin failures++; $display("dense group register"); end
    start = 1; @(negedge clk); start = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (dut.state != S_WAIT_IMG || !busy) begin failures++; $display("does not wait for the image"); end
    loaded(0);
    loaded(1);
    while (img_ready[0]) @(negedge clk);
    loaded(0);
    while (!done) @(negedge clk);
    @(negedge clk);
    expect_s = "C0.0f C0.1f C0.2f C0.3f R0 C1.0 C1.1 R1 C2.0 R0 ";
    checks++;
    if (log_s != expect_s) begin
      failures++;
      $display("sequence: %s\nexpected: %s", log_s, expect_s);
    end
    checks++;
    if (busy) begin failures++; $display("still busy after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
