// hmax_instr_queue: on-chip instruction queue of the S2C2 pipeline.
//
// The host appends instructions (push) once at configuration time; clear
// empties the queue. The pipeline fetches one instruction per iteration.
// Because the same instruction sequence is executed again for every level
// of the C1 pyramid, the queue is a circular buffer: reading does not consume
// entries, the read pointer wraps to the first entry after the last one, and
// rewind returns it to the first entry at the start of a level.
//
// Timing: fetch captures the entry at the read pointer into rd_data, valid
// one clock edge later (rd_valid), and advances the pointer.
module hmax_instr_queue
  import hmax_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        push,
  input  instr_t                      push_data,
  input  logic                        rewind,
  input  logic                        fetch,
  output instr_t                      rd_data,
  output logic                        rd_valid,
  output logic [$clog2(DEPTH):0]      count,
  output logic                        full
);

  localparam int AW = $clog2(DEPTH);

  instr_t         mem [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;

  assign full = count == (AW+1)'(DEPTH);

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr] <= push_data;
    if (fetch) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= fetch && count != 0;
      if (clear) begin
        wr_ptr <= '0;
        rd_ptr <= '0;
        count  <= '0;
      end else begin
        if (push && !full) begin
          wr_ptr <= wr_ptr + 1;
          count  <= count + 1;
        end
        if (rewind) rd_ptr <= '0;
        else if (fetch && count != 0)
          rd_ptr <= ((AW+1)'(rd_ptr) + 1 >= count) ? '0 : rd_ptr + 1;
      end
    end
  end

endmodule
