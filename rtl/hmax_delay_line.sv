// hmax_delay_line: programmable delay element at a primitive output.
//
// Delays its input by `delay` clock cycles (0 .. MAX_DELAY); delay 0 passes
// the input straight through. Built as a shift register of MAX_DELAY stages
// with a tap multiplexer. The RCengine uses one per primitive to line up the
// results of primitives that cover different column ranges of a large patch.
module hmax_delay_line #(
  parameter int W         = 8,
  parameter int MAX_DELAY = 12
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [$clog2(MAX_DELAY+1)-1:0] delay,   // cycles of delay, 0 .. MAX_DELAY
  input  logic [W-1:0]                   d,
  output logic [W-1:0]                   q
);

  localparam int DW = $clog2(MAX_DELAY+1);

  logic [W-1:0] sr [MAX_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < MAX_DELAY; k++) sr[k] <= '0;
    end else begin
      sr[0] <= d;
      for (int k = 1; k < MAX_DELAY; k++) sr[k] <= sr[k-1];
    end
  end

  always_comb begin
    q = d;
    for (int k = 1; k <= MAX_DELAY; k++)
      if (delay == DW'(k)) q = sr[k-1];
  end

endmodule
