// hmax_focm: fast on-chip coefficient memory (FOCM) of one S2 pipeline.
//
// Holds the patch coefficients of every iteration, 256 per iteration (one per
// PE of the RCengine), loaded once by the host at configuration time. It is
// built from 4 banks x 4 columns = 16 memories; memory (r, c) holds element
// r*4+c of every primitive, so one read per memory per cycle delivers all 16
// coefficients of one primitive and the whole RCengine is initialised in 16
// cycles.
//
// Host write: wr_en with wr_iter, wr_prim (0..15), wr_elem (0..15) and the
// coefficient word.
// Load: start with iter launches 16 reads (primitive 0 to 15); rc_we,
// rc_prim and rc_data drive the RCengine's coefficient port one clock edge
// after each read, and done pulses with the last write, 16 clock edges after
// the edge that captures start.
// The bank/column organisation and the 16-cycle load follow the document;
// the address map is this design's.
module hmax_focm
  import hmax_pkg::*;
#(
  parameter int ITERS = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  logic [$clog2(ITERS)-1:0]      wr_iter,
  input  logic [3:0]                    wr_prim,
  input  logic [3:0]                    wr_elem,
  input  coef_t                         wr_data,
  input  logic                          start,
  input  logic [$clog2(ITERS)-1:0]      iter,
  output logic                          busy,
  output logic                          rc_we,
  output logic [3:0]                    rc_prim,
  output coef_t [15:0]                  rc_data,
  output logic                          done
);

  localparam int IW    = $clog2(ITERS);
  localparam int DEPTH = ITERS * 16;

  logic [IW-1:0] iter_q;
  logic [3:0]    cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      iter_q  <= '0;
      cnt     <= '0;
      rc_we   <= 1'b0;
      rc_prim <= '0;
      done    <= 1'b0;
    end else begin
      rc_we   <= busy;
      rc_prim <= cnt;
      done    <= busy && cnt == 4'd15;
      if (start) begin
        busy   <= 1'b1;
        iter_q <= iter;
        cnt    <= '0;
      end else if (busy) begin
        cnt <= cnt + 1;
        if (cnt == 4'd15) busy <= 1'b0;
      end
    end
  end

  for (genvar e = 0; e < 16; e++) begin : g_mem
    coef_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en && wr_elem == 4'(e)) mem[{wr_iter, wr_prim}] <= wr_data;
      if (busy) rc_data[e] <= mem[{iter_q, cnt}];
    end
  end

endmodule
