// hmax_pipe_adder: pipeline adder tree between the S2 pipelines and the C2 modules.
//
// With N_PIPES parallel S2 pipelines all working on the same broadcast image:
//  - sparse (dense = 0): every pipeline runs its own patches over all
//    orientations, so its results go unchanged to its own C2 module
//    (V = P C2 modules enabled);
//  - dense (dense = 1): each pipeline applies one orientation of the same
//    patches, so the results of the pipelines that hold the orientations of
//    one patch are summed before C2. Pipelines are taken in consecutive
//    groups of `group` (the number of orientations handled per iteration,
//    normally min(N_theta, P)); group g's sum goes to C2 module g, and
//    V = ceil(P / group) C2 modules are enabled (c2_en).
// One register stage: outputs appear one clock edge after the inputs.
module hmax_pipe_adder
  import hmax_pkg::*;
#(
  parameter int N_PIPES = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           dense,
  input  logic [3:0]                     group,     // 1 .. N_PIPES
  input  logic                           in_valid,
  input  logic [1:0]                     in_tag,
  input  acc_t [N_PIPES-1:0][15:0]       in_lanes,
  output logic                           out_valid,
  output logic [1:0]                     out_tag,
  output acc_t [N_PIPES-1:0][15:0]       out_lanes,
  output logic [N_PIPES-1:0]             c2_en
);

  acc_t [N_PIPES-1:0][15:0] sum_d;
  logic [N_PIPES-1:0]       en_d;
  int unsigned              g;

  always_comb begin
    sum_d = '0;
    en_d  = '0;
    g     = 0;
    if (!dense || group == 0) begin
      sum_d = in_lanes;
      en_d  = '1;
    end else begin
      for (int p = 0; p < N_PIPES; p++) begin
        g = unsigned'(p) / 32'(group);
        for (int l = 0; l < 16; l++) sum_d[g][l] = sum_d[g][l] + in_lanes[p][l];
        en_d[g] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_lanes <= '0;
      c2_en     <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      out_lanes <= sum_d;
      c2_en     <= en_d;
    end
  end

endmodule
