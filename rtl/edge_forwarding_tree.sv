// edge_forwarding_tree: merges the context-sensitive edge runtime records of
// all automata into one stream.
//
// Only the innermost active loop or function emits an edge record, so at most
// one input is valid per cycle and plain forwarding suffices: each record is
// gated by its valid bit and the gated records are OR-reduced. The result is
// registered once (latency 1, one record per cycle). If two inputs are ever
// valid together the output is meaningless and the sticky 'collision' flag is
// set; an assertion reports it in simulation. The OR reduction and the flag
// are this design's choices.
module edge_forwarding_tree
  import tam_pkg::*;
#(
  parameter int N = 240
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        in_valid,
  input  edge_rec_t [N-1:0]   in_rec,
  output logic                out_valid,
  output edge_rec_t           out_rec,
  output logic                collision
);

  edge_rec_t merged;

  always_comb begin
    merged = '0;
    for (int i = 0; i < N; i++)
      if (in_valid[i]) merged = merged | in_rec[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rec   <= '0;
      collision <= 1'b0;
    end else begin
      out_valid <= |in_valid;
      out_rec   <= merged;
      if ((in_valid & (in_valid - 1'b1)) != '0) collision <= 1'b1;
    end
  end

  a_single_innermost: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_valid))
    else $error("edge_forwarding_tree: more than one automaton emitted an edge record");

endmodule
