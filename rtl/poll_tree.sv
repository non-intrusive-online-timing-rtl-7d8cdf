// poll_tree: round-robin collection of runtime and iteration records from the
// output buffers of all automata.
//
// Several automata may finish a loop or function in the same cycle, so their
// records wait in per-automaton buffers. Each cycle in which the output
// register is free (or being drained) the arbiter grants the first requesting
// automaton after the one granted last, pops its buffer through 'pop' and
// loads the record into the output register. Throughput is one record per
// cycle, latency from request to out_valid is one cycle. The document names
// the round-robin scheme; the flat (single-level) arbiter is this design's
// choice.
module poll_tree
  import tam_pkg::*;
#(
  parameter int N = 240
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    req,
  input  meas_t [N-1:0]   rec,
  output logic [N-1:0]    pop,
  output logic            out_valid,
  output meas_t           out_rec,
  input  logic            out_ready
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;
  logic [IW-1:0] pick;
  logic          found;
  wire           take = !out_valid || out_ready;

  // First requester strictly after 'last', wrapping around.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= N; k++) begin
      int idx;
      idx = (int'(last) + k) % N;
      if (!found && req[idx]) begin
        found = 1'b1;
        pick  = IW'(idx);
      end
    end
  end

  always_comb begin
    pop = '0;
    if (take && found) pop[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last      <= IW'(N - 1);
      out_valid <= 1'b0;
      out_rec   <= '0;
    end else if (take) begin
      out_valid <= found;
      if (found) begin
        out_rec <= rec[pick];
        last    <= pick;
      end
    end
  end

endmodule
