// transition_lookup: rewritable map from WPG edge ID to the transition events
// of one loop/function automaton.
//
// One lookup_entry_t per edge ID, held in a RAM with a registered read (the
// block-RAM style the document names for large functions). Edges that do not
// concern the automaton hold an all-zero entry. The contents are written at
// run time through the meta-configuration port, which lets one automaton be
// re-targeted to another loop or function. The event set itself (enter,
// leave, back, child enter/exit, edge statistic slot) is this design's choice.
//
// Timing: ev/ev_valid appear one cycle after wpe_valid/edge_id. A write and a
// lookup of the same entry in one cycle return the old entry.
module transition_lookup
  import tam_pkg::*;
#(
  parameter int DEPTH = 2**EDGE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wpe_valid,
  input  logic [EDGE_W-1:0]    edge_id,
  input  logic                 cfg_we,
  input  logic [EDGE_W-1:0]    cfg_addr,
  input  lookup_entry_t        cfg_data,
  output logic                 ev_valid,
  output lookup_entry_t        ev
);

  localparam int AW = $clog2(DEPTH);

  lookup_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_addr[AW-1:0]] <= cfg_data;
    if (wpe_valid) ev <= mem[edge_id[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ev_valid <= 1'b0;
    else        ev_valid <= wpe_valid;
  end

endmodule
