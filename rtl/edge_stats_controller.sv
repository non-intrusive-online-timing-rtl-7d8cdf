// edge_stats_controller: drives the edge runtime statistics storage from the
// stream of context-sensitive edge records.
//
// Each edge statistic owns two rows of the storage, one for executions in the
// first iteration of the innermost loop and one for later iterations:
// row = base + 2*slot + further. In that row, cells 4g..4g+3 of every 4-cell
// group g are updated with min, max, sum and count of the edge runtime; group
// 0 is used (the document's edge storage has four cells). The controller is
// combinational: the storage's own stage-0 registers give the update a
// latency of two cycles, and a record can be accepted every cycle. The row
// layout is this design's choice.
module edge_stats_controller
  import tam_pkg::*;
#(
  parameter int NCELLS = 4
) (
  input  logic                               in_valid,
  input  edge_rec_t                          in_rec,
  output logic       [NCELLS-1:0][ROW_W-1:0] addr,
  output cell_mode_e [NCELLS-1:0]            mode,
  output logic       [VALUE_W-1:0]           value
);

  wire [ROW_W-1:0] row = in_rec.base + ROW_W'({in_rec.slot, in_rec.further});

  always_comb begin
    for (int c = 0; c < NCELLS; c++) begin
      addr[c] = row;
      mode[c] = M_NOP;
      if (in_valid && c < 4) begin
        case (c)
          0:       mode[c] = M_MIN;
          1:       mode[c] = M_MAX;
          2:       mode[c] = M_SUM;
          default: mode[c] = M_COUNT;
        endcase
      end
    end
  end
  assign value = in_rec.value;

endmodule
