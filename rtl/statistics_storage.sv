// statistics_storage: an array of statistics cells that compute simple
// statistics (min, max, sum, count) and scalable histograms in place.
//
// Each cell owns a RAM of DEPTH words with one read and one write port and a
// two-stage read-modify-write datapath:
//   stage 0  the cell's address, mode and value are registered and the RAM
//            word at that address is read;
//   stage 1  the new word is computed from the value and the stored word and
//            written back to the same address.
// A one-entry forwarding path replaces the RAM output by the word written in
// the previous cycle when the address matches, so one row can be updated in
// every cycle. Cells cooperate in two ways, both through the stage-1 words
// of other cells in the same row:
//   * M_MIN looks at the count word of its 4-cell group (local cell 3); a
//     count of zero means the group is still empty and the value is stored;
//   * M_COMPRESS merges adjacent histogram bins: in a group of 2**cmp_log2
//     aligned cells, local cell i takes bin 2i + bin 2i+1 for i below half
//     the group and zero above it, which doubles the bin size of the group.
// M_READ returns the stored word in rd_data one cycle later without a write;
// rd_data always shows every cell's stage-1 word.
// The cell operations, the per-cell addresses and modes and the forwarding
// follow the document; the mode encoding, the empty-min rule and the widths
// are this design's choices.
module statistics_storage
  import tam_pkg::*;
#(
  parameter int NCELLS = 64,
  parameter int DEPTH  = 256,
  parameter int DW     = DATA_W
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic       [NCELLS-1:0][ROW_W-1:0]    addr,
  input  cell_mode_e [NCELLS-1:0]               mode,
  input  logic       [VALUE_W-1:0]              value,
  input  logic       [2:0]                      cmp_log2,
  output logic       [NCELLS-1:0][DW-1:0]       rd_data,
  output logic                                  rd_valid
);

  localparam int AW = $clog2(DEPTH);
  localparam int LN = $clog2(NCELLS);

  // Stage-1 registers and forwarding state per cell.
  logic       [NCELLS-1:0][ROW_W-1:0] addr_q;
  cell_mode_e [NCELLS-1:0]            mode_q;
  logic       [VALUE_W-1:0]           value_q;
  logic       [2:0]                   cmp_q;
  logic       [NCELLS-1:0][DW-1:0]    ram_q;
  logic       [NCELLS-1:0]            fwd_v;
  logic       [NCELLS-1:0][ROW_W-1:0] fwd_addr;
  logic       [NCELLS-1:0][DW-1:0]    fwd_data;
  logic       [NCELLS-1:0][DW-1:0]    cur;     // stored word seen by stage 1
  logic       [NCELLS-1:0][DW-1:0]    nxt;     // word to write back
  logic       [NCELLS-1:0]            we;

  always_ff @(posedge clk) begin
    value_q <= value;
    cmp_q   <= cmp_log2;
  end

  for (genvar c = 0; c < NCELLS; c++) begin : g_cell
    logic [DW-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      addr_q[c] <= addr[c];
      ram_q[c]  <= mem[addr[c][AW-1:0]];
      if (we[c]) mem[addr_q[c][AW-1:0]] <= nxt[c];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mode_q[c] <= M_NOP;
        fwd_v[c]  <= 1'b0;
      end else begin
        mode_q[c] <= mode[c];
        fwd_v[c]  <= we[c];
      end
    end

    always_ff @(posedge clk) begin
      fwd_addr[c] <= addr_q[c];
      fwd_data[c] <= nxt[c];
    end

    assign cur[c] = (fwd_v[c] && fwd_addr[c] == addr_q[c]) ? fwd_data[c] : ram_q[c];

    // Sum of the two bins this cell receives in a compression, for every
    // power-of-two group size 2**k; cmp_q selects one.
    logic [LN:0][DW-1:0] cand;
    assign cand[0] = '0;
    for (genvar k = 1; k <= LN; k++) begin : g_grp
      localparam int GSZ  = 1 << k;
      localparam int BASE = c - (c % GSZ);
      localparam int LOC  = c - BASE;
      if (LOC < GSZ / 2) begin : g_lo
        assign cand[k] = cur[BASE + 2*LOC] + cur[BASE + 2*LOC + 1];
      end else begin : g_hi
        assign cand[k] = '0;
      end
    end
    wire [DW-1:0] pair_sum = (int'(cmp_q) <= LN) ? cand[cmp_q] : '0;

    localparam int CNT_CELL = (c | 3) < NCELLS ? (c | 3) : NCELLS - 1;
    wire           grp_empty = (cur[CNT_CELL] == '0);
    wire [DW-1:0]  val_ext   = DW'(value_q);

    always_comb begin
      we[c]  = 1'b1;
      nxt[c] = cur[c];
      case (mode_q[c])
        M_CLEAR:    nxt[c] = val_ext;
        M_MIN:      nxt[c] = (grp_empty || val_ext < cur[c]) ? val_ext : cur[c];
        M_MAX:      nxt[c] = (val_ext > cur[c]) ? val_ext : cur[c];
        M_SUM:      nxt[c] = cur[c] + val_ext;
        M_COUNT:    nxt[c] = cur[c] + 1'b1;
        M_COMPRESS: nxt[c] = pair_sum;
        default:    we[c]  = 1'b0;   // M_NOP, M_READ
      endcase
    end
  end

  assign rd_data = cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= (mode[0] == M_READ);
  end

endmodule
