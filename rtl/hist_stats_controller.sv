// hist_stats_controller: simple statistics and scalable histogram controller
// for the function runtime / loop iteration statistics storage.
//
// A measurement of kind K_SIMPLE updates the 4-cell group 'group' of row 'row'
// with min, max, sum and count in one cycle. A measurement of kind K_HIST
// belongs to a histogram of 2**hbins bins (hbins = 0: all BINS cells of the
// row), one bin per cell, starting at cell 4*group rounded down to a multiple
// of the histogram size; so one row can hold, say, a 2-bin histogram, a 4-bin
// histogram and simple statistics side by side. Every histogram starts with
// bin size 1 and compression level 0. The value goes to bin
// (value >> level). If that bin lies beyond the last bin, the controller
// instead orders a compression of the histogram's cells, in which adjacent
// bins are summed into the lower half and the upper half is cleared, and
// raises the level by one; the measurement stays at the input and is retried
// in the next cycle. A histogram update therefore takes 1 + (number of
// compressions) cycles, as in the document.
//
// Compression levels are kept per histogram, in a RAM with one word per row
// holding one level per 4-cell group (the level of a histogram sits at its
// first group). The RAM is read asynchronously and has no reset: lvl_clear
// zeroes row lvl_clear_row, and the host access handler does so for every
// row while it clears the storage. lvl_rd_row/lvl_rd_grp read one level
// combinationally for the host.
//
// Interface: in_valid/in_ready handshake from the measurement FIFO;
// addr/mode/value/cmp_log2 go straight to the statistics storage.
// 'compress' pulses for every compression cycle, 'hist_inc' for every bin
// increment. The placement rules, the level RAM and its clearing are this
// design's choices.
module hist_stats_controller
  import tam_pkg::*;
#(
  parameter int BINS  = 64,
  parameter int DEPTH = 256
) (
  input  logic                             clk,
  input  logic                             in_valid,
  input  meas_t                            in_rec,
  output logic                             in_ready,
  output logic       [BINS-1:0][ROW_W-1:0] addr,
  output cell_mode_e [BINS-1:0]            mode,
  output logic       [VALUE_W-1:0]         value,
  output logic       [2:0]                 cmp_log2,
  output logic                             compress,
  output logic                             hist_inc,
  input  logic                             lvl_clear,
  input  logic       [ROW_W-1:0]           lvl_clear_row,
  input  logic       [ROW_W-1:0]           lvl_rd_row,
  input  logic       [GRP_W-1:0]           lvl_rd_grp,
  output logic       [LVL_W-1:0]           lvl_rd_data
);

  localparam int BW = $clog2(BINS);
  localparam int AW = $clog2(DEPTH);
  localparam int NG = (BINS >= 4) ? BINS / 4 : 1;   // level slots per row

  typedef logic [NG-1:0][LVL_W-1:0] lvl_row_t;
  lvl_row_t level [DEPTH];

  // Histogram geometry.
  logic [2:0]    h;          // log2 of the number of bins
  logic [BW:0]   nbins;
  logic [BW-1:0] start;      // first cell
  logic [GRP_W-1:0] slot;    // level slot = first group
  always_comb begin
    h = (in_rec.hbins == 3'd0 || int'(in_rec.hbins) > BW) ? 3'(BW) : in_rec.hbins;
    nbins = (BW+1)'(1) << h;
    start = BW'({in_rec.group, 2'b00}) & ~BW'(nbins - 1'b1);
    slot  = GRP_W'(start >> 2);
  end

  lvl_row_t           lrow, lrow_inc;
  logic [LVL_W-1:0]   lvl;
  logic [VALUE_W-1:0] bin_idx;
  logic               fits, is_hist;

  assign lrow    = level[in_rec.row[AW-1:0]];
  assign lvl     = lrow[int'(slot) % NG];
  assign bin_idx = in_rec.value >> lvl;
  assign fits    = (bin_idx < VALUE_W'(nbins));
  assign is_hist = in_valid && (in_rec.kind == K_HIST);

  assign compress    = is_hist && !fits;
  assign hist_inc    = is_hist && fits;
  assign in_ready    = !compress;
  assign value       = in_rec.value;
  assign cmp_log2    = h;

  always_comb begin
    lvl_row_t r;
    r = level[lvl_rd_row[AW-1:0]];
    lvl_rd_data = r[int'(lvl_rd_grp) % NG];
  end

  always_comb begin
    for (int c = 0; c < BINS; c++) begin
      addr[c] = in_rec.row;
      mode[c] = M_NOP;
      if (is_hist) begin
        if (c >= int'(start) && c < int'(start) + int'(nbins)) begin
          if (compress)                               mode[c] = M_COMPRESS;
          else if (int'(bin_idx) == c - int'(start))  mode[c] = M_COUNT;
        end
      end else if (in_valid && (int'(in_rec.group) == c / 4)) begin
        case (c % 4)
          0:       mode[c] = M_MIN;
          1:       mode[c] = M_MAX;
          2:       mode[c] = M_SUM;
          default: mode[c] = M_COUNT;
        endcase
      end
    end
  end

  // Level RAM: one write per cycle, either the host clearing a row or one
  // histogram's level raised.
  always_comb begin
    for (int g = 0; g < NG; g++)
      lrow_inc[g] = (g == int'(slot) % NG) ? lvl + 1'b1 : lrow[g];
  end

  always_ff @(posedge clk) begin
    if (lvl_clear)     level[lvl_clear_row[AW-1:0]] <= '0;
    else if (compress) level[in_rec.row[AW-1:0]]    <= lrow_inc;
  end

endmodule
