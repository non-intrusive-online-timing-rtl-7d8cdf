// tam_pkg: types and field widths shared by the timing analysis module.
//
// A waypoint edge event (WPE) carries the ID of the executed edge of the
// waypoint graph and the number of clock cycles since the previous WPE; both
// fields follow the document, their widths are this design's choice. Each
// loop/function automaton maps edge IDs to transition events through a
// lookup entry, emits context-sensitive edge records and runtime/iteration
// measurement records, and the storage controllers turn those into per-cell
// modes of the statistics storages.
package tam_pkg;

  localparam int EDGE_W  = 12;  // WPG edge ID width (4096 edges)
  localparam int VALUE_W = 32;  // cycle counts, runtimes, iteration counts
  localparam int DATA_W  = 48;  // width of a statistics word (sums)
  localparam int ROW_W   = 10;  // row address inside a statistics storage
  localparam int GRP_W   = 4;   // index of a 4-cell simple-statistics group
  localparam int SLOT_W  = 8;   // edge statistic slot inside an automaton
  localparam int LVL_W   = 6;   // histogram compression level
  localparam int CFG_W   = 32;  // meta-configuration data word

  typedef struct packed {
    logic [EDGE_W-1:0]  edge_id;
    logic [VALUE_W-1:0] cycles;
  } wpe_t;

  // Transition events of one WPG edge for one automaton.
  typedef struct packed {
    logic              enter;        // edge enters the loop/function
    logic              leave;        // edge leaves it
    logic              back;         // loop back edge: a new iteration starts
    logic              child_enter;  // edge enters a directly nested loop/function
    logic              child_exit;   // edge returns from it
    logic              edge_stat;    // record this edge's runtime when innermost
    logic [SLOT_W-1:0] slot;         // edge statistic slot
  } lookup_entry_t;
  localparam int LK_W = $bits(lookup_entry_t);

  typedef enum logic { K_SIMPLE = 1'b0, K_HIST = 1'b1 } stat_kind_e;

  // Statistics type configuration: what to build and where to put it.
  // K_SIMPLE: min/max/sum/count in cells 4*group .. 4*group+3 of 'row'.
  // K_HIST:   2**hbins bins (hbins = 0: the whole row) starting at cell
  //           4*group rounded down to a multiple of the histogram size.
  typedef struct packed {
    logic              en;
    stat_kind_e        kind;
    logic [ROW_W-1:0]  row;
    logic [GRP_W-1:0]  group;
    logic [2:0]        hbins;
  } stat_cfg_t;

  typedef struct packed {
    logic              en;
    logic [ROW_W-1:0]  base;   // first row of this automaton's edge statistics
  } edge_cfg_t;

  // Function runtime or loop iteration measurement.
  typedef struct packed {
    stat_kind_e         kind;
    logic [ROW_W-1:0]   row;
    logic [GRP_W-1:0]   group;
    logic [2:0]         hbins;
    logic [VALUE_W-1:0] value;
  } meas_t;

  // Context-sensitive edge runtime.
  typedef struct packed {
    logic [ROW_W-1:0]   base;
    logic [SLOT_W-1:0]  slot;
    logic               further;  // 0: first iteration of the innermost loop, 1: later ones
    logic [VALUE_W-1:0] value;
  } edge_rec_t;

  // Operation of one statistics cell.
  typedef enum logic [2:0] {
    M_NOP      = 3'd0,
    M_CLEAR    = 3'd1,  // write the value bus
    M_MIN      = 3'd2,
    M_MAX      = 3'd3,
    M_SUM      = 3'd4,
    M_COUNT    = 3'd5,  // +1 (also a histogram bin increment)
    M_COMPRESS = 3'd6,  // merge adjacent bins of the cell's group
    M_READ     = 3'd7   // host read, no write
  } cell_mode_e;

  // Meta-configuration register numbers (cfg_addr[EDGE_W] = 1).
  localparam logic [1:0] CFG_FUNC  = 2'd0;
  localparam logic [1:0] CFG_ITER  = 2'd1;
  localparam logic [1:0] CFG_EDGE  = 2'd2;
  localparam logic [1:0] CFG_RESET = 2'd3;

endpackage
