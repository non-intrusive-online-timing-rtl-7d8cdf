// timing_analysis_module: online, non-intrusive timing statistics of a
// running program from its stream of waypoint edge events (WPEs).
//
// Structure (as in the document):
//   WPE ──► NUM_AUT loop/function automata ─┬─► edge forwarding tree ──► simple
//           (one per analysed loop or       │   statistics controller ──► edge
//            function, each with its own    │   runtime statistics storage
//            rewritable transition lookup)  └─► round-robin poll tree ──►
//                                               measurement FIFO ──► simple &
//                                               scalable histogram controller
//                                               ──► function runtime / loop
//                                               iteration statistics storage
//   Both storages are reached by the host through the remote storage access
//   handler.
// Every WPE is broadcast to all automata, one per cycle. Context-sensitive
// edge runtimes come only from the innermost automaton and are forwarded
// without buffering; runtime and iteration records may appear in several
// automata at once and are buffered and polled. The histogram controller
// stalls one cycle per histogram compression, which the FIFO absorbs.
//
// Meta-configuration: cfg_we with cfg_aut selects one automaton, or all of
// them with cfg_bcast; cfg_addr/cfg_data are described in lf_automaton.
// Host access: host_mode and the req_*/resp_* handshake of
// storage_access_handler. Status: FIFO level, high-water mark and overflow,
// lost automaton records, edge record collisions, and 'busy' while records
// are still in flight.
//
// Default sizes follow the document's evaluation (240 automata for 68 loops
// and 172 functions, 64-bin histograms); the 16-entry FIFO, the 4-cell edge
// storage with 1024 rows and all field widths are this design's choices.
module timing_analysis_module
  import tam_pkg::*;
#(
  parameter int NUM_AUT      = 240,
  parameter int LOOKUP_DEPTH = 2**EDGE_W,
  parameter int H_CELLS      = 64,
  parameter int H_DEPTH      = 256,
  parameter int E_CELLS      = 4,
  parameter int E_DEPTH      = 1024,
  parameter int FIFO_DEPTH   = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // waypoint edge events from the WPG path execution unit
  input  logic                          wpe_valid,
  input  wpe_t                          wpe,
  // meta-configuration
  input  logic                          cfg_we,
  input  logic                          cfg_bcast,
  input  logic [$clog2(NUM_AUT+1)-1:0]  cfg_aut,
  input  logic [EDGE_W:0]               cfg_addr,
  input  logic [CFG_W-1:0]              cfg_data,
  // host access
  input  logic                          host_mode,
  input  logic                          req_valid,
  output logic                          req_ready,
  input  logic [1:0]                    req_op,
  input  logic                          req_sel,
  input  logic [ROW_W-1:0]              req_row,
  input  logic [6:0]                    req_cell,
  output logic                          resp_valid,
  output logic [DATA_W-1:0]             resp_data,
  // status
  output logic [$clog2(FIFO_DEPTH):0]   fifo_level,
  output logic [$clog2(FIFO_DEPTH):0]   fifo_max_level,
  output logic                          fifo_overflow,
  output logic                          buf_overflow,
  output logic                          edge_collision,
  output logic                          compress,
  output logic                          hist_inc,
  output logic                          busy
);

  // ---------------- automata cluster ----------------
  logic      [NUM_AUT-1:0] a_edge_v, a_meas_v, a_pop, a_ovf;
  edge_rec_t [NUM_AUT-1:0] a_edge;
  meas_t     [NUM_AUT-1:0] a_meas;

  for (genvar i = 0; i < NUM_AUT; i++) begin : g_aut
    lf_automaton #(.LOOKUP_DEPTH(LOOKUP_DEPTH)) u_aut (
      .clk, .rst_n,
      .wpe_valid,
      .wpe,
      .cfg_we       (cfg_we && (cfg_bcast || int'(cfg_aut) == i)),
      .cfg_addr,
      .cfg_data,
      .edge_valid   (a_edge_v[i]),
      .edge_rec     (a_edge[i]),
      .meas_valid   (a_meas_v[i]),
      .meas         (a_meas[i]),
      .meas_pop     (a_pop[i]),
      .buf_overflow (a_ovf[i])
    );
  end
  assign buf_overflow = |a_ovf;

  // ---------------- edge runtime path ----------------
  logic      f_edge_v;
  edge_rec_t f_edge;

  edge_forwarding_tree #(.N(NUM_AUT)) u_fwd (
    .clk, .rst_n,
    .in_valid  (a_edge_v),
    .in_rec    (a_edge),
    .out_valid (f_edge_v),
    .out_rec   (f_edge),
    .collision (edge_collision)
  );

  logic       [E_CELLS-1:0][ROW_W-1:0] ec_addr, e_addr;
  cell_mode_e [E_CELLS-1:0]            ec_mode, e_mode;
  logic       [VALUE_W-1:0]            ec_value, e_value;
  logic       [E_CELLS-1:0][DATA_W-1:0] e_rd;
  logic                                e_rd_valid;

  edge_stats_controller #(.NCELLS(E_CELLS)) u_ectl (
    .in_valid (f_edge_v),
    .in_rec   (f_edge),
    .addr     (ec_addr),
    .mode     (ec_mode),
    .value    (ec_value)
  );

  // ---------------- runtime / iteration path ----------------
  logic  p_valid, p_ready;
  meas_t p_rec;

  poll_tree #(.N(NUM_AUT)) u_poll (
    .clk, .rst_n,
    .req       (a_meas_v),
    .rec       (a_meas),
    .pop       (a_pop),
    .out_valid (p_valid),
    .out_rec   (p_rec),
    .out_ready (p_ready)
  );

  logic  q_full, q_empty, q_pop;
  meas_t q_rec;

  measurement_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push      (p_valid),
    .din       (p_rec),
    .full      (q_full),
    .pop       (q_pop),
    .empty     (q_empty),
    .dout      (q_rec),
    .level     (fifo_level),
    .max_level (fifo_max_level),
    .overflow  (fifo_overflow)
  );
  // The poll tree always hands its record to the FIFO; a full FIFO drops it
  // and flags an overflow, which the document treats as a failed analysis.
  assign p_ready = 1'b1;

  logic       [H_CELLS-1:0][ROW_W-1:0]  hc_addr, h_addr;
  cell_mode_e [H_CELLS-1:0]             hc_mode, h_mode;
  logic       [VALUE_W-1:0]             hc_value, h_value;
  logic       [2:0]                     hc_cmp, h_cmp;
  logic       [H_CELLS-1:0][DATA_W-1:0] h_rd;
  logic                                 h_rd_valid;
  logic                                 hc_ready, lvl_clear;
  logic       [ROW_W-1:0]               lvl_row;
  logic       [GRP_W-1:0]               lvl_grp;
  logic       [ROW_W-1:0]               lvl_clr_row;
  logic       [LVL_W-1:0]               lvl_data;
  wire                                  hc_valid = !q_empty && !host_mode;

  hist_stats_controller #(.BINS(H_CELLS), .DEPTH(H_DEPTH)) u_hctl (
    .clk,
    .in_valid    (hc_valid),
    .in_rec      (q_rec),
    .in_ready    (hc_ready),
    .addr        (hc_addr),
    .mode        (hc_mode),
    .value       (hc_value),
    .cmp_log2    (hc_cmp),
    .compress,
    .hist_inc,
    .lvl_clear,
    .lvl_clear_row (lvl_clr_row),
    .lvl_rd_row  (lvl_row),
    .lvl_rd_grp  (lvl_grp),
    .lvl_rd_data (lvl_data)
  );
  assign q_pop = hc_valid && hc_ready;

  // ---------------- host access and storages ----------------
  storage_access_handler #(
    .H_CELLS(H_CELLS), .H_DEPTH(H_DEPTH), .E_CELLS(E_CELLS), .E_DEPTH(E_DEPTH), .DW(DATA_W)
  ) u_host (
    .clk, .rst_n, .host_mode,
    .req_valid, .req_ready, .req_op, .req_sel, .req_row, .req_cell,
    .resp_valid, .resp_data,
    .h_addr_i (hc_addr), .h_mode_i (hc_mode), .h_value_i (hc_value), .h_cmp_i (hc_cmp),
    .e_addr_i (ec_addr), .e_mode_i (ec_mode), .e_value_i (ec_value),
    .h_addr_o (h_addr),  .h_mode_o (h_mode),  .h_value_o (h_value),  .h_cmp_o (h_cmp),
    .e_addr_o (e_addr),  .e_mode_o (e_mode),  .e_value_o (e_value),
    .h_rd_data (h_rd), .e_rd_data (e_rd),
    .lvl_rd_row (lvl_row), .lvl_rd_grp (lvl_grp), .lvl_rd_data (lvl_data), .lvl_clear,
    .lvl_clear_row (lvl_clr_row)
  );

  statistics_storage #(.NCELLS(H_CELLS), .DEPTH(H_DEPTH), .DW(DATA_W)) u_hstore (
    .clk, .rst_n,
    .addr     (h_addr),
    .mode     (h_mode),
    .value    (h_value),
    .cmp_log2 (h_cmp),
    .rd_data  (h_rd),
    .rd_valid (h_rd_valid)
  );

  statistics_storage #(.NCELLS(E_CELLS), .DEPTH(E_DEPTH), .DW(DATA_W)) u_estore (
    .clk, .rst_n,
    .addr     (e_addr),
    .mode     (e_mode),
    .value    (e_value),
    .cmp_log2 (3'd2),
    .rd_data  (e_rd),
    .rd_valid (e_rd_valid)
  );

  assign busy = (|a_meas_v) || p_valid || !q_empty || f_edge_v;

endmodule
