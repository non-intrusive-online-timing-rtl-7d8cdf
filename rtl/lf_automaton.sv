// lf_automaton: analyses one loop or one function of the application.
//
// Every WPE of the program is looked up in the automaton's own transition
// lookup. The resulting events drive three FSMs, as in the document's
// automaton structure:
//   * the function runtime FSM (IDLE/RUN) sums the cycle fields of all WPEs
//     from the entry edge (exclusive) up to the leaving edge (inclusive) and
//     emits the sum as a runtime measurement;
//   * the loop iterations FSM (IDLE/COUNT) starts at 1 on entry, counts back
//     edges and emits the count when the loop is left;
//   * the loop context FSM (OUT/INNER/CHILD) knows whether this automaton is
//     the innermost active loop or function and whether the innermost loop is
//     still in its first iteration. An edge marked edge_stat that arrives
//     while the automaton is innermost is emitted as a context-sensitive edge
//     runtime record (context = "further iterations" after the first back
//     edge).
// Three configuration registers say which statistics to build and where
// (statistics type configuration). Runtime and iteration records wait in a
// two-slot output buffer until the poll tree takes them; a record that finds
// its slot still full is lost and sets buf_overflow.
//
// Meta-configuration: cfg_addr[EDGE_W] = 0 writes lookup entry
// cfg_addr[EDGE_W-1:0]; = 1 writes register cfg_addr[1:0] (CFG_FUNC,
// CFG_ITER, CFG_EDGE, or CFG_RESET which returns all FSMs to idle).
//
// Timing: a WPE at cycle t is looked up at t, updates the FSMs at t+1 and its
// records are visible at the outputs from t+2. One WPE per cycle is accepted.
// The event set, the runtime convention and the buffer depth are this
// design's choices; recursion (entry while running) is ignored.
module lf_automaton
  import tam_pkg::*;
#(
  parameter int LOOKUP_DEPTH = 2**EDGE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wpe_valid,
  input  wpe_t              wpe,
  input  logic              cfg_we,
  input  logic [EDGE_W:0]   cfg_addr,
  input  logic [CFG_W-1:0]  cfg_data,
  output logic              edge_valid,
  output edge_rec_t         edge_rec,
  output logic              meas_valid,
  output meas_t             meas,
  input  logic              meas_pop,
  output logic              buf_overflow
);

  typedef enum logic { RT_IDLE, RT_RUN } rt_state_e;
  typedef enum logic { IT_IDLE, IT_COUNT } it_state_e;
  typedef enum logic [1:0] { CTX_OUT, CTX_INNER, CTX_CHILD } ctx_state_e;

  // ---------------- configuration ----------------
  stat_cfg_t func_cfg, iter_cfg;
  edge_cfg_t edge_cfg;
  logic      fsm_reset;

  wire cfg_reg = cfg_we &  cfg_addr[EDGE_W];
  wire cfg_lk  = cfg_we & ~cfg_addr[EDGE_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      func_cfg <= '0;
      iter_cfg <= '0;
      edge_cfg <= '0;
    end else if (cfg_reg) begin
      case (cfg_addr[1:0])
        CFG_FUNC: func_cfg <= cfg_data[$bits(stat_cfg_t)-1:0];
        CFG_ITER: iter_cfg <= cfg_data[$bits(stat_cfg_t)-1:0];
        CFG_EDGE: edge_cfg <= cfg_data[$bits(edge_cfg_t)-1:0];
        default: ;
      endcase
    end
  end
  assign fsm_reset = cfg_reg && (cfg_addr[1:0] == CFG_RESET);

  // ---------------- transition lookup ----------------
  logic               ev_valid;
  lookup_entry_t      ev;
  logic [VALUE_W-1:0] cyc1;

  transition_lookup #(.DEPTH(LOOKUP_DEPTH)) u_lookup (
    .clk, .rst_n,
    .wpe_valid,
    .edge_id  (wpe.edge_id),
    .cfg_we   (cfg_lk),
    .cfg_addr (cfg_addr[EDGE_W-1:0]),
    .cfg_data (cfg_data[LK_W-1:0]),
    .ev_valid,
    .ev
  );

  always_ff @(posedge clk) if (wpe_valid) cyc1 <= wpe.cycles;

  wire e_enter  = ev_valid & ev.enter;
  wire e_leave  = ev_valid & ev.leave;
  wire e_back   = ev_valid & ev.back;
  wire e_center = ev_valid & ev.child_enter;
  wire e_cexit  = ev_valid & ev.child_exit;
  wire e_stat   = ev_valid & ev.edge_stat;

  // ---------------- function runtime FSM ----------------
  rt_state_e          rt_state;
  logic [VALUE_W-1:0] rt_acc;
  logic               rt_emit;
  logic [VALUE_W-1:0] rt_value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_state <= RT_IDLE;
      rt_acc   <= '0;
    end else if (fsm_reset) begin
      rt_state <= RT_IDLE;
    end else begin
      case (rt_state)
        RT_IDLE: if (e_enter) begin
          rt_state <= RT_RUN;
          rt_acc   <= '0;
        end
        RT_RUN: if (ev_valid) begin
          rt_acc <= rt_acc + cyc1;
          if (e_leave) rt_state <= RT_IDLE;
        end
        default: rt_state <= RT_IDLE;
      endcase
    end
  end
  assign rt_emit  = (rt_state == RT_RUN) && e_leave && func_cfg.en && !fsm_reset;
  assign rt_value = rt_acc + cyc1;

  // ---------------- loop iterations FSM ----------------
  it_state_e          it_state;
  logic [VALUE_W-1:0] it_cnt;
  logic               it_emit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      it_state <= IT_IDLE;
      it_cnt   <= '0;
    end else if (fsm_reset) begin
      it_state <= IT_IDLE;
    end else begin
      case (it_state)
        IT_IDLE: if (e_enter) begin
          it_state <= IT_COUNT;
          it_cnt   <= VALUE_W'(1);
        end
        IT_COUNT: begin
          if (e_back) it_cnt <= it_cnt + 1'b1;
          if (e_leave) it_state <= IT_IDLE;
        end
        default: it_state <= IT_IDLE;
      endcase
    end
  end
  assign it_emit = (it_state == IT_COUNT) && e_leave && iter_cfg.en && !fsm_reset;

  // ---------------- loop context FSM ----------------
  ctx_state_e ctx_state;
  logic       further;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx_state <= CTX_OUT;
      further   <= 1'b0;
    end else if (fsm_reset) begin
      ctx_state <= CTX_OUT;
      further   <= 1'b0;
    end else begin
      case (ctx_state)
        CTX_OUT: if (e_enter) begin
          ctx_state <= CTX_INNER;
          further   <= 1'b0;
        end
        CTX_INNER: begin
          if (e_back) further <= 1'b1;
          if (e_leave)       ctx_state <= CTX_OUT;
          else if (e_center) ctx_state <= CTX_CHILD;
        end
        CTX_CHILD: begin
          if (e_leave)      ctx_state <= CTX_OUT;
          else if (e_cexit) ctx_state <= CTX_INNER;
        end
        default: ctx_state <= CTX_OUT;
      endcase
    end
  end

  // Context-sensitive edge runtime output (simple forwarding, no buffer).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      edge_valid <= 1'b0;
      edge_rec   <= '0;
    end else begin
      edge_valid <= e_stat && (ctx_state == CTX_INNER) && edge_cfg.en && !fsm_reset;
      edge_rec   <= '{base: edge_cfg.base, slot: ev.slot, further: further, value: cyc1};
    end
  end

  // ---------------- output buffer ----------------
  // Slot 0 holds runtime records, slot 1 iteration records; slot 0 is
  // offered first.
  logic  s0_v, s1_v;
  meas_t s0, s1;

  wire pop0 = meas_pop &  s0_v;
  wire pop1 = meas_pop & ~s0_v & s1_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_v         <= 1'b0;
      s1_v         <= 1'b0;
      s0           <= '0;
      s1           <= '0;
      buf_overflow <= 1'b0;
    end else begin
      if (pop0) s0_v <= 1'b0;
      if (pop1) s1_v <= 1'b0;
      if (rt_emit) begin
        if (s0_v && !pop0) buf_overflow <= 1'b1;
        else begin
          s0_v <= 1'b1;
          s0   <= '{kind: func_cfg.kind, row: func_cfg.row, group: func_cfg.group,
                   hbins: func_cfg.hbins, value: rt_value};
        end
      end
      if (it_emit) begin
        if (s1_v && !pop1) buf_overflow <= 1'b1;
        else begin
          s1_v <= 1'b1;
          s1   <= '{kind: iter_cfg.kind, row: iter_cfg.row, group: iter_cfg.group,
                   hbins: iter_cfg.hbins, value: it_cnt};
        end
      end
    end
  end

  assign meas_valid = s0_v | s1_v;
  assign meas       = s0_v ? s0 : s1;

endmodule
