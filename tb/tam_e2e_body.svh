// Shared body of the end-to-end testbenches of timing_analysis_module.
// The including module defines NA, HC, HD, EC, ED, FD (the top's sizes) and
// instantiates the top as 'dut' with the signals declared here. It also
// defines tb_done(), which prints the result line and ends the simulation.
//
// Test program (edge IDs): function F contains a loop L, a call of function H
// and plain code; the body of L calls function G in some iterations. L is
// either left into F's code (edge 13) or by F's return directly (edge 9), in
// which case two automata finish in the same cycle.
//   aut 0 = F: runtime -> histogram row 0, edge stats of edge 2 at row 16
//   aut 1 = L: runtime -> histogram row 1, iterations -> simple row 4 grp 0,
//               edge stats of edges 4 (slot 0) and 5 (slot 1) at rows 0..3
//   aut 2 = G: runtime -> simple row 3 grp 0, edge stats of edge 7 at row 8
//   aut 3 = H: runtime -> 4-bin histogram in row 3 cells 4..7 (sharing the
//               row with G's statistics), edge stats of edge 11 at row 24
// A software model of the same program gives the expected histograms,
// compression levels and statistics, which are read back through the host
// interface. The mechanisms counted: histogram compressions, FIFO buffering,
// simultaneous records, first/further iteration contexts, nested-call
// suppression, host clear/read/level read; finally an overflow of the FIFO
// is provoked while the host holds the storage.

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                         wpe_valid = 0;
  wpe_t                         wpe = '0;
  logic                         cfg_we = 0, cfg_bcast = 0;
  logic [$clog2(NA+1)-1:0]      cfg_aut = '0;
  logic [EDGE_W:0]              cfg_addr = '0;
  logic [CFG_W-1:0]             cfg_data = '0;
  logic                         host_mode = 0, req_valid = 0, req_ready, req_sel = 0, resp_valid;
  logic [1:0]                   req_op = '0;
  logic [ROW_W-1:0]             req_row = '0;
  logic [6:0]                   req_cell = '0;
  logic [DATA_W-1:0]            resp_data;
  logic [$clog2(FD):0]          fifo_level, fifo_max_level;
  logic                         fifo_overflow, buf_overflow, edge_collision, compress, hist_inc, busy;

  // ---------------- mechanism counters ----------------
  int n_compress = 0, n_hist_inc = 0, n_fifo_wait = 0, n_multi = 0, n_further = 0, n_first = 0;
  int n_nested = 0, n_clear = 0, n_read = 0, n_level = 0, n_bcast = 0, n_wpe = 0;
  always @(posedge clk) if (rst_n) begin
    if (compress) n_compress++;
    if (hist_inc) n_hist_inc++;
    if (fifo_level > 1) n_fifo_wait++;
    if ($countones(dut.a_meas_v) > 1) n_multi++;
    if (dut.f_edge_v && !host_mode) begin
      if (dut.f_edge.further) n_further++; else n_first++;
    end
    if (wpe_valid) n_wpe++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- stimulus helpers (drive 1 time unit after the edge) ----------------
  task automatic cfg(input bit bc, input int aut, input logic [EDGE_W:0] a, input logic [CFG_W-1:0] d);
    cfg_we = 1; cfg_bcast = bc; cfg_aut = ($clog2(NA+1))'(aut); cfg_addr = a; cfg_data = d;
    @(posedge clk); #1;
    cfg_we = 0; cfg_bcast = 0;
  endtask
  task automatic lk(input int aut, input int e, input lookup_entry_t v);
    cfg(1'b0, aut, {1'b0, EDGE_W'(e)}, CFG_W'(v));
  endtask
  task automatic reg_w(input int aut, input logic [1:0] r, input logic [CFG_W-1:0] d);
    cfg(1'b0, aut, {1'b1, EDGE_W'(r)}, d);
  endtask

  task automatic host_cmd(input logic [1:0] op, input logic sel, input int row, input int cel,
                          output logic [DATA_W-1:0] data);
    req_valid = 1; req_op = op; req_sel = sel; req_row = ROW_W'(row); req_cell = 7'(cel);
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    req_valid = 0;
    data = '0;
    if (op != 2'd2) begin
      while (!resp_valid) begin @(posedge clk); #1; end
      data = resp_data;
    end else begin
      while (!req_ready) begin @(posedge clk); #1; end
    end
    case (op) 2'd0: n_read++; 2'd1: n_level++; default: n_clear++; endcase
  endtask

  // ---------------- reference model ----------------
  longint hist [3][HC];
  int     lvl  [3];
  longint smin [2], smax [2], ssum [2], scnt [2];       // L iterations (row 4 grp 0), G runtime (row 3 grp 0)
  longint emin [32], emax [32], esum [32], ecnt [32];   // edge rows
  longint maxv [3];
  longint hvals [3][$];

  // state of the model program
  bit     inF, inL, inG, inH, furtherL;
  longint rtF, rtL, rtG, rtH, itL;

  // histograms: 0 = F (row 0), 1 = L (row 1), 2 = H (4 bins at row 3 cell 4)
  function automatic int nbins(input int h);  return (h == 2) ? 4 : HC; endfunction
  function automatic int hrow(input int h);   return (h == 2) ? 3 : h;  endfunction
  function automatic int hcell0(input int h); return (h == 2) ? 4 : 0;  endfunction

  function automatic void m_hist(input int h, input longint v);
    hvals[h].push_back(v);
  endfunction
  function automatic void m_simple(input int g, input longint v);
    if (scnt[g] == 0 || v < smin[g]) smin[g] = v;
    if (v > smax[g]) smax[g] = v;
    ssum[g] += v; scnt[g]++;
  endfunction
  function automatic void m_edge(input int r, input longint v);
    if (ecnt[r] == 0 || v < emin[r]) emin[r] = v;
    if (v > emax[r]) emax[r] = v;
    esum[r] += v; ecnt[r]++;
  endfunction

  // Send one WPE and update the model.
  task automatic wp(input int e, input int c);
    // edge statistics (decided on the state before the transition)
    if (e == 2 && inF && !inL && !inH) m_edge(16, c);
    if ((e == 4 || e == 5) && inL && !inG) m_edge((e == 4 ? 0 : 2) + (furtherL ? 1 : 0), c);
    if (e == 7 && inG) m_edge(8, c);
    if (e == 11 && inH) m_edge(24, c);
    if (e == 7 && inL) n_nested++;
    // runtimes accumulate while running (entry WPE excluded)
    if (inF) rtF += c;
    if (inL) rtL += c;
    if (inG) rtG += c;
    if (inH) rtH += c;
    case (e)
      1:  begin inF = 1; rtF = 0; end
      3:  begin inL = 1; rtL = 0; itL = 1; furtherL = 0; end
      5:  begin itL++; furtherL = 1; end
      6:  begin inG = 1; rtG = 0; end
      8:  begin inG = 0; m_simple(1, rtG); end
      9:  begin inL = 0; m_hist(1, rtL); m_simple(0, itL); inF = 0; m_hist(0, rtF); end
      10: begin inH = 1; rtH = 0; end
      12: begin inH = 0; m_hist(2, rtH); end
      13: begin inL = 0; m_hist(1, rtL); m_simple(0, itL); end
      14: begin inF = 0; m_hist(0, rtF); end
      default: ;
    endcase
    wpe_valid = 1; wpe = '{edge_id: EDGE_W'(e), cycles: VALUE_W'(c)};
    @(posedge clk); #1;
    wpe_valid = 0;
  endtask

  function automatic int cyc_rand(input int scale);
    return ($urandom_range(19) == 0) ? $urandom_range(1, scale) : $urandom_range(1, 12);
  endfunction

  // One execution of F.
  task automatic run_f(input int scale);
    int nit;
    wp(1, cyc_rand(scale));
    repeat ($urandom_range(0, 2)) wp(2, cyc_rand(scale));
    if ($urandom_range(1)) begin
      wp(10, cyc_rand(scale));
      repeat ($urandom_range(1, 3)) wp(11, cyc_rand(scale * 4));
      wp(12, cyc_rand(scale));
      wp(2, cyc_rand(scale));
    end
    wp(3, cyc_rand(scale));
    nit = $urandom_range(1, 6);
    for (int i = 0; i < nit; i++) begin
      repeat ($urandom_range(1, 2)) wp(4, cyc_rand(scale));
      if ($urandom_range(2) == 0) begin
        wp(6, cyc_rand(scale));
        repeat ($urandom_range(1, 2)) wp(7, cyc_rand(scale));
        wp(8, cyc_rand(scale));
      end
      if (i < nit - 1) wp(5, cyc_rand(scale));
    end
    if ($urandom_range(1)) begin
      wp(9, cyc_rand(scale));
    end else begin
      wp(13, cyc_rand(scale));
      wp(2, cyc_rand(scale));
      wp(14, cyc_rand(scale));
    end
    // sometimes an idle WPE outside F
    if ($urandom_range(3) == 0) wp(0, cyc_rand(scale));
  endtask

  // ---------------- the test ----------------
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    tb_done();
  end

  initial begin
    logic [DATA_W-1:0] d;
    stat_cfg_t sc;
    edge_cfg_t ec;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // ---- meta-configuration ----
    for (int e = 0; e < 16; e++) begin cfg(1'b1, 0, {1'b0, EDGE_W'(e)}, '0); n_bcast++; end
    for (int a = 0; a < 4; a++) reg_w(a, CFG_RESET, '0);
    // F
    lk(0, 1,  '{enter: 1, default: '0});
    lk(0, 2,  '{edge_stat: 1, slot: 8'd0, default: '0});
    lk(0, 3,  '{child_enter: 1, default: '0});
    lk(0, 9,  '{leave: 1, default: '0});
    lk(0, 10, '{child_enter: 1, default: '0});
    lk(0, 12, '{child_exit: 1, default: '0});
    lk(0, 13, '{child_exit: 1, default: '0});
    lk(0, 14, '{leave: 1, default: '0});
    sc = '{en: 1, kind: K_HIST, row: 10'd0, group: '0, hbins: 3'd0};   reg_w(0, CFG_FUNC, CFG_W'(sc));
    ec = '{en: 1, base: 10'd16};                         reg_w(0, CFG_EDGE, CFG_W'(ec));
    // L
    lk(1, 3,  '{enter: 1, default: '0});
    lk(1, 4,  '{edge_stat: 1, slot: 8'd0, default: '0});
    lk(1, 5,  '{back: 1, edge_stat: 1, slot: 8'd1, default: '0});
    lk(1, 6,  '{child_enter: 1, default: '0});
    lk(1, 8,  '{child_exit: 1, default: '0});
    lk(1, 9,  '{leave: 1, default: '0});
    lk(1, 13, '{leave: 1, default: '0});
    sc = '{en: 1, kind: K_HIST, row: 10'd1, group: '0, hbins: 3'd0};   reg_w(1, CFG_FUNC, CFG_W'(sc));
    sc = '{en: 1, kind: K_SIMPLE, row: 10'd4, group: '0, hbins: 3'd0}; reg_w(1, CFG_ITER, CFG_W'(sc));
    ec = '{en: 1, base: 10'd0};                          reg_w(1, CFG_EDGE, CFG_W'(ec));
    // G
    lk(2, 6,  '{enter: 1, default: '0});
    lk(2, 7,  '{edge_stat: 1, slot: 8'd0, default: '0});
    lk(2, 8,  '{leave: 1, default: '0});
    sc = '{en: 1, kind: K_SIMPLE, row: 10'd3, group: 4'd0, hbins: 3'd0}; reg_w(2, CFG_FUNC, CFG_W'(sc));
    ec = '{en: 1, base: 10'd8};                            reg_w(2, CFG_EDGE, CFG_W'(ec));
    // H
    lk(3, 10, '{enter: 1, default: '0});
    lk(3, 11, '{edge_stat: 1, slot: 8'd0, default: '0});
    lk(3, 12, '{leave: 1, default: '0});
    sc = '{en: 1, kind: K_HIST, row: 10'd3, group: 4'd1, hbins: 3'd2}; reg_w(3, CFG_FUNC, CFG_W'(sc));
    ec = '{en: 1, base: 10'd24};                         reg_w(3, CFG_EDGE, CFG_W'(ec));

    // ---- clear both storages ----
    host_mode = 1;
    host_cmd(2'd2, 1'b1, 0, 0, d);
    host_cmd(2'd2, 1'b0, 0, 0, d);
    host_mode = 0;
    for (int h = 0; h < 3; h++) begin lvl[h] = 0; maxv[h] = 0; for (int b = 0; b < HC; b++) hist[h][b] = 0; end
    for (int g = 0; g < 2; g++) begin smin[g] = 0; smax[g] = 0; ssum[g] = 0; scnt[g] = 0; end
    for (int r = 0; r < 32; r++) begin emin[r] = 0; emax[r] = 0; esum[r] = 0; ecnt[r] = 0; end
    inF = 0; inL = 0; inG = 0; inH = 0; furtherL = 0;

    // ---- analysis: growing runtimes force repeated compressions ----
    for (int k = 0; k < RUNS; k++) run_f(8 << (k * 12 / RUNS));
    while (busy) begin @(posedge clk); #1; end
    repeat (4) @(posedge clk); #1;
    chk(!fifo_overflow && !buf_overflow && !edge_collision, "no overflow or collision during analysis");

    // ---- expected histograms: every value ends in bin v >> final level ----
    for (int h = 0; h < 3; h++) begin
      foreach (hvals[h][i]) if (hvals[h][i] > maxv[h]) maxv[h] = hvals[h][i];
      while ((maxv[h] >> lvl[h]) >= nbins(h)) lvl[h]++;
      foreach (hvals[h][i]) hist[h][hvals[h][i] >> lvl[h]]++;
    end

    // ---- read back through the host interface ----
    host_mode = 1;
    for (int h = 0; h < 3; h++) begin
      host_cmd(2'd1, 1'b1, hrow(h), hcell0(h), d);
      chk(int'(d) == lvl[h], $sformatf("histogram %0d level %0d want %0d", h, d, lvl[h]));
      for (int b = 0; b < nbins(h); b++) begin
        host_cmd(2'd0, 1'b1, hrow(h), hcell0(h) + b, d);
        chk(d == DATA_W'(hist[h][b]), $sformatf("histogram %0d bin %0d: %0d want %0d", h, b, d, hist[h][b]));
      end
    end
    for (int g = 0; g < 2; g++) begin
      int r;
      r = (g == 0) ? 4 : 3;
      host_cmd(2'd0, 1'b1, r, 0, d); chk(d == DATA_W'(smin[g]), $sformatf("simple %0d min %0d want %0d", g, d, smin[g]));
      host_cmd(2'd0, 1'b1, r, 1, d); chk(d == DATA_W'(smax[g]), $sformatf("simple %0d max", g));
      host_cmd(2'd0, 1'b1, r, 2, d); chk(d == DATA_W'(ssum[g]), $sformatf("simple %0d sum", g));
      host_cmd(2'd0, 1'b1, r, 3, d); chk(d == DATA_W'(scnt[g]), $sformatf("simple %0d count %0d want %0d", g, d, scnt[g]));
    end
    chk(lvl[2] > 0, "the 4-bin histogram was compressed");
    for (int r = 0; r < 32; r++) begin
      host_cmd(2'd0, 1'b0, r, 3, d); chk(d == DATA_W'(ecnt[r]), $sformatf("edge row %0d count %0d want %0d", r, d, ecnt[r]));
      if (ecnt[r] != 0) begin
        host_cmd(2'd0, 1'b0, r, 0, d); chk(d == DATA_W'(emin[r]), $sformatf("edge row %0d min", r));
        host_cmd(2'd0, 1'b0, r, 1, d); chk(d == DATA_W'(emax[r]), $sformatf("edge row %0d max", r));
        host_cmd(2'd0, 1'b0, r, 2, d); chk(d == DATA_W'(esum[r]), $sformatf("edge row %0d sum", r));
      end
    end

    // ---- mechanisms ----
    $display("mechanisms: wpe=%0d compressions=%0d bin_increments=%0d fifo_waits=%0d fifo_max=%0d simultaneous_records=%0d",
             n_wpe, n_compress, n_hist_inc, n_fifo_wait, fifo_max_level, n_multi);
    $display("            first_ctx=%0d further_ctx=%0d nested_calls=%0d clears=%0d reads=%0d level_reads=%0d broadcasts=%0d",
             n_first, n_further, n_nested, n_clear, n_read, n_level, n_bcast);
    chk(n_compress > 0, "histogram compressions happened");
    chk(n_fifo_wait > 0 && fifo_max_level > 1, "measurement FIFO buffered records");
    chk(n_multi > 0, "several automata held records at once");
    chk(n_first > 0 && n_further > 0, "both iteration contexts recorded");
    chk(n_nested > 0, "nested calls suppressed outer edge records");
    chk(n_clear > 0 && n_read > 0 && n_level > 0 && n_bcast > 0, "host and configuration operations");

    // ---- overflow: the host holds the storage while the program runs ----
    for (int k = 0; k < 4 * FD; k++) run_f(8);
    repeat (4) @(posedge clk); #1;
    chk(fifo_overflow, "FIFO overflow flagged");
    tb_done();
  end
