// Workload testbench at full size: the shape of the reference benchmark
// analysis, with 172 functions and 68 loops, one automaton each, and 240 scalable
// histograms of 64 expb. Function f (f < 68) contains loop f. Function
// runtimes go to histogram rows 0..171, loop iteration counts to rows
// 172..239. A synthetic call sequence with mostly short and occasionally very
// long runtimes forces compressions; every bin and level of all 240
// histograms is read back through the host port and compared with a model.
// The FIFO high-water mark is reported, like the buffer-utilisation
// measurement of the original evaluation.
module tb_workload_240_histograms;
  import tam_pkg::*;
  localparam int NA = 240, HC = 64, FD = 16, NF = 172, NL = 68;
  localparam int CALLS = 2500;

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

  timing_analysis_module dut (.*);

  int n_compress = 0, n_wpe = 0;
  always @(posedge clk) if (rst_n) begin
    if (compress) n_compress++;
    if (wpe_valid) n_wpe++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg(input bit bc, input int aut, input logic [EDGE_W:0] a, input logic [CFG_W-1:0] d);
    cfg_we = 1; cfg_bcast = bc; cfg_aut = ($clog2(NA+1))'(aut); cfg_addr = a; cfg_data = d;
    @(posedge clk); #1;
    cfg_we = 0; cfg_bcast = 0;
  endtask
  task automatic lk(input int aut, input int e, input lookup_entry_t v);
    cfg(1'b0, aut, {1'b0, EDGE_W'(e)}, CFG_W'(v));
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
  endtask

  // edge numbering
  function automatic int f_enter(input int f); return 1 + 3*f; endfunction
  function automatic int f_body (input int f); return 2 + 3*f; endfunction
  function automatic int f_leave(input int f); return 3 + 3*f; endfunction
  function automatic int l_enter(input int j); return 600 + 3*j; endfunction
  function automatic int l_back (input int j); return 601 + 3*j; endfunction
  function automatic int l_leave(input int j); return 602 + 3*j; endfunction
  localparam int N_EDGES = 1024;

  longint hvals [NA][$];

  task automatic wp(input int e, input int c);
    wpe_valid = 1; wpe = '{edge_id: EDGE_W'(e), cycles: VALUE_W'(c)};
    @(posedge clk); #1;
    wpe_valid = 0;
  endtask

  function automatic int cyc_rand(input int k);
    int r;
    r = $urandom_range(99);
    if (r == 0) return $urandom_range(1, 1 << (8 + (k * 12) / CALLS));
    return $urandom_range(1, 30);
  endfunction

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] d;
    stat_cfg_t sc;
    int lvl [NA];
    longint mx;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int e = 0; e < N_EDGES; e++) cfg(1'b1, 0, {1'b0, EDGE_W'(e)}, '0);
    cfg(1'b1, 0, {1'b1, EDGE_W'(CFG_RESET)}, '0);
    for (int f = 0; f < NF; f++) begin
      lk(f, f_enter(f), '{enter: 1, default: '0});
      lk(f, f_leave(f), '{leave: 1, default: '0});
      if (f < NL) begin
        lk(f, l_enter(f), '{child_enter: 1, default: '0});
        lk(f, l_leave(f), '{child_exit: 1, default: '0});
      end
      sc = '{en: 1, kind: K_HIST, row: ROW_W'(f), group: '0, hbins: 3'd0};
      cfg(1'b0, f, {1'b1, EDGE_W'(CFG_FUNC)}, CFG_W'(sc));
    end
    for (int j = 0; j < NL; j++) begin
      lk(NF + j, l_enter(j), '{enter: 1, default: '0});
      lk(NF + j, l_back(j),  '{back: 1, default: '0});
      lk(NF + j, l_leave(j), '{leave: 1, default: '0});
      sc = '{en: 1, kind: K_HIST, row: ROW_W'(NF + j), group: '0, hbins: 3'd0};
      cfg(1'b0, NF + j, {1'b1, EDGE_W'(CFG_ITER)}, CFG_W'(sc));
    end
    host_mode = 1;
    host_cmd(2'd2, 1'b1, 0, 0, d);
    host_mode = 0;

    for (int k = 0; k < CALLS; k++) begin
      int f, c, rt;
      f = $urandom_range(NF - 1);
      wp(f_enter(f), cyc_rand(k));
      rt = 0;
      repeat ($urandom_range(0, 2)) begin c = cyc_rand(k); rt += c; wp(f_body(f), c); end
      if (f < NL) begin
        int it;
        it = ($urandom_range(9) == 0) ? $urandom_range(1, 200) : $urandom_range(1, 8);
        c = cyc_rand(k); rt += c; wp(l_enter(f), c);
        for (int i = 1; i < it; i++) begin c = cyc_rand(k); rt += c; wp(l_back(f), c); end
        c = cyc_rand(k); rt += c; wp(l_leave(f), c);
        hvals[NF + f].push_back(it);
        c = cyc_rand(k); rt += c; wp(f_body(f), c);
      end
      c = cyc_rand(k); rt += c; wp(f_leave(f), c);
      hvals[f].push_back(rt);
    end
    while (busy) begin @(posedge clk); #1; end
    repeat (4) @(posedge clk); #1;
    chk(!fifo_overflow && !buf_overflow && !edge_collision, "no overflow during the analysis");

    host_mode = 1;
    for (int h = 0; h < NA; h++) begin
      longint expb [HC];
      mx = 0; lvl[h] = 0;
      foreach (hvals[h][i]) if (hvals[h][i] > mx) mx = hvals[h][i];
      while ((mx >> lvl[h]) >= HC) lvl[h]++;
      for (int b = 0; b < HC; b++) expb[b] = 0;
      foreach (hvals[h][i]) expb[hvals[h][i] >> lvl[h]]++;
      host_cmd(2'd1, 1'b1, h, 0, d);
      chk(int'(d) == lvl[h], $sformatf("histogram %0d level %0d want %0d", h, d, lvl[h]));
      for (int b = 0; b < HC; b++) begin
        host_cmd(2'd0, 1'b1, h, b, d);
        chk(d == DATA_W'(expb[b]), $sformatf("histogram %0d bin %0d: %0d want %0d", h, b, d, expb[b]));
      end
    end
    $display("workload: %0d WPEs, %0d calls, %0d compressions, FIFO high-water mark %0d of %0d",
             n_wpe, CALLS, n_compress, fifo_max_level, FD);
    chk(n_compress > 0, "compressions happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
