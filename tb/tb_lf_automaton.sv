// Testbench for lf_automaton: configures a loop automaton through the
// meta-configuration port and plays a WPE sequence with one nested call. It
// checks the context-sensitive edge records (only while innermost, context
// switching after the first back edge), the runtime and iteration records with
// their configured rows, the two-cycle latency, back-to-back WPEs, the FSM
// reset register and the buffer overflow flag.
module tb_lf_automaton;
  import tam_pkg::*;
  localparam int LD = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wpe_valid = 0, cfg_we = 0, edge_valid, meas_valid, meas_pop = 0, buf_overflow;
  wpe_t wpe = '0;
  logic [EDGE_W:0] cfg_addr = '0;
  logic [CFG_W-1:0] cfg_data = '0;
  edge_rec_t edge_rec;
  meas_t meas;

  lf_automaton #(.LOOKUP_DEPTH(LD)) dut (.*);

  // edge IDs of the test program
  localparam int E_ENTER = 1, E_BACK = 2, E_LEAVE = 3, E_CALL = 4, E_RET = 5, E_BODY = 6, E_OTHER = 7;

  edge_rec_t edge_seen[$];
  meas_t     meas_seen[$];
  int        meas_cycle[$];
  int        cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (edge_valid) edge_seen.push_back(edge_rec);
    if (meas_valid && meas_pop) begin meas_seen.push_back(meas); meas_cycle.push_back(cyc); end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg(input logic [EDGE_W:0] a, input logic [CFG_W-1:0] d);
    cfg_we = 1; cfg_addr = a; cfg_data = d;
    @(posedge clk); #1;
    cfg_we = 1'b0;
  endtask

  task automatic lk(input int e, input lookup_entry_t v);
    cfg({1'b0, EDGE_W'(e)}, CFG_W'(v));
  endtask

  task automatic send(input int e, input int c);
    wpe_valid = 1; wpe = '{edge_id: EDGE_W'(e), cycles: VALUE_W'(c)};
    @(posedge clk); #1;
    wpe_valid = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stat_cfg_t fc, ic;
    edge_cfg_t ec;
    int leave_cycle;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    #1;
    for (int e = 0; e < LD; e++) begin
      lookup_entry_t z;
      z = '0;
      lk(e, z);
    end
    lk(E_ENTER, '{enter: 1, default: '0});
    lk(E_BACK,  '{back: 1, edge_stat: 1, slot: 8'd9, default: '0});
    lk(E_LEAVE, '{leave: 1, default: '0});
    lk(E_CALL,  '{child_enter: 1, default: '0});
    lk(E_RET,   '{child_exit: 1, default: '0});
    lk(E_BODY,  '{edge_stat: 1, slot: 8'd3, default: '0});
    fc = '{en: 1, kind: K_HIST,   row: 10'd17, group: 4'd0, hbins: 3'd0};
    ic = '{en: 1, kind: K_SIMPLE, row: 10'd5,  group: 4'd2, hbins: 3'd0};
    ec = '{en: 1, base: 10'd100};
    cfg({1'b1, EDGE_W'(CFG_FUNC)}, CFG_W'(fc));
    cfg({1'b1, EDGE_W'(CFG_ITER)}, CFG_W'(ic));
    cfg({1'b1, EDGE_W'(CFG_EDGE)}, CFG_W'(ec));

    // Program run 1 (back-to-back WPEs)
    send(E_OTHER, 50);   // outside: ignored
    send(E_BODY, 11);    // outside: no edge record
    send(E_ENTER, 100);  // entry: its cycles are not part of the runtime
    send(E_BODY, 10);    // iteration 1 -> record (3, first, 10)
    send(E_BACK, 20);    // record (9, first, 20), iteration 2 starts
    send(E_BODY, 7);     // record (3, further, 7)
    send(E_CALL, 5);     // into a nested function
    send(E_BODY, 9);     // not innermost: no record
    send(E_OTHER, 1);
    send(E_RET, 3);
    send(E_BODY, 4);     // record (3, further, 4)
    send(E_BACK, 6);     // record (9, further, 6), iteration 3
    leave_cycle = cyc;
    send(E_LEAVE, 2);    // runtime 10+20+7+5+9+1+3+4+6+2 = 67, iterations 3
    chk(!meas_valid, "no record one cycle after the leaving WPE");
    @(posedge clk); #1;
    chk(meas_valid && (cyc - leave_cycle) == 2, "runtime record two cycles after the leaving WPE");
    chk(meas == '{kind: K_HIST, row: 10'd17, group: 4'd0, hbins: 3'd0, value: 32'd67}, $sformatf("runtime record %p", meas));
    meas_pop = 1;
    repeat (3) @(posedge clk); #1;
    meas_pop = 0;
    chk(meas_seen.size() == 2, "two records");
    if (meas_seen.size() == 2)
      chk(meas_seen[1] == '{kind: K_SIMPLE, row: 10'd5, group: 4'd2, hbins: 3'd0, value: 32'd3}, $sformatf("iteration record %p", meas_seen[1]));
    chk(edge_seen.size() == 5, $sformatf("five edge records, got %0d", edge_seen.size()));
    if (edge_seen.size() == 5) begin
      chk(edge_seen[0] == '{base: 10'd100, slot: 8'd3, further: 1'b0, value: 32'd10}, "edge record 0");
      chk(edge_seen[1] == '{base: 10'd100, slot: 8'd9, further: 1'b0, value: 32'd20}, "edge record 1");
      chk(edge_seen[2] == '{base: 10'd100, slot: 8'd3, further: 1'b1, value: 32'd7},  "edge record 2");
      chk(edge_seen[3] == '{base: 10'd100, slot: 8'd3, further: 1'b1, value: 32'd4},  "edge record 3");
      chk(edge_seen[4] == '{base: 10'd100, slot: 8'd9, further: 1'b1, value: 32'd6},  "edge record 4");
    end

    // Run 2: a single-pass loop, context restarts at "first"
    edge_seen.delete(); meas_seen.delete();
    send(E_ENTER, 1);
    send(E_BODY, 33);
    send(E_LEAVE, 8);
    repeat (3) @(posedge clk);
    chk(edge_seen.size() == 1 && edge_seen[0].further == 1'b0 && edge_seen[0].value == 33, "context restarts");
    #1 chk(meas_valid && meas.value == 41, "runtime of run 2");
    meas_pop = 1;
    repeat (3) @(posedge clk); #1;
    meas_pop = 0;
    chk(meas_seen.size() == 2 && meas_seen[1].value == 1, "one iteration");

    // FSM reset register aborts a running measurement
    meas_seen.delete();
    send(E_ENTER, 1);
    send(E_BODY, 5);
    cfg({1'b1, EDGE_W'(CFG_RESET)}, '0);
    send(E_LEAVE, 8);
    repeat (3) @(posedge clk); #1;
    chk(!meas_valid, "no record after FSM reset");

    // Overflow: two runs without polling
    chk(!buf_overflow, "no overflow yet");
    send(E_ENTER, 1); send(E_LEAVE, 1);
    send(E_ENTER, 1); send(E_LEAVE, 1);
    repeat (3) @(posedge clk); #1;
    chk(buf_overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
