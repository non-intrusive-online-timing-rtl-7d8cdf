// Testbench for poll_tree: N modelled automaton buffers hold random numbers of
// records; the poll tree must deliver every record exactly once, in FIFO order
// per automaton, grant in round-robin order among the requesters, honour
// out_ready and sustain one record per cycle when the sink is always ready.
module tb_poll_tree;
  import tam_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req, pop;
  meas_t [N-1:0] rec;
  logic out_valid, out_ready;
  meas_t out_rec;

  poll_tree #(.N(N)) dut (.*);

  // buffers: records carry (source, sequence) in the value field
  int head [N], tail [N];
  always_comb
    for (int i = 0; i < N; i++) begin
      req[i] = head[i] < tail[i];
      rec[i] = '{kind: K_SIMPLE, row: ROW_W'(i), group: '0, hbins: 3'd0, value: VALUE_W'(head[i])};
    end
  always_ff @(posedge clk)
    for (int i = 0; i < N; i++) if (rst_n && pop[i]) head[i] <= head[i] + 1;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: delivered %0d of %0d ov=%b rdy=%b req=%b", delivered, total, out_valid, out_ready, req);
    for (int i = 0; i < N; i++) $display("  %0d head %0d tail %0d got %0d", i, head[i], tail[i], got[i]);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got [N];
  int last_src = N - 1;
  int total = 0, delivered = 0, busy_cycles = 0;

  // Grant check at the falling edge, where req/pop are stable.
  always @(negedge clk) if (rst_n) begin
    int expected;
    expected = -1;
    for (int k = 1; k <= N; k++) begin
      int idx;
      idx = (last_src + k) % N;
      if (expected < 0 && req[idx]) expected = idx;
    end
    if (!out_valid || out_ready) begin
      checks++;
      if (expected < 0 ? (pop != '0) : (pop != (N'(1) << expected))) begin
        failures++;
        $display("FAIL round robin: pop %b expected %0d t=%0t last=%0d dutlast=%0d req=%b ov=%b rdy=%b", pop, expected, $time, last_src, dut.last, req, out_valid, out_ready);
      end
      if (expected >= 0) last_src = expected;
    end else begin
      checks++;
      if (pop != '0) begin failures++; $display("FAIL pop while stalled"); end
    end
    if (out_valid && out_ready) begin
      int s;
      s = int'(out_rec.row);
      checks++;
      if (int'(out_rec.value) != got[s]) begin failures++; $display("FAIL order of source %0d", s); end
      got[s]++;
      delivered++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin head[i] = 0; tail[i] = 0; got[i] = 0; end
    out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int phase = 0; phase < 2; phase++) begin
      #1;  // change the buffers away from the clock edge
      for (int i = 0; i < N; i++) begin
        int n;
        n = $urandom_range(1, 20);
        tail[i] += n;
        total += n;
      end
      busy_cycles = 0;
      while (delivered < total) begin
        out_ready <= (phase == 0) ? 1'b1 : ($urandom_range(2) != 0);
        @(posedge clk);
        busy_cycles++;
      end
      if (phase == 0) begin
        checks++;
        if (busy_cycles > total + 2) begin
          failures++;
          $display("FAIL one record per cycle: %0d cycles for %0d", busy_cycles, total);
        end
      end
    end
    out_ready <= 1;
    repeat (3) @(posedge clk); #1;
    checks++; if (out_valid) begin failures++; $display("FAIL not drained"); end
    for (int i = 0; i < N; i++) begin checks++; if (got[i] != tail[i]) begin failures++; $display("FAIL source %0d got %0d of %0d", i, got[i], tail[i]); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
