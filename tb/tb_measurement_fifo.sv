// Testbench for measurement_fifo: random pushes and pops compared with a
// queue model (data order, level, empty/full), then a forced overflow and the
// high-water mark.
module tb_measurement_fifo;
  import tam_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push = 0, pop = 0, full, empty, overflow;
  meas_t din = '0, dout;
  logic [$clog2(DEPTH):0] level, max_level;

  measurement_fifo #(.DEPTH(DEPTH)) dut (.*);

  meas_t q[$];
  int peak = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int k = 0; k < 2000; k++) begin
      bit pu, po;
      meas_t d;
      pu = ($urandom_range(99) < 55) && (q.size() < DEPTH);
      po = ($urandom_range(99) < 50);
      d  = meas_t'({$urandom, $urandom});
      chk(int'(level) == q.size(), "level");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) chk(dout == q[0], "data order");
      push <= pu; pop <= po; din <= d;
      @(posedge clk); #1;
      if (po && q.size() > 0) void'(q.pop_front());
      if (pu) q.push_back(d);
      if (q.size() > peak) peak = q.size();
    end
    chk(overflow == 1'b0, "no overflow yet");
    // fill completely, then one more push without pop
    pop <= 0;
    while (q.size() < DEPTH + 1) begin
      meas_t d;
      d = meas_t'({$urandom, $urandom});
      push <= 1; din <= d;
      @(posedge clk); #1;
      q.push_back(d);
    end
    push <= 0;
    void'(q.pop_back());
    @(posedge clk); #1;
    chk(overflow == 1'b1, "overflow flagged");
    chk(int'(level) == DEPTH, "level stays at depth");
    chk(int'(max_level) == DEPTH, "high-water mark");
    pop <= 1;
    for (int i = 0; i < DEPTH; i++) begin
      chk(dout == q[0], "drain order");
      void'(q.pop_front());
      @(posedge clk); #1;
    end
    pop <= 0;
    chk(empty, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
