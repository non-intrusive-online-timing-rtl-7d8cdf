// Testbench for edge_forwarding_tree: one random input valid per cycle must
// appear unchanged at the output one cycle later; idle cycles give no output;
// two valid inputs at once must set the collision flag.
module tb_edge_forwarding_tree;
  import tam_pkg::*;
  localparam int N = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] in_valid = '0;
  edge_rec_t [N-1:0] in_rec;
  logic out_valid, collision;
  edge_rec_t out_rec;

  edge_forwarding_tree #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edge_rec_t exp_rec;
    bit exp_v;
    for (int i = 0; i < N; i++) in_rec[i] = edge_rec_t'({$urandom, $urandom});
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 500; k++) begin
      int w;
      w = $urandom_range(N);   // N means idle
      for (int i = 0; i < N; i++) in_rec[i] <= edge_rec_t'({$urandom, $urandom});
      in_valid <= '0;
      #1;
      exp_v = (w < N);
      exp_rec = '0;
      if (exp_v) begin
        in_valid[w] <= 1'b1;
        #1 exp_rec = in_rec[w];
      end
      @(posedge clk); #1;
      chk(out_valid == exp_v, "out_valid");
      if (exp_v) chk(out_rec == exp_rec, $sformatf("record of input %0d", w));
      chk(collision == 1'b0, "no collision");
    end
    in_valid <= '0;
    @(posedge clk); #1;
    chk(out_valid == 1'b0, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
