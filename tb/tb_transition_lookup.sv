// Testbench for transition_lookup: writes random entries through the
// meta-configuration port, reads them back as WPE lookups and checks data and
// the one-cycle latency of ev_valid; also checks that a rewrite takes effect.
module tb_transition_lookup;
  import tam_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wpe_valid = 0, cfg_we = 0, ev_valid;
  logic [EDGE_W-1:0] edge_id = '0, cfg_addr = '0;
  lookup_entry_t cfg_data = '0, ev;
  lookup_entry_t model [DEPTH];

  transition_lookup #(.DEPTH(DEPTH)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = lookup_entry_t'($urandom);
      cfg_we <= 1; cfg_addr <= EDGE_W'(i); cfg_data <= model[i];
      @(posedge clk);
    end
    cfg_we <= 0;
    for (int r = 0; r < 2; r++) begin
      for (int k = 0; k < 3*DEPTH; k++) begin
        int e;
        e = $urandom_range(DEPTH-1);
        wpe_valid <= 1; edge_id <= EDGE_W'(e);
        @(posedge clk);
        wpe_valid <= 0;
        #1;
        chk(ev_valid == 1'b1, "ev_valid one cycle after wpe_valid");
        chk(ev == model[e], $sformatf("entry %0d: got %h want %h", e, ev, model[e]));
        @(posedge clk); #1;
        chk(ev_valid == 1'b0, "ev_valid drops");
      end
      // rewrite half of the entries
      for (int i = 0; i < DEPTH; i += 2) begin
        model[i] = lookup_entry_t'($urandom);
        cfg_we <= 1; cfg_addr <= EDGE_W'(i); cfg_data <= model[i];
        @(posedge clk);
      end
      cfg_we <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
