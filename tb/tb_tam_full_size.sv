// End-to-end testbench of timing_analysis_module with every parameter at its
// default: 240 automata with 4096-entry lookups, 64-bin histograms in a
// 256-row storage, a 1024-row edge storage and a 16-entry FIFO. Four automata
// are configured; all others receive all-zero lookup entries for the edges in
// use by a broadcast write. The test itself is in tam_e2e_body.svh.
module tb_tam_full_size;
  import tam_pkg::*;
  localparam int NA = 240, HC = 64, FD = 16;
  localparam int RUNS = 150, WATCHDOG = 400000;

  timing_analysis_module dut (.*);

  `include "tam_e2e_body.svh"

  task automatic tb_done();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
