// End-to-end testbench of timing_analysis_module at reduced sizes (4 automata,
// 8-bin histograms, 8-entry FIFO). The test itself is in tam_e2e_body.svh.
module tb_timing_analysis_module;
  import tam_pkg::*;
  localparam int NA = 4, LD = 16, HC = 8, HD = 8, EC = 4, ED = 32, FD = 8;
  localparam int RUNS = 150, WATCHDOG = 200000;

  timing_analysis_module #(.NUM_AUT(NA), .LOOKUP_DEPTH(LD), .H_CELLS(HC), .H_DEPTH(HD),
                           .E_CELLS(EC), .E_DEPTH(ED), .FIFO_DEPTH(FD)) dut (.*);

  `include "tam_e2e_body.svh"

  task automatic tb_done();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
