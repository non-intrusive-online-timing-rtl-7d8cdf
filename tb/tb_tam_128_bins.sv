// End-to-end testbench of timing_analysis_module with 128-bin histograms
// (H_CELLS = 128, the histogram size of the larger configuration) and
// otherwise reduced sizes: 4 automata, 16 rows, 16-entry FIFO. The test
// itself is in tam_e2e_body.svh.
module tb_tam_128_bins;
  import tam_pkg::*;
  localparam int NA = 4, LD = 16, HC = 128, HD = 16, EC = 4, ED = 32, FD = 16;
  localparam int RUNS = 150, WATCHDOG = 400000;

  timing_analysis_module #(.NUM_AUT(NA), .LOOKUP_DEPTH(LD), .H_CELLS(HC), .H_DEPTH(HD),
                           .E_CELLS(EC), .E_DEPTH(ED), .FIFO_DEPTH(FD)) dut (.*);

  `include "tam_e2e_body.svh"

  task automatic tb_done();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
