// Testbench for edge_stats_controller together with a 4-cell statistics
// storage: random edge records over a few slots and both contexts; the
// min/max/sum/count words of every row are compared with a model at the end,
// and the row address computation is checked directly on every record.
module tb_edge_stats_controller;
  import tam_pkg::*;
  localparam int NC = 4, D = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  edge_rec_t in_rec = '0;
  logic       [NC-1:0][ROW_W-1:0] c_addr, s_addr;
  cell_mode_e [NC-1:0]            c_mode, s_mode;
  logic       [VALUE_W-1:0]       c_value, s_value;
  logic       [NC-1:0][DATA_W-1:0] rd_data;
  logic rd_valid;
  bit host = 0;
  int host_row = 0;
  cell_mode_e host_mode_v = M_NOP;

  edge_stats_controller #(.NCELLS(NC)) dut (.in_valid, .in_rec, .addr(c_addr), .mode(c_mode), .value(c_value));

  always_comb begin
    s_addr = c_addr; s_mode = c_mode; s_value = c_value;
    if (host) begin
      for (int c = 0; c < NC; c++) begin s_addr[c] = ROW_W'(host_row); s_mode[c] = host_mode_v; end
      s_value = '0;
    end
  end

  statistics_storage #(.NCELLS(NC), .DEPTH(D)) u_store (.clk, .rst_n, .addr(s_addr), .mode(s_mode),
    .value(s_value), .cmp_log2(3'd2), .rd_data, .rd_valid);

  longint mn [D], mx [D], sm [D], cn [D];

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
    rst_n = 1;
    #1;
    host = 1; host_mode_v = M_CLEAR;
    for (int r = 0; r < D; r++) begin
      host_row = r; mn[r] = 0; mx[r] = 0; sm[r] = 0; cn[r] = 0;
      @(posedge clk); #1;
    end
    host = 0;
    for (int k = 0; k < 600; k++) begin
      int r;
      in_valid = ($urandom_range(3) != 0);
      in_rec = '{base: 10'd8, slot: 8'($urandom_range(5)), further: 1'($urandom_range(1)), value: 32'($urandom_range(5000))};
      r = 8 + 2*int'(in_rec.slot) + int'(in_rec.further);
      #1;
      if (in_valid) begin
        chk(c_addr[0] == ROW_W'(r) && c_addr[3] == ROW_W'(r), "row address");
        chk(c_mode[0] == M_MIN && c_mode[1] == M_MAX && c_mode[2] == M_SUM && c_mode[3] == M_COUNT, "modes");
        if (cn[r] == 0 || in_rec.value < mn[r]) mn[r] = in_rec.value;
        if (in_rec.value > mx[r]) mx[r] = in_rec.value;
        sm[r] += in_rec.value; cn[r]++;
      end else begin
        chk(c_mode == {NC{M_NOP}}, "idle");
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    @(posedge clk); #1;
    host = 1; host_mode_v = M_READ;
    for (int r = 0; r < D; r++) begin
      host_row = r;
      @(posedge clk); #1;
      chk(rd_data[0] == DATA_W'(mn[r]) && rd_data[1] == DATA_W'(mx[r]) &&
          rd_data[2] == DATA_W'(sm[r]) && rd_data[3] == DATA_W'(cn[r]),
          $sformatf("row %0d: %0d %0d %0d %0d", r, rd_data[0], rd_data[1], rd_data[2], rd_data[3]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
