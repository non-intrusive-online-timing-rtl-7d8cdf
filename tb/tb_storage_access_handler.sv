// Testbench for storage_access_handler with two small statistics storages.
// Checks: pass-through of the controller signals while host_mode is low; no
// host command accepted during analysis; OP_CLEAR of each storage (duration,
// level-clear pulse, all words zero afterwards); updates made through the
// pass-through path read back with OP_READ (two-cycle response); OP_LEVEL.
module tb_storage_access_handler;
  import tam_pkg::*;
  localparam int HC = 8, HD = 8, EC = 4, ED = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic host_mode = 0, req_valid = 0, req_ready, req_sel = 0, resp_valid, lvl_clear;
  logic [ROW_W-1:0] lvl_clear_row;
  logic [1:0] req_op = '0;
  logic [ROW_W-1:0] req_row = '0, lvl_rd_row;
  logic [6:0] req_cell = '0;
  logic [DATA_W-1:0] resp_data;
  logic       [HC-1:0][ROW_W-1:0] h_addr_i, h_addr_o;
  cell_mode_e [HC-1:0]            h_mode_i, h_mode_o;
  logic       [VALUE_W-1:0]       h_value_i, h_value_o, e_value_i, e_value_o;
  logic       [2:0]               h_cmp_i, h_cmp_o;
  logic       [EC-1:0][ROW_W-1:0] e_addr_i, e_addr_o;
  cell_mode_e [EC-1:0]            e_mode_i, e_mode_o;
  logic       [HC-1:0][DATA_W-1:0] h_rd_data;
  logic       [EC-1:0][DATA_W-1:0] e_rd_data;
  logic       [LVL_W-1:0]         lvl_rd_data;
  logic       [GRP_W-1:0]         lvl_rd_grp;
  logic h_rv, e_rv;

  assign lvl_rd_data = LVL_W'(lvl_rd_row * 3 + 1 + lvl_rd_grp * 7);

  storage_access_handler #(.H_CELLS(HC), .H_DEPTH(HD), .E_CELLS(EC), .E_DEPTH(ED)) dut (.*);
  statistics_storage #(.NCELLS(HC), .DEPTH(HD)) u_h (.clk, .rst_n, .addr(h_addr_o), .mode(h_mode_o),
    .value(h_value_o), .cmp_log2(h_cmp_o), .rd_data(h_rd_data), .rd_valid(h_rv));
  statistics_storage #(.NCELLS(EC), .DEPTH(ED)) u_e (.clk, .rst_n, .addr(e_addr_o), .mode(e_mode_o),
    .value(e_value_o), .cmp_log2(3'd2), .rd_data(e_rd_data), .rd_valid(e_rv));

  int n_lvl_clear = 0;
  int lvl_clear_mask = 0;   // rows whose levels were cleared
  always @(posedge clk) if (lvl_clear) begin
    n_lvl_clear++;
    lvl_clear_mask |= 1 << lvl_clear_row;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Issue one host command; returns the response (if any) and the cycles from
  // acceptance to response.
  task automatic cmd(input logic [1:0] op, input logic sel, input int row, input int cel,
                     output logic [DATA_W-1:0] data, output int lat);
    req_valid = 1; req_op = op; req_sel = sel; req_row = ROW_W'(row); req_cell = 7'(cel);
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    req_valid = 0;
    lat = 1;
    if (op != 2'd2) begin
      while (!resp_valid) begin @(posedge clk); #1; lat++; end
      data = resp_data;
    end else begin
      while (!req_ready) begin @(posedge clk); #1; lat++; end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] d;
    int lat;
    longint model [HD][HC];
    h_addr_i = '0; h_mode_i = {HC{M_NOP}}; h_value_i = '0; h_cmp_i = 3'd3;
    e_addr_i = '0; e_mode_i = {EC{M_NOP}}; e_value_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // pass-through
    for (int k = 0; k < 20; k++) begin
      for (int c = 0; c < HC; c++) begin h_addr_i[c] = ROW_W'($urandom); h_mode_i[c] = cell_mode_e'($urandom_range(0, 5)); end
      for (int c = 0; c < EC; c++) begin e_addr_i[c] = ROW_W'($urandom); e_mode_i[c] = cell_mode_e'($urandom_range(0, 5)); end
      h_value_i = $urandom; e_value_i = $urandom; h_cmp_i = 3'($urandom);
      req_valid = 1;
      #1;
      chk(h_addr_o == h_addr_i && h_mode_o == h_mode_i && h_value_o == h_value_i && h_cmp_o == h_cmp_i &&
          e_addr_o == e_addr_i && e_mode_o == e_mode_i && e_value_o == e_value_i, "pass-through");
      chk(!req_ready, "no host access during analysis");
      @(posedge clk); #1;
    end
    req_valid = 0;
    h_mode_i = {HC{M_NOP}}; e_mode_i = {EC{M_NOP}};
    // clear both storages
    host_mode = 1;
    #1;
    cmd(2'd2, 1'b1, 0, 0, d, lat);
    chk(lat == HD + 1, $sformatf("clear of %0d rows took %0d cycles", HD, lat));
    chk(n_lvl_clear == HD && lvl_clear_mask == (1 << HD) - 1, "levels of every row cleared with the function/loop storage");
    cmd(2'd2, 1'b0, 0, 0, d, lat);
    chk(lat == ED + 1, "edge storage clear time");
    chk(n_lvl_clear == HD, "no level clear for the edge storage");
    for (int r = 0; r < HD; r++) for (int c = 0; c < HC; c++) model[r][c] = 0;
    // analysis: sums into the function/loop storage
    host_mode = 0;
    for (int k = 0; k < 100; k++) begin
      int r, cc, v;
      r = $urandom_range(HD-1); cc = $urandom_range(HC-1); v = $urandom_range(1000);
      h_mode_i = {HC{M_NOP}};
      h_addr_i[cc] = ROW_W'(r); h_mode_i[cc] = M_SUM; h_value_i = VALUE_W'(v);
      model[r][cc] += v;
      @(posedge clk); #1;
    end
    h_mode_i = {HC{M_NOP}};
    e_addr_i = {EC{10'd5}}; e_mode_i = {EC{M_COUNT}};
    @(posedge clk); #1;
    e_mode_i = {EC{M_NOP}};
    @(posedge clk); #1;
    // read back
    host_mode = 1;
    for (int r = 0; r < HD; r++)
      for (int c = 0; c < HC; c++) begin
        cmd(2'd0, 1'b1, r, c, d, lat);
        chk(d == DATA_W'(model[r][c]), $sformatf("read row %0d cell %0d: %0d want %0d", r, c, d, model[r][c]));
        chk(lat == 2, "read latency two cycles");
      end
    for (int c = 0; c < EC; c++) begin
      cmd(2'd0, 1'b0, 5, c, d, lat);
      chk(d == 1, "edge storage word");
    end
    cmd(2'd0, 1'b0, 6, 2, d, lat);
    chk(d == 0, "edge storage untouched word");
    cmd(2'd1, 1'b1, 5, 0, d, lat);
    chk(d == DATA_W'(16) && lat == 1, "level read");
    cmd(2'd1, 1'b1, 5, 8, d, lat);
    chk(d == DATA_W'(30) && lat == 1, "level read of the histogram at cell 8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
