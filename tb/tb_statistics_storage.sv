// Testbench for statistics_storage: 8 cells of 16 rows against a reference
// model. Random operations, many of them back to back on the same row to
// exercise the forwarding path: simple statistics on 4-cell groups (min with
// the empty-group rule, max, sum, count), histogram increments, compressions
// of 2-, 4- and 8-cell groups, clears, and reads checked one cycle later.
module tb_statistics_storage;
  import tam_pkg::*;
  localparam int NC = 8, D = 16, DW = DATA_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       [NC-1:0][ROW_W-1:0] addr;
  cell_mode_e [NC-1:0]            mode;
  logic       [VALUE_W-1:0]       value;
  logic       [2:0]               cmp_log2;
  logic       [NC-1:0][DW-1:0]    rd_data;
  logic                           rd_valid;

  statistics_storage #(.NCELLS(NC), .DEPTH(D)) dut (.*);

  logic [DW-1:0] model [D][NC];
  int n_compress = 0, n_fwd = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Apply one operation to the model exactly as the hardware defines it.
  task automatic model_op(input int r, input cell_mode_e m [NC], input logic [VALUE_W-1:0] v, input int lg);
    logic [DW-1:0] old [NC];
    for (int c = 0; c < NC; c++) old[c] = model[r][c];
    for (int c = 0; c < NC; c++) begin
      int g, base, loc;
      case (m[c])
        M_CLEAR: model[r][c] = DW'(v);
        M_MIN:   if (old[c | 3] == 0 || DW'(v) < old[c]) model[r][c] = DW'(v);
        M_MAX:   if (DW'(v) > old[c]) model[r][c] = DW'(v);
        M_SUM:   model[r][c] = old[c] + DW'(v);
        M_COUNT: model[r][c] = old[c] + 1;
        M_COMPRESS: begin
          g = 1 << lg; base = c - c % g; loc = c - base;
          model[r][c] = (loc < g/2) ? old[base + 2*loc] + old[base + 2*loc + 1] : '0;
        end
        default: ;
      endcase
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_mode_e m [NC];
    int r, prev_r, lg;
    addr = '0; mode = {NC{M_NOP}}; value = '0; cmp_log2 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // clear every row
    for (int rr = 0; rr < D; rr++) begin
      for (int c = 0; c < NC; c++) begin addr[c] <= ROW_W'(rr); mode[c] <= M_CLEAR; end
      value <= '0;
      for (int c = 0; c < NC; c++) model[rr][c] = '0;
      @(posedge clk);
    end
    prev_r = 0;
    for (int k = 0; k < 4000; k++) begin
      int kind;
      logic [VALUE_W-1:0] v;
      r = ($urandom_range(2) == 0) ? prev_r : $urandom_range(3);   // few rows: many hits
      if (r == prev_r) n_fwd++;
      kind = $urandom_range(9);
      v = $urandom_range(1000);
      lg = $urandom_range(1, 3);
      for (int c = 0; c < NC; c++) m[c] = M_NOP;
      case (kind)
        0, 1, 2: begin  // simple statistics on one group
          int g;
          g = $urandom_range(1);
          m[4*g] = M_MIN; m[4*g+1] = M_MAX; m[4*g+2] = M_SUM; m[4*g+3] = M_COUNT;
        end
        3, 4, 5: m[$urandom_range(NC-1)] = M_COUNT;   // histogram bin
        6: begin for (int c = 0; c < NC; c++) m[c] = M_COMPRESS; n_compress++; end
        7: m[$urandom_range(NC-1)] = M_CLEAR;
        default: for (int c = 0; c < NC; c++) m[c] = M_READ;
      endcase
      for (int c = 0; c < NC; c++) begin addr[c] <= ROW_W'(r); mode[c] <= m[c]; end
      value <= v; cmp_log2 <= 3'(lg);
      @(posedge clk);
      #1;
      // the stage-1 word of a read is visible right after its clock edge
      if (m[0] == M_READ) begin
        chk(rd_valid, "rd_valid");
        for (int c = 0; c < NC; c++)
          chk(rd_data[c] == model[r][c], $sformatf("row %0d cell %0d: got %0d want %0d", r, c, rd_data[c], model[r][c]));
      end
      model_op(r, m, v, lg);
      prev_r = r;
    end
    for (int c = 0; c < NC; c++) mode[c] <= M_NOP;
    @(posedge clk);
    // final read-out of every row
    for (int rr = 0; rr < D; rr++) begin
      for (int c = 0; c < NC; c++) begin addr[c] <= ROW_W'(rr); mode[c] <= M_READ; end
      @(posedge clk); #1;
      for (int c = 0; c < NC; c++) mode[c] <= M_NOP;
      for (int c = 0; c < NC; c++)
        chk(rd_data[c] == model[rr][c], $sformatf("final row %0d cell %0d", rr, c));
    end
    chk(n_compress > 0 && n_fwd > 0, "compressions and back-to-back updates happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
