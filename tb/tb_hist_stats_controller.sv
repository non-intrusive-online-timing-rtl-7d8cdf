// Testbench for hist_stats_controller with an attached statistics storage.
// Part 1 replays the document's worked example: an 8-bin scalable histogram
// fed with 5, 4, 11, 7, 54, 10 must end as bins {3,2,0,0,0,0,1,0} with
// compression level 3, after exactly one compression for 11 and two for 54,
// and each value must take 1 + (its compressions) cycles.
// Part 2 feeds random values into several histograms and simple statistics
// groups and compares everything with a model of the algorithm.
// Part 3 packs 2-bin and 4-bin histograms and simple statistics into shared
// rows and checks them the same way, including per-histogram levels.
module tb_hist_stats_controller;
  import tam_pkg::*;
  localparam int BINS = 8, D = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, compress, hist_inc, lvl_clear = 0;
  meas_t in_rec = '0;
  logic       [BINS-1:0][ROW_W-1:0] c_addr, s_addr;
  cell_mode_e [BINS-1:0]            c_mode, s_mode;
  logic       [VALUE_W-1:0]         c_value, s_value;
  logic       [2:0]                 c_cmp;
  logic       [ROW_W-1:0]           lvl_rd_row = '0;
  logic       [GRP_W-1:0]           lvl_rd_grp = '0;
  logic       [ROW_W-1:0]           lvl_clear_row = '0;
  logic       [LVL_W-1:0]           lvl_rd_data;
  logic       [BINS-1:0][DATA_W-1:0] rd_data;
  logic rd_valid;
  bit host = 0;
  int host_row = 0;
  cell_mode_e host_m = M_NOP;

  hist_stats_controller #(.BINS(BINS), .DEPTH(D)) dut (.clk, .in_valid, .in_rec, .in_ready,
    .addr(c_addr), .mode(c_mode), .value(c_value), .cmp_log2(c_cmp), .compress, .hist_inc,
    .lvl_clear, .lvl_clear_row, .lvl_rd_row, .lvl_rd_grp, .lvl_rd_data);

  always_comb begin
    s_addr = c_addr; s_mode = c_mode; s_value = c_value;
    if (host) begin
      for (int c = 0; c < BINS; c++) begin s_addr[c] = ROW_W'(host_row); s_mode[c] = host_m; end
      s_value = '0;
    end
  end

  statistics_storage #(.NCELLS(BINS), .DEPTH(D)) u_store (.clk, .rst_n, .addr(s_addr), .mode(s_mode),
    .value(s_value), .cmp_log2(c_cmp), .rd_data, .rd_valid);

  int n_compress = 0;
  always @(posedge clk) if (rst_n && compress) n_compress++;

  longint hist [D][BINS];
  int     lvl  [D];
  int     lvlg [D][BINS/4];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Offer one record and wait until it is accepted; returns the cycles taken.
  task automatic put(input meas_t r, output int cycles);
    in_valid = 1; in_rec = r; cycles = 0;
    do begin
      @(posedge clk); cycles++;
    end while (!in_ready);
    #1 in_valid = 0;
  endtask

  // A host clear of a row also clears its compression levels.
  task automatic host_op(input cell_mode_e m, input int row);
    host = 1; host_m = m; host_row = row;
    lvl_clear = (m == M_CLEAR); lvl_clear_row = ROW_W'(row);
    @(posedge clk); #1;
    host = 0; lvl_clear = 0;
  endtask

  // Model of the scalable histogram algorithm.
  task automatic model_hist(input int row, input int v, output int ncomp);
    ncomp = 0;
    while ((v >> lvl[row]) >= BINS) begin
      for (int b = 0; b < BINS; b++) hist[row][b] = (b < BINS/2) ? hist[row][2*b] + hist[row][2*b+1] : 0;
      lvl[row]++; ncomp++;
    end
    hist[row][v >> lvl[row]]++;
  endtask

  // Same for a histogram of n bins starting at cell 'start'.
  task automatic model_small(input int row, input int start, input int n, input int v, output int ncomp);
    ncomp = 0;
    while ((v >> lvlg[row][start/4]) >= n) begin
      for (int b = 0; b < n; b++)
        hist[row][start+b] = (b < n/2) ? hist[row][start+2*b] + hist[row][start+2*b+1] : 0;
      lvlg[row][start/4]++; ncomp++;
    end
    hist[row][start + (v >> lvlg[row][start/4])]++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq [6] = '{5, 4, 11, 7, 54, 10};
    int ncomp [6] = '{0, 0, 1, 0, 2, 0};
    int want [BINS] = '{3, 2, 0, 0, 0, 0, 1, 0};
    int cyc, nc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int r = 0; r < D; r++) begin
      host_op(M_CLEAR, r);
      lvl[r] = 0;
      for (int g = 0; g < BINS/4; g++) lvlg[r][g] = 0;
      for (int b = 0; b < BINS; b++) hist[r][b] = 0;
    end
    // ---- Part 1: worked example on histogram row 3 ----
    for (int i = 0; i < 6; i++) begin
      put('{kind: K_HIST, row: 10'd3, group: '0, hbins: 3'd0, value: 32'(seq[i])}, cyc);
      chk(cyc == 1 + ncomp[i], $sformatf("value %0d took %0d cycles", seq[i], cyc));
      model_hist(3, seq[i], nc);
    end
    @(posedge clk); #1;
    chk(n_compress == 3, $sformatf("three compressions, got %0d", n_compress));
    lvl_rd_row = 10'd3;
    #1 chk(int'(lvl_rd_data) == 3, "compression level 3");
    host_op(M_READ, 3);
    // host_op leaves us 1 after the edge: the read word is visible
    host = 1; host_m = M_NOP;
    for (int b = 0; b < BINS; b++) chk(rd_data[b] == DATA_W'(want[b]), $sformatf("bin %0d = %0d", b, rd_data[b]));
    host = 0;

    // ---- Part 2: random histograms and simple statistics ----
    begin
      longint mn [D][2], mx [D][2], sm [D][2], cn [D][2];
      for (int r = 0; r < D; r++) for (int g = 0; g < 2; g++) begin mn[r][g] = 0; mx[r][g] = 0; sm[r][g] = 0; cn[r][g] = 0; end
      for (int k = 0; k < 1500; k++) begin
        int v, r, g;
        v = (k % 50 == 0) ? $urandom_range(100000) : $urandom_range(40 * (k / 100 + 1));
        if ($urandom_range(1)) begin
          r = $urandom_range(0, 3);   // histogram rows 0..3
          put('{kind: K_HIST, row: ROW_W'(r), group: '0, hbins: 3'd0, value: VALUE_W'(v)}, cyc);
          model_hist(r, v, nc);
          chk(cyc == 1 + nc, "cycles per histogram update");
        end else begin
          r = $urandom_range(4, 7);   // simple statistics rows 4..7, groups 0/1
          g = $urandom_range(1);
          put('{kind: K_SIMPLE, row: ROW_W'(r), group: GRP_W'(g), hbins: 3'd0, value: VALUE_W'(v)}, cyc);
          chk(cyc == 1, "simple statistics take one cycle");
          if (cn[r][g] == 0 || v < mn[r][g]) mn[r][g] = v;
          if (v > mx[r][g]) mx[r][g] = v;
          sm[r][g] += v; cn[r][g]++;
        end
      end
      @(posedge clk); #1;
      for (int r = 0; r < D; r++) begin
        host_op(M_READ, r);
        if (r < 4) begin
          for (int b = 0; b < BINS; b++) chk(rd_data[b] == DATA_W'(hist[r][b]), $sformatf("hist %0d bin %0d", r, b));
          lvl_rd_row = ROW_W'(r);
          #1 chk(int'(lvl_rd_data) == lvl[r], $sformatf("level of hist %0d", r));
        end else begin
          for (int g = 0; g < 2; g++)
            chk(rd_data[4*g] == DATA_W'(mn[r][g]) && rd_data[4*g+1] == DATA_W'(mx[r][g]) &&
                rd_data[4*g+2] == DATA_W'(sm[r][g]) && rd_data[4*g+3] == DATA_W'(cn[r][g]),
                $sformatf("simple stats row %0d group %0d", r, g));
        end
      end
    end

    // ---- Part 3: small histograms sharing rows with simple statistics ----
    // row 8:  2-bin histogram at cells 0..1, simple statistics in group 1
    // row 9:  two 4-bin histograms (groups 0 and 1)
    // row 10: simple statistics in group 0, 2-bin histogram at cells 4..5
    // row 11: hbins larger than the row: whole-row histogram
    begin
      longint mn, mx, sm, cn, mn2, mx2, sm2, cn2;
      mn = 0; mx = 0; sm = 0; cn = 0; mn2 = 0; mx2 = 0; sm2 = 0; cn2 = 0;
      for (int k = 0; k < 800; k++) begin
        int v, sel;
        v = $urandom_range(12 * (k / 80 + 1));
        sel = $urandom_range(0, 6);
        case (sel)
          0: begin
            put('{kind: K_HIST, row: 10'd8, group: 4'd0, hbins: 3'd1, value: VALUE_W'(v)}, cyc);
            model_small(8, 0, 2, v, nc);
          end
          1: begin
            put('{kind: K_SIMPLE, row: 10'd8, group: 4'd1, hbins: 3'd0, value: VALUE_W'(v)}, cyc);
            nc = 0;
            if (cn == 0 || v < mn) mn = v;
            if (v > mx) mx = v;
            sm += v; cn++;
          end
          2: begin
            put('{kind: K_HIST, row: 10'd9, group: 4'd0, hbins: 3'd2, value: VALUE_W'(v)}, cyc);
            model_small(9, 0, 4, v, nc);
          end
          3: begin
            put('{kind: K_HIST, row: 10'd9, group: 4'd1, hbins: 3'd2, value: VALUE_W'(v)}, cyc);
            model_small(9, 4, 4, v, nc);
          end
          4: begin
            put('{kind: K_SIMPLE, row: 10'd10, group: 4'd0, hbins: 3'd0, value: VALUE_W'(v)}, cyc);
            nc = 0;
            if (cn2 == 0 || v < mn2) mn2 = v;
            if (v > mx2) mx2 = v;
            sm2 += v; cn2++;
          end
          5: begin
            put('{kind: K_HIST, row: 10'd10, group: 4'd1, hbins: 3'd1, value: VALUE_W'(v)}, cyc);
            model_small(10, 4, 2, v, nc);
          end
          default: begin
            put('{kind: K_HIST, row: 10'd11, group: 4'd1, hbins: 3'd7, value: VALUE_W'(v)}, cyc);
            model_small(11, 0, BINS, v, nc);
          end
        endcase
        chk(cyc == 1 + nc, $sformatf("part 3 sel %0d value %0d took %0d cycles", sel, v, cyc));
      end
      @(posedge clk); #1;
      host_op(M_READ, 8);
      for (int b = 0; b < 2; b++) chk(rd_data[b] == DATA_W'(hist[8][b]), $sformatf("row 8 bin %0d", b));
      chk(rd_data[2] == '0 && rd_data[3] == '0, "row 8 cells 2..3 untouched");
      chk(rd_data[4] == DATA_W'(mn) && rd_data[5] == DATA_W'(mx) && rd_data[6] == DATA_W'(sm) &&
          rd_data[7] == DATA_W'(cn), "row 8 simple statistics");
      host_op(M_READ, 9);
      for (int b = 0; b < 8; b++) chk(rd_data[b] == DATA_W'(hist[9][b]), $sformatf("row 9 bin %0d", b));
      host_op(M_READ, 10);
      chk(rd_data[0] == DATA_W'(mn2) && rd_data[1] == DATA_W'(mx2) && rd_data[2] == DATA_W'(sm2) &&
          rd_data[3] == DATA_W'(cn2), "row 10 simple statistics");
      for (int b = 4; b < 6; b++) chk(rd_data[b] == DATA_W'(hist[10][b]), $sformatf("row 10 bin %0d", b));
      host_op(M_READ, 11);
      for (int b = 0; b < 8; b++) chk(rd_data[b] == DATA_W'(hist[11][b]), $sformatf("row 11 bin %0d", b));
      for (int r = 8; r < 12; r++)
        for (int g = 0; g < 2; g++) begin
          lvl_rd_row = ROW_W'(r); lvl_rd_grp = GRP_W'(g);
          #1 chk(int'(lvl_rd_data) == lvlg[r][g], $sformatf("level row %0d group %0d = %0d, want %0d", r, g, lvl_rd_data, lvlg[r][g]));
        end
      chk(lvlg[8][0] > 2 && lvlg[9][1] > 2 && lvlg[10][1] > 2, "small histograms were compressed");
      lvl_rd_grp = '0;
    end

    // level clear
    lvl_rd_row = 10'd2;
    #1 chk(lvl_rd_data != '0, "level of row 2 before clearing row 3");
    host_op(M_CLEAR, 3);
    lvl_rd_row = 10'd3;
    #1 chk(lvl_rd_data == '0, "levels of row 3 cleared");
    lvl_rd_row = 10'd2;
    #1 chk(lvl_rd_data != '0, "levels of row 2 kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
