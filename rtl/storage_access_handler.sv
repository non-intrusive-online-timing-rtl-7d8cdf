// storage_access_handler: host access to the two statistics storages and to
// the histogram compression levels.
//
// While host_mode is low the analysis runs: the handler passes the address,
// mode and value signals of both storage controllers unchanged to the
// storages. While host_mode is high the host owns the storages and issues one
// command at a time through a valid/ready handshake:
//   OP_READ   read cell req_cell of row req_row of storage req_sel
//             (0 = edge runtime storage, 1 = function/loop storage); the word
//             appears in resp_data with resp_valid two cycles after the
//             request is accepted;
//   OP_LEVEL  read the compression level of the histogram in row req_row
//             whose first cell is req_cell (resp one cycle after acceptance);
//   OP_CLEAR  write zero to every cell of every row of storage req_sel, one
//             row per cycle; clearing the function/loop storage also clears
//             the compression levels of each row (lvl_clear/lvl_clear_row).
//             No response; req_ready returns when done.
// The document names this block and its purpose (transfer of the results to
// the host); the command set and the host_mode switch are this design's
// choices.
module storage_access_handler
  import tam_pkg::*;
#(
  parameter int H_CELLS = 64,
  parameter int H_DEPTH = 256,
  parameter int E_CELLS = 4,
  parameter int E_DEPTH = 1024,
  parameter int DW      = DATA_W
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  host_mode,
  // host command interface
  input  logic                                  req_valid,
  output logic                                  req_ready,
  input  logic       [1:0]                      req_op,
  input  logic                                  req_sel,
  input  logic       [ROW_W-1:0]                req_row,
  input  logic       [6:0]                      req_cell,
  output logic                                  resp_valid,
  output logic       [DW-1:0]                   resp_data,
  // from the controllers
  input  logic       [H_CELLS-1:0][ROW_W-1:0]   h_addr_i,
  input  cell_mode_e [H_CELLS-1:0]              h_mode_i,
  input  logic       [VALUE_W-1:0]              h_value_i,
  input  logic       [2:0]                      h_cmp_i,
  input  logic       [E_CELLS-1:0][ROW_W-1:0]   e_addr_i,
  input  cell_mode_e [E_CELLS-1:0]              e_mode_i,
  input  logic       [VALUE_W-1:0]              e_value_i,
  // to the storages
  output logic       [H_CELLS-1:0][ROW_W-1:0]   h_addr_o,
  output cell_mode_e [H_CELLS-1:0]              h_mode_o,
  output logic       [VALUE_W-1:0]              h_value_o,
  output logic       [2:0]                      h_cmp_o,
  output logic       [E_CELLS-1:0][ROW_W-1:0]   e_addr_o,
  output cell_mode_e [E_CELLS-1:0]              e_mode_o,
  output logic       [VALUE_W-1:0]              e_value_o,
  input  logic       [H_CELLS-1:0][DW-1:0]      h_rd_data,
  input  logic       [E_CELLS-1:0][DW-1:0]      e_rd_data,
  // compression levels
  output logic       [ROW_W-1:0]                lvl_rd_row,
  output logic       [GRP_W-1:0]                lvl_rd_grp,
  input  logic       [LVL_W-1:0]                lvl_rd_data,
  output logic                                  lvl_clear,
  output logic       [ROW_W-1:0]                lvl_clear_row
);

  localparam logic [1:0] OP_READ  = 2'd0;
  localparam logic [1:0] OP_LEVEL = 2'd1;
  localparam logic [1:0] OP_CLEAR = 2'd2;

  typedef enum logic [1:0] { S_IDLE, S_READ, S_CLEAR } state_e;

  state_e           state;
  logic             sel_q;
  logic [6:0]       cell_q;
  logic [ROW_W-1:0] row_q;

  assign req_ready = host_mode && (state == S_IDLE);
  wire   accept    = req_valid && req_ready;
  wire [ROW_W-1:0] last_row = sel_q ? ROW_W'(H_DEPTH - 1) : ROW_W'(E_DEPTH - 1);

  assign lvl_rd_row = req_row;
  assign lvl_rd_grp = GRP_W'(req_cell >> 2);
  assign lvl_clear     = (state == S_CLEAR) && sel_q;
  assign lvl_clear_row = row_q;

  // Storage signal multiplexer.
  always_comb begin
    h_addr_o  = h_addr_i;
    h_mode_o  = h_mode_i;
    h_value_o = h_value_i;
    h_cmp_o   = h_cmp_i;
    e_addr_o  = e_addr_i;
    e_mode_o  = e_mode_i;
    e_value_o = e_value_i;
    if (host_mode) begin
      h_value_o = '0;
      e_value_o = '0;
      for (int c = 0; c < H_CELLS; c++) begin
        h_addr_o[c] = (state == S_CLEAR) ? row_q : req_row;
        h_mode_o[c] = M_NOP;
      end
      for (int c = 0; c < E_CELLS; c++) begin
        e_addr_o[c] = (state == S_CLEAR) ? row_q : req_row;
        e_mode_o[c] = M_NOP;
      end
      if (accept && req_op == OP_READ) begin
        if (req_sel) h_mode_o = {H_CELLS{M_READ}};
        else         e_mode_o = {E_CELLS{M_READ}};
      end
      if (state == S_CLEAR) begin
        if (sel_q) h_mode_o = {H_CELLS{M_CLEAR}};
        else       e_mode_o = {E_CELLS{M_CLEAR}};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sel_q      <= 1'b0;
      cell_q     <= '0;
      row_q      <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
    end else begin
      resp_valid <= 1'b0;
      case (state)
        S_IDLE: if (accept) begin
          sel_q  <= req_sel;
          cell_q <= req_cell;
          row_q  <= '0;
          case (req_op)
            OP_READ:  state <= S_READ;
            OP_LEVEL: begin
              resp_valid <= 1'b1;
              resp_data  <= DW'(lvl_rd_data);
            end
            OP_CLEAR: state <= S_CLEAR;
            default: ;
          endcase
        end
        S_READ: begin
          resp_valid <= 1'b1;
          if (sel_q) resp_data <= (int'(cell_q) < H_CELLS) ? h_rd_data[cell_q] : '0;
          else       resp_data <= (int'(cell_q) < E_CELLS) ? e_rd_data[cell_q] : '0;
          state      <= S_IDLE;
        end
        S_CLEAR: begin
          row_q <= row_q + 1'b1;
          if (row_q == last_row) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
