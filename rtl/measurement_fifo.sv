// measurement_fifo: first-in first-out buffer between the poll tree and the
// scalable histogram statistics controller.
//
// The automata cluster can deliver a record every cycle, while the controller
// needs one extra cycle per histogram compression; this FIFO absorbs the
// difference. It is a circular buffer of DEPTH entries with a registered
// occupancy count. A push and a pop in the same cycle are both accepted, also
// when the FIFO is full. A push into a full FIFO (without a pop) is dropped
// and sets the sticky 'overflow' flag, since a lost record falsifies the
// results. 'max_level' keeps the highest occupancy seen since reset, the
// figure the document uses to size this buffer. Data appear at the output in
// the cycle after the push (first-word fall-through from the array).
// DEPTH = 16 is this design's choice; the document reports at most 9 entries
// in use for its benchmark.
module measurement_fifo
  import tam_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  meas_t                    din,
  output logic                     full,
  input  logic                     pop,
  output logic                     empty,
  output meas_t                    dout,
  output logic [$clog2(DEPTH):0]   level,
  output logic [$clog2(DEPTH):0]   max_level,
  output logic                     overflow
);

  localparam int AW = $clog2(DEPTH);

  meas_t         mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  assign empty = (level == 0);
  assign full  = (level == (AW+1)'(DEPTH));
  assign dout  = mem[rd_ptr];

  wire do_pop  = pop && !empty;
  wire do_push = push && (!full || do_pop);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) if (do_push) mem[wr_ptr] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      level     <= '0;
      max_level <= '0;
      overflow  <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      level <= level + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (level > max_level) max_level <= level;
      if (push && !do_push) overflow <= 1'b1;
    end
  end

endmodule
