// flit_fifo: one virtual-channel input buffer of a router (the per-VC
// queues of a conventional virtual-channel router).
//
// A circular buffer of DEPTH flits with first-word fall-through: `front` is
// the oldest flit whenever `empty` is low. A push and a pop may happen in the
// same cycle. Credit-based flow control upstream guarantees no push into a
// full buffer; an assertion checks it. Storage is not reset, only the
// pointers and the count are. Depth and organisation are this design's
// choices apart from the DEPTH default of 8 flits per VC.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t front,
  output logic  empty,
  output logic  full
);
  localparam int AW = $clog2(DEPTH > 1 ? DEPTH : 2);

  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign front = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (int'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (int'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
