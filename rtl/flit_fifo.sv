// flit_fifo: input buffer of one switch channel (and the switch's internal
// injection queue).
//
// A small register FIFO of DEPTH flits with circular read/write pointers. Its
// occupancy is published as a binary queue length (qlen); the switch sends
// this value over dedicated control wires to the neighbour that feeds the
// buffer, which uses it both to judge contention and as back-pressure (it
// sends only while qlen < DEPTH). A 2-flit depth and a 4-bit queue-length
// code follow the network description; the FIFO organisation is this
// design's choice.
//
// Timing: push and pop act on the rising clock edge; dout shows the head flit
// whenever empty is low (first-word fall-through). qlen, empty and full are
// registered state. rst_n is an active-low synchronous reset that empties the
// buffer.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH  = 2,
  parameter int unsigned QLEN_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  flit_t             din,
  input  logic              pop,
  output flit_t             dout,
  output logic              empty,
  output logic              full,
  output logic [QLEN_W-1:0] qlen
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t             mem [DEPTH];
  logic [PW-1:0]     rd_ptr, wr_ptr;
  logic [QLEN_W-1:0] count;

  assign qlen  = count;
  assign empty = (count == '0);
  assign full  = (count == QLEN_W'(DEPTH));
  assign dout  = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (pop) rd_ptr <= next_ptr(rd_ptr);
      if (push && !pop) count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  // Handshake rules: the sender never overfills, the reader never underflows.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
