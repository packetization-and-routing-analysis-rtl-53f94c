// crossbar: the switch fabric of one tile, from any input to any output.
//
// Each output has a multiplexer that selects the head flit of the input that
// owns it (the path reserved by a header flit); seen from the inputs this is
// a demultiplexer steering each input to the output it reserved. Any set of
// disjoint input-to-output paths is carried concurrently. A flit moves only
// when its output also has room downstream (out_space); the crossbar then
// raises out_valid for that output and in_pop for the input, so the input
// buffer drops the flit in the same cycle as the next stage stores it.
// Ownership and reservation come from the switch control; the crossbar is
// purely combinational. The one-multiplexer-per-output organisation follows
// the switch drawing; the valid/pop handshake is this design's choice.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NP = 5
) (
  input  logic [NP-1:0]       in_valid,   // input buffer not empty
  input  flit_t [NP-1:0]      in_flit,    // head flit of each input buffer
  input  logic [NP-1:0]       out_busy,   // output reserved by some input
  input  logic [NP-1:0][2:0]  out_owner,  // which input reserved the output
  input  logic [NP-1:0]       out_space,  // downstream can take a flit
  output logic [NP-1:0]       out_valid,
  output flit_t [NP-1:0]      out_flit,
  output logic [NP-1:0]       in_pop
);
  always_comb begin
    in_pop = '0;
    for (int o = 0; o < int'(NP); o++) begin
      out_flit[o]  = in_flit[out_owner[o]];
      out_valid[o] = out_busy[o] && out_space[o] && in_valid[out_owner[o]];
      if (out_valid[o]) in_pop[out_owner[o]] = 1'b1;
    end
  end

endmodule
