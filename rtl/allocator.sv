// allocator: contention-look-ahead routing decision for one header flit.
//
// The neighbours report the length of the input queue each output feeds. The
// delay penalty of an output is its queue length times D_B, plus 2*D_S when
// the output is a misroute (one stage away from the destination and one stage
// back). The allocator takes the output with the smallest penalty; on a tie a
// profitable route beats a misroute and the dimension-ordered output beats the
// other profitable one. This realises
//   D_profit   = min(Q_p) * D_B
//   D_misroute = min(Q_m) * D_B + 2*D_S
//   (D_profit <= D_misroute) and (Q_p < Q_pmax) ? profitable : misroute
// and, when every profitable output is free with an empty queue, it gives the
// dimension-ordered choice. An output is eligible only if it is not reserved
// by another packet in this switch, its downstream queue is below QP_MAX
// (full queues are skipped, as the routing rule asks), it is not the side the
// packet arrived on, and it exists at this mesh position. A packet for this
// node goes to the local port when the node can absorb it. If nothing is
// eligible grant stays low and the header waits.
//
// Structure (as in the allocator circuit of the design): a DeMux steers 2*D_S
// into the adders of the misroute channels, one adder per side, one
// comparator over the four penalties, and the result selects the output
// DeMux. The comparator is written here as a minimum search. D_B, D_S and the
// tie order are this design's choices. Purely combinational.
module allocator
  import noc_pkg::*;
#(
  parameter int unsigned QLEN_W = 4,
  parameter int unsigned QP_MAX = 2,
  parameter int unsigned D_B    = 1,
  parameter int unsigned D_S    = 1
) (
  input  logic                          req,
  input  logic [2:0]                    in_port,    // side the packet arrived on (P_LOCAL if injected)
  input  logic [NSIDES-1:0][QLEN_W-1:0] qlen,       // North/South/East/West queue index
  input  logic [NPORTS-1:0]             free_mask,  // output not reserved (local: node can absorb)
  input  logic [NPORTS-1:0]             prof_mask,
  input  logic [NPORTS-1:0]             mis_mask,
  input  logic [2:0]                    dor_dir,
  output logic                          grant,
  output logic [2:0]                    sel,
  output logic                          misroute,
  output logic                          used_dor
);
  // Penalty width: enough for QLEN max * D_B + 2*D_S.
  localparam int unsigned PEN_W = QLEN_W + $clog2(D_B + 1) + $clog2(2 * D_S + 1) + 1;
  // Comparison key: penalty, then misroute flag, then "not DOR", then side.
  localparam int unsigned KEY_W = PEN_W + 1 + 1 + 3;

  logic [NSIDES-1:0]            elig;
  logic [NSIDES-1:0][PEN_W-1:0] pen;
  logic [KEY_W-1:0]             key [NSIDES];
  logic [KEY_W-1:0]             best_key;
  logic [2:0]                   best;
  logic                         found;
  logic                         all_prof_free;

  always_comb begin
    for (int d = 0; d < int'(NSIDES); d++) begin
      elig[d] = free_mask[d] && (int'(qlen[d]) < int'(QP_MAX)) &&
                (prof_mask[d] || mis_mask[d]) && (in_port != 3'(d));
      // Adder: queue index (times D_B) plus 2*D_S on misroute channels.
      pen[d]  = PEN_W'(qlen[d]) * PEN_W'(D_B) + (mis_mask[d] ? PEN_W'(2 * D_S) : '0);
      key[d]  = {pen[d], mis_mask[d], (3'(d) != dor_dir), 3'(d)};
    end

    // Comparator: smallest key among the eligible sides.
    found    = 1'b0;
    best     = 3'(P_NORTH);
    best_key = '1;
    for (int d = 0; d < int'(NSIDES); d++) begin
      if (elig[d] && (!found || key[d] < best_key)) begin
        found    = 1'b1;
        best     = 3'(d);
        best_key = key[d];
      end
    end

    all_prof_free = 1'b1;
    for (int d = 0; d < int'(NSIDES); d++)
      if (prof_mask[d] && !(elig[d] && qlen[d] == '0)) all_prof_free = 1'b0;

    if (prof_mask[P_LOCAL]) begin
      grant    = req && free_mask[P_LOCAL];
      sel      = 3'(P_LOCAL);
      misroute = 1'b0;
      used_dor = 1'b0;
    end else begin
      grant    = req && found;
      sel      = best;
      misroute = grant && mis_mask[best];
      used_dor = grant && all_prof_free && (best == dor_dir);
    end
  end

endmodule
