// packetizer: transmit side of a tile's network interface.
//
// The node (its L2 cache) hands over one request: operation, destination
// node, memory address, and for long packets one cache block. The packetizer
// turns it into a wormhole packet: a header flit (operation, destination,
// source = this node, address), for a long packet PAYLOAD_BYTES/8 payload
// flits carrying the cache block (lowest 64 bits first), and a tail flit
// carrying a check code, here the XOR of the header and all payload flits.
// A short packet (request, invalidate) is header + tail, two flits.
//
// Interface: req_valid/req_ready take a request when both are high; a new
// request is accepted only when the previous packet has been fully sent.
// Flits leave on out_valid/out_flit, moving when out_ready is high, one per
// clock. Packing one cache block per long packet, the 2-flit short packet and
// a tail holding a check code follow the network description; the header
// layout (noc_pkg::header_t) and the XOR check code are this design's choice.
module packetizer
  import noc_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 64,
  parameter int unsigned MY_ID         = 0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         req_valid,
  output logic                         req_ready,
  input  op_e                          req_op,
  input  logic [NODE_W-1:0]            req_dst,
  input  logic [31:0]                  req_addr,
  input  logic                         req_long,
  input  logic [PAYLOAD_BYTES*8-1:0]   req_data,
  output logic                         out_valid,
  output flit_t                        out_flit,
  input  logic                         out_ready
);
  localparam int unsigned NPAY  = PAYLOAD_BYTES * 8 / FLIT_W;
  localparam int unsigned CNT_W = $clog2(NPAY + 2);

  typedef enum logic [1:0] {S_IDLE, S_HEAD, S_PAY, S_TAIL} state_e;

  state_e                     state_q;
  header_t                    hdr_q;
  logic                       long_q;
  logic [PAYLOAD_BYTES*8-1:0] data_q;
  logic [FLIT_W-1:0]          chk_q;
  logic [CNT_W-1:0]           idx_q;

  assign req_ready = (state_q == S_IDLE);

  always_comb begin
    out_valid = (state_q != S_IDLE);
    case (state_q)
      S_HEAD:  out_flit = '{ftype: F_HEAD, data: FLIT_W'(hdr_q)};
      S_PAY:   out_flit = '{ftype: F_BODY, data: data_q[FLIT_W-1:0]};
      default: out_flit = '{ftype: F_TAIL, data: chk_q};
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      hdr_q   <= '0;
      long_q  <= 1'b0;
      data_q  <= '0;
      chk_q   <= '0;
      idx_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (req_valid) begin
          hdr_q   <= '{op: req_op, dst: req_dst, src: NODE_W'(MY_ID), rsvd: '0, addr: req_addr};
          long_q  <= req_long;
          data_q  <= req_data;
          chk_q   <= '0;
          idx_q   <= '0;
          state_q <= S_HEAD;
        end
        S_HEAD: if (out_ready) begin
          chk_q   <= chk_q ^ FLIT_W'(hdr_q);
          state_q <= long_q ? S_PAY : S_TAIL;
        end
        S_PAY: if (out_ready) begin
          chk_q   <= chk_q ^ data_q[FLIT_W-1:0];
          data_q  <= data_q >> FLIT_W;
          idx_q   <= idx_q + 1'b1;
          if (idx_q == CNT_W'(NPAY - 1)) state_q <= S_TAIL;
        end
        S_TAIL: if (out_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
