// depacketizer: receive side of a tile's network interface.
//
// It absorbs the flits of a packet addressed to this node, as the switch
// delivers them on its local output: the header flit, any payload flits
// (stored in order into a cache-block register, lowest 64 bits first) and the
// tail flit. On the tail it compares the tail's check code with the XOR of
// the header and payload flits it received and presents the whole packet:
// header, block, long/short, number of flits and a check error flag.
//
// Interface: in_valid/in_flit/in_ready carry flits; a flit is taken when
// in_valid and in_ready are high. in_ready is low while a finished packet
// waits on rsp_valid; the packet is released when rsp_ready is high. One flit
// per clock. Reassembling one cache block per long packet follows the
// network description; the XOR check code and the handshake are this
// design's choice.
module depacketizer
  import noc_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  flit_t                      in_flit,
  output logic                       in_ready,
  output logic                       rsp_valid,
  input  logic                       rsp_ready,
  output header_t                    rsp_hdr,
  output logic [PAYLOAD_BYTES*8-1:0] rsp_data,
  output logic                       rsp_long,
  output logic                       rsp_err,
  output logic [7:0]                 rsp_nflits
);
  localparam int unsigned NPAY  = PAYLOAD_BYTES * 8 / FLIT_W;
  localparam int unsigned IDX_W = (NPAY > 1) ? $clog2(NPAY) : 1;

  logic [FLIT_W-1:0] chk_q;
  logic [IDX_W-1:0]  idx_q;
  logic              in_pkt_q;

  assign in_ready = !rsp_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid  <= 1'b0;
      rsp_hdr    <= '0;
      rsp_data   <= '0;
      rsp_long   <= 1'b0;
      rsp_err    <= 1'b0;
      rsp_nflits <= '0;
      chk_q      <= '0;
      idx_q      <= '0;
      in_pkt_q   <= 1'b0;
    end else begin
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;
      if (in_valid && in_ready) begin
        case (in_flit.ftype)
          F_HEAD: begin
            rsp_hdr    <= header_t'(in_flit.data);
            rsp_data   <= '0;
            rsp_long   <= 1'b0;
            rsp_nflits <= 8'd1;
            chk_q      <= in_flit.data;
            idx_q      <= '0;
            in_pkt_q   <= 1'b1;
          end
          F_BODY: begin
            rsp_data[idx_q*FLIT_W +: FLIT_W] <= in_flit.data;
            rsp_long   <= 1'b1;
            rsp_nflits <= rsp_nflits + 1'b1;
            chk_q      <= chk_q ^ in_flit.data;
            idx_q      <= (idx_q == IDX_W'(NPAY - 1)) ? '0 : idx_q + 1'b1;
          end
          default: begin  // tail
            rsp_nflits <= rsp_nflits + 1'b1;
            rsp_err    <= (chk_q != in_flit.data) || !in_pkt_q;
            rsp_valid  <= 1'b1;
            in_pkt_q   <= 1'b0;
          end
        endcase
      end
    end
  end

endmodule
