// noc_mesh_top: shared-memory multiprocessor interconnect, a MESH_X x MESH_Y
// mesh of tiles with contention-look-ahead wormhole routing.
//
// Every tile holds a switch (noc_switch) and the two halves of a network
// interface: a packetizer that wraps a node's request or cache block into a
// packet, and a depacketizer that reassembles packets addressed to the node.
// Neighbouring switches are joined in both directions by a 66-bit flit link
// (64 data bits plus a 2-bit flit type on separate control wires) and by
// 4-bit control wires that report the length of the receiving input queue.
// A switch routes each header flit towards the neighbour with the smallest
// look-ahead delay penalty and reserves the path until the tail flit.
//
// Node id n = y*MESH_X + x (x = column, y = row, row 0 at the north edge).
// The node side of each tile - the processor and its caches, which are not
// part of this RTL - is brought out as ports indexed by node id:
//   req_*  : packet to send (operation, destination, address, long/short,
//            cache block), accepted when req_valid and req_ready are high;
//   rsp_*  : packet received (header, cache block, check error), released
//            when rsp_valid and rsp_ready are high;
//   events : per-switch routing statistics for the current cycle.
// Links on the mesh edge are tied off. A flit crosses one hop per clock.
// A 4x4 mesh, 64-bit flits, 2-flit buffers and 64-byte payloads are the
// network description's configuration; the node numbering is this design's.
module noc_mesh_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X        = 4,
  parameter int unsigned MESH_Y        = 4,
  parameter int unsigned BUF_DEPTH     = 2,
  parameter int unsigned INJ_DEPTH     = 2,
  parameter int unsigned QLEN_W        = 4,
  parameter int unsigned PAYLOAD_BYTES = 64,
  parameter int unsigned D_B           = 1,
  parameter int unsigned D_S           = 1,
  localparam int unsigned NN           = MESH_X * MESH_Y,
  localparam int unsigned BLK_W        = PAYLOAD_BYTES * 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic       [NN-1:0]             req_valid,
  output logic       [NN-1:0]             req_ready,
  input  op_e        [NN-1:0]             req_op,
  input  logic       [NN-1:0][NODE_W-1:0] req_dst,
  input  logic       [NN-1:0][31:0]       req_addr,
  input  logic       [NN-1:0]             req_long,
  input  logic       [NN-1:0][BLK_W-1:0]  req_data,
  output logic       [NN-1:0]             rsp_valid,
  input  logic       [NN-1:0]             rsp_ready,
  output header_t    [NN-1:0]             rsp_hdr,
  output logic       [NN-1:0][BLK_W-1:0]  rsp_data,
  output logic       [NN-1:0]             rsp_long,
  output logic       [NN-1:0]             rsp_err,
  output logic       [NN-1:0][7:0]        rsp_nflits,
  output sw_events_t [NN-1:0]             events
);
  // Side indices, as in noc_pkg::port_e.
  localparam int SN = 0, SS = 1, SE = 2, SW = 3;

  // Per-node, per-side link signals driven by the node's switch outputs.
  logic  [NN-1:0][NSIDES-1:0]             o_valid;
  flit_t [NN-1:0][NSIDES-1:0]             o_flit;
  logic  [NN-1:0][NSIDES-1:0][QLEN_W-1:0] i_qlen;

  for (genvar y = 0; y < int'(MESH_Y); y++) begin : g_row
    for (genvar x = 0; x < int'(MESH_X); x++) begin : g_col
      localparam int unsigned N = y * MESH_X + x;

      // Neighbour ids per side, and whether the neighbour exists.
      localparam int unsigned NB_N = (y > 0)          ? N - MESH_X : N;
      localparam int unsigned NB_S = (y < MESH_Y - 1) ? N + MESH_X : N;
      localparam int unsigned NB_E = (x < MESH_X - 1) ? N + 1      : N;
      localparam int unsigned NB_W = (x > 0)          ? N - 1      : N;
      localparam logic [NSIDES-1:0] HAS = {x > 0, x < MESH_X - 1, y < MESH_Y - 1, y > 0};

      logic  [NSIDES-1:0]             in_valid;
      flit_t [NSIDES-1:0]             in_flit;
      logic  [NSIDES-1:0][QLEN_W-1:0] nb_qlen;

      // Input on side s comes from the neighbour's output on the opposite side;
      // the queue length seen on side s is the neighbour's opposite input queue.
      assign in_valid[SN] = HAS[SN] && o_valid[NB_N][SS];
      assign in_flit[SN]  = o_flit[NB_N][SS];
      assign nb_qlen[SN]  = HAS[SN] ? i_qlen[NB_N][SS] : '0;
      assign in_valid[SS] = HAS[SS] && o_valid[NB_S][SN];
      assign in_flit[SS]  = o_flit[NB_S][SN];
      assign nb_qlen[SS]  = HAS[SS] ? i_qlen[NB_S][SN] : '0;
      assign in_valid[SE]  = HAS[SE] && o_valid[NB_E][SW];
      assign in_flit[SE]   = o_flit[NB_E][SW];
      assign nb_qlen[SE]   = HAS[SE] ? i_qlen[NB_E][SW] : '0;
      assign in_valid[SW]  = HAS[SW] && o_valid[NB_W][SE];
      assign in_flit[SW]   = o_flit[NB_W][SE];
      assign nb_qlen[SW]   = HAS[SW] ? i_qlen[NB_W][SE] : '0;

      logic  inj_valid, inj_ready, ej_valid, ej_ready;
      flit_t inj_flit, ej_flit;

      noc_switch #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(x), .MY_Y(y),
        .BUF_DEPTH(BUF_DEPTH), .INJ_DEPTH(INJ_DEPTH), .QLEN_W(QLEN_W),
        .D_B(D_B), .D_S(D_S)
      ) u_switch (
        .clk, .rst_n,
        .in_valid, .in_flit, .in_qlen(i_qlen[N]),
        .out_valid(o_valid[N]), .out_flit(o_flit[N]), .nb_qlen,
        .inj_valid, .inj_flit, .inj_ready,
        .ej_valid, .ej_flit, .ej_ready,
        .events(events[N])
      );

      packetizer #(.PAYLOAD_BYTES(PAYLOAD_BYTES), .MY_ID(N)) u_tx (
        .clk, .rst_n,
        .req_valid(req_valid[N]), .req_ready(req_ready[N]), .req_op(req_op[N]),
        .req_dst(req_dst[N]), .req_addr(req_addr[N]), .req_long(req_long[N]),
        .req_data(req_data[N]),
        .out_valid(inj_valid), .out_flit(inj_flit), .out_ready(inj_ready)
      );

      depacketizer #(.PAYLOAD_BYTES(PAYLOAD_BYTES)) u_rx (
        .clk, .rst_n,
        .in_valid(ej_valid), .in_flit(ej_flit), .in_ready(ej_ready),
        .rsp_valid(rsp_valid[N]), .rsp_ready(rsp_ready[N]), .rsp_hdr(rsp_hdr[N]),
        .rsp_data(rsp_data[N]), .rsp_long(rsp_long[N]), .rsp_err(rsp_err[N]),
        .rsp_nflits(rsp_nflits[N])
      );
    end
  end

endmodule
