// noc_switch: wormhole contention-look-ahead switch of one mesh tile.
//
// The tile has one input and one output on each side (N, S, E, W) and a local
// port to its node processor, which injects packets through a small internal
// queue and absorbs packets addressed to it. Each side input has a BUF_DEPTH
// flit buffer whose occupancy is sent to the neighbour on dedicated control
// wires (in_qlen); the neighbours' occupancies arrive on nb_qlen.
//
// Routing: when a header flit reaches the head of an input buffer, the route
// table gives the profitable and misroute outputs for its destination and an
// allocator picks the output with the smallest look-ahead delay penalty. The
// choice is stored in per-output reservation registers (owner, busy); the body
// flits follow it and the tail flit releases it (wormhole switching). Headers
// competing in one cycle are served in a rotating order among the four sides,
// with the locally injected packet always last, so incoming packets have
// priority over the local node. A header with no eligible output waits.
//
// Flow control: a flit goes out on a side only while the neighbour's queue
// length is below BUF_DEPTH, and to the node only while ej_ready is high. A
// flit crosses a hop in one clock: it leaves this buffer and is written into
// the neighbour's buffer on the same edge. rst_n is active-low synchronous.
//
// From the network description: the 4-side mesh tile, 2-flit side buffers
// and a 2-flit internal queue (640 bits of buffering at 64-bit flits), 4-bit
// queue-length wires, the look-ahead rule, priority of incoming traffic and
// reservation by header/tail. This design's choices: the rotating order among
// sides, one-cycle hops, no U-turns, and using the queue length as
// back-pressure.
module noc_switch
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned BUF_DEPTH = 2,
  parameter int unsigned INJ_DEPTH = 2,
  parameter int unsigned QLEN_W    = 4,
  parameter int unsigned D_B       = 1,
  parameter int unsigned D_S       = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // side links, indexed N, S, E, W
  input  logic  [NSIDES-1:0]            in_valid,
  input  flit_t [NSIDES-1:0]            in_flit,
  output logic  [NSIDES-1:0][QLEN_W-1:0] in_qlen,
  output logic  [NSIDES-1:0]            out_valid,
  output flit_t [NSIDES-1:0]            out_flit,
  input  logic  [NSIDES-1:0][QLEN_W-1:0] nb_qlen,
  // local node
  input  logic                          inj_valid,
  input  flit_t                         inj_flit,
  output logic                          inj_ready,
  output logic                          ej_valid,
  output flit_t                         ej_flit,
  input  logic                          ej_ready,
  // statistics
  output sw_events_t                    events
);
  localparam int unsigned NP = NPORTS;

  // ---------------- input buffers ----------------
  flit_t [NP-1:0] head;
  logic  [NP-1:0] empty, full, pop;
  logic  [QLEN_W-1:0] inj_qlen;

  for (genvar s = 0; s < int'(NSIDES); s++) begin : g_side_buf
    flit_fifo #(.DEPTH(BUF_DEPTH), .QLEN_W(QLEN_W)) u_buf (
      .clk, .rst_n,
      .push(in_valid[s]), .din(in_flit[s]), .pop(pop[s]),
      .dout(head[s]), .empty(empty[s]), .full(full[s]), .qlen(in_qlen[s])
    );
  end

  flit_fifo #(.DEPTH(INJ_DEPTH), .QLEN_W(QLEN_W)) u_inj_buf (
    .clk, .rst_n,
    .push(inj_valid && !full[P_LOCAL]), .din(inj_flit), .pop(pop[P_LOCAL]),
    .dout(head[P_LOCAL]), .empty(empty[P_LOCAL]), .full(full[P_LOCAL]), .qlen(inj_qlen)
  );
  assign inj_ready = !full[P_LOCAL];

  // ---------------- reservation registers ----------------
  logic [NP-1:0]      out_busy_q;
  logic [NP-1:0][2:0] out_owner_q;
  logic [NP-1:0]      in_locked_q;
  logic [1:0]         rr_q;           // first side in this cycle's header order

  // ---------------- route table per input ----------------
  logic [NP-1:0][NP-1:0] prof_m, mis_m;
  logic [NP-1:0][2:0]    dor_d;
  logic [NP-1:0]         hdr_req;

  for (genvar i = 0; i < int'(NP); i++) begin : g_lut
    header_t hdr;
    logic    dv_unused;
    assign hdr = header_t'(head[i].data);
    route_lut #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(MY_X), .MY_Y(MY_Y)) u_lut (
      .dest(hdr.dst), .prof_mask(prof_m[i]), .mis_mask(mis_m[i]),
      .dor_dir(dor_d[i]), .dest_valid(dv_unused)
    );
    assign hdr_req[i] = !empty[i] && (head[i].ftype == F_HEAD) && !in_locked_q[i];
  end

  // ---------------- allocation slots ----------------
  // Slot k < 4 serves side (rr + k) mod 4, slot 4 serves the local queue.
  // Each slot sees the outputs claimed by the slots before it as taken.
  logic [NP-1:0][2:0]    slot_in;
  logic [NP-1:0][NP-1:0] claimed;
  logic [NP-1:0]         s_grant, s_mis, s_dor;
  logic [NP-1:0][2:0]    s_sel;
  logic [NSIDES-1:0]     side_space;

  for (genvar s = 0; s < int'(NSIDES); s++) begin : g_space
    assign side_space[s] = (int'(nb_qlen[s]) < int'(BUF_DEPTH));
  end

  assign claimed[0] = '0;
  for (genvar k = 0; k < int'(NP); k++) begin : g_slot
    logic [NP-1:0] free_m;
    if (k < int'(NSIDES)) begin : g_rot
      assign slot_in[k] = {1'b0, rr_q + 2'(k)};
    end else begin : g_loc
      assign slot_in[k] = 3'(P_LOCAL);
    end
    assign free_m = ~out_busy_q & ~claimed[k] & {ej_ready, {NSIDES{1'b1}}};
    allocator #(.QLEN_W(QLEN_W), .QP_MAX(BUF_DEPTH), .D_B(D_B), .D_S(D_S)) u_alloc (
      .req(hdr_req[slot_in[k]]), .in_port(slot_in[k]), .qlen(nb_qlen),
      .free_mask(free_m), .prof_mask(prof_m[slot_in[k]]), .mis_mask(mis_m[slot_in[k]]),
      .dor_dir(dor_d[slot_in[k]]),
      .grant(s_grant[k]), .sel(s_sel[k]), .misroute(s_mis[k]), .used_dor(s_dor[k])
    );
    if (k < int'(NP) - 1) begin : g_claim
      assign claimed[k+1] = claimed[k] | (s_grant[k] ? (NP'(1) << s_sel[k]) : '0);
    end
  end

  // Reservations in force this cycle: registered ones plus new grants.
  logic [NP-1:0]      busy_eff;
  logic [NP-1:0][2:0] owner_eff;
  always_comb begin
    busy_eff  = out_busy_q;
    owner_eff = out_owner_q;
    for (int k = 0; k < int'(NP); k++) begin
      if (s_grant[k]) begin
        busy_eff[s_sel[k]]  = 1'b1;
        owner_eff[s_sel[k]] = slot_in[k];
      end
    end
  end

  // ---------------- crossbar ----------------
  logic  [NP-1:0] x_valid;
  flit_t [NP-1:0] x_flit;
  crossbar #(.NP(NP)) u_xbar (
    .in_valid(~empty), .in_flit(head), .out_busy(busy_eff), .out_owner(owner_eff),
    .out_space({ej_ready, side_space}), .out_valid(x_valid), .out_flit(x_flit), .in_pop(pop)
  );

  assign out_valid = x_valid[NSIDES-1:0];
  assign out_flit  = x_flit[NSIDES-1:0];
  assign ej_valid  = x_valid[P_LOCAL];
  assign ej_flit   = x_flit[P_LOCAL];

  // ---------------- reservation update ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_busy_q  <= '0;
      out_owner_q <= '0;
      in_locked_q <= '0;
      rr_q        <= '0;
    end else begin
      rr_q <= rr_q + 1'b1;
      for (int k = 0; k < int'(NP); k++) begin
        if (s_grant[k]) begin
          out_busy_q[s_sel[k]]    <= 1'b1;
          out_owner_q[s_sel[k]]   <= slot_in[k];
          in_locked_q[slot_in[k]] <= 1'b1;
        end
      end
      // The tail flit releases the path it used.
      for (int o = 0; o < int'(NP); o++) begin
        if (x_valid[o] && x_flit[o].ftype == F_TAIL) begin
          out_busy_q[o]                <= 1'b0;
          in_locked_q[owner_eff[o]]    <= 1'b0;
        end
      end
    end
  end

  // ---------------- statistics ----------------
  always_comb begin
    events = '0;
    for (int k = 0; k < int'(NP); k++) begin
      if (s_grant[k] && s_sel[k] != 3'(P_LOCAL) && !s_mis[k]) events.profit = events.profit + 1'b1;
      if (s_mis[k])                                          events.misroute = events.misroute + 1'b1;
      if (s_dor[k])                                          events.dor = events.dor + 1'b1;
    end
    for (int i = 0; i < int'(NP); i++) begin
      if (hdr_req[i] && !pop[i])                             events.hold = events.hold + 1'b1;
      if (in_locked_q[i] && !empty[i] && !pop[i])            events.stall = events.stall + 1'b1;
    end
    if (x_valid[P_LOCAL]) events.absorb = 3'd1;
  end

  // Two outputs are never reserved by the same input.
  for (genvar a = 0; a < int'(NP); a++) begin : g_own_a
    for (genvar b = a + 1; b < int'(NP); b++) begin : g_own_b
      a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(busy_eff[a] && busy_eff[b] && owner_eff[a] == owner_eff[b]));
    end
  end

  // A granted header always moves in its grant cycle.
  for (genvar k = 0; k < int'(NP); k++) begin : g_chk
    a_grant_moves: assert property (@(posedge clk) disable iff (!rst_n)
                                    s_grant[k] |-> pop[slot_in[k]]);
  end

  // Link protocol: a neighbour never sends into a full input buffer, and the
  // node sees the injection queue as ready exactly while it has room.
  for (genvar s = 0; s < int'(NSIDES); s++) begin : g_link_chk
    a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(in_valid[s] && full[s]));
  end
  a_inj_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                inj_ready == (int'(inj_qlen) < int'(INJ_DEPTH)));

endmodule
