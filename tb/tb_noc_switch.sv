// tb_noc_switch: one switch at position (1,1) of a 4x4 mesh with modelled
// neighbours. Upstream neighbours send only while the switch's queue length
// is below 2; downstream neighbours are modelled as 2-flit queues that drain
// at random and report their length on nb_qlen.
//
// Directed cases: the dimension-ordered choice with a one-cycle hop, a
// misroute when the profitable queue is full, absorption of a packet for this
// node, incoming traffic served before the local node, and a stall of body
// flits behind a full queue. Then random traffic from all five inputs, where
// every output stream must consist of whole packets (wormhole), every header
// must leave on a profitable or misroute side (never back where it came from),
// a full downstream queue must never be written, and every packet must come
// out exactly once with its flits intact.
module tb_noc_switch;
  import noc_pkg::*;
  localparam int MX = 1, MY = 1, ME = MY * 4 + MX, DEPTH = 2, NPAY = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic  [3:0] in_valid, out_valid;
  flit_t [3:0] in_flit, out_flit;
  logic  [3:0][3:0] in_qlen, nb_qlen;
  logic inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t inj_flit, ej_flit;
  sw_events_t events;

  noc_switch #(.MESH_X(4), .MESH_Y(4), .MY_X(MX), .MY_Y(MY)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  // ---------------- traffic model ----------------
  flit_t src_q[5][$];           // per input: flits still to send (4 = local)
  int    pkt_dest[int], pkt_in[int], pkt_len[int], pkt_seen[int];
  int    next_id = 1;
  int    cur_id[5], cur_seq[5]; // per output: packet in progress (0 = none)
  int    dn_cnt[4];             // downstream queue model
  bit    hold_side[4];          // keep a downstream queue full
  int    n_mis = 0, n_dor = 0, n_hold = 0, n_stall = 0, n_absorb = 0, n_prof = 0;
  int    last_out_port, last_out_time;
  int    cyc = 0;

  function automatic int make_packet(input int in_port, input int dest, input bit lng);
    int id = next_id++;
    header_t h = '{op: lng ? OP_DATA_FETCH : OP_READ_REQ, dst: 8'(dest), src: 8'(in_port), rsvd: '0, addr: id};
    src_q[in_port].push_back('{ftype: F_HEAD, data: 64'(h)});
    if (lng) for (int i = 0; i < NPAY; i++) src_q[in_port].push_back('{ftype: F_BODY, data: {32'(id), 32'(i + 1)}});
    src_q[in_port].push_back('{ftype: F_TAIL, data: {32'(id), 32'hFFFF}});
    pkt_dest[id] = dest; pkt_in[id] = in_port; pkt_len[id] = lng ? NPAY + 2 : 2; pkt_seen[id] = 0;
    return id;
  endfunction

  function automatic bit legal_out(input int id, input int o);
    int dx = pkt_dest[id] % 4, dy = pkt_dest[id] / 4;
    if (dx == MX && dy == MY) return o == 4;
    if (o == 4 || o == pkt_in[id]) return 0;
    return 1;  // the interior tile has all four sides
  endfunction

  // Check one flit leaving on output o.
  task automatic see_out(input int o, input flit_t f);
    header_t h;
    last_out_port = o; last_out_time = cyc;
    if (f.ftype == F_HEAD) begin
      h = header_t'(f.data);
      chk(cur_id[o] == 0, "head only between packets");
      chk(pkt_dest.exists(int'(h.addr)), "known packet");
      chk(legal_out(int'(h.addr), o), "legal output for header");
      cur_id[o] = int'(h.addr); cur_seq[o] = 1;
    end else begin
      chk(cur_id[o] != 0 && f.data[63:32] == 32'(cur_id[o]), "flit belongs to open packet");
      if (f.ftype == F_BODY) chk(f.data[31:0] == 32'(cur_seq[o]), "body order");
      cur_seq[o]++;
      if (f.ftype == F_TAIL) begin
        chk(cur_seq[o] == pkt_len[cur_id[o]], "packet length");
        pkt_seen[cur_id[o]]++;
        cur_id[o] = 0;
      end
    end
  endtask

  // One clock: drive at negedge, sample just before posedge, update after.
  bit rand_sinks = 0;
  task automatic step();
    bit sent[5];
    bit [3:0] ov;
    flit_t of[5];
    bit ejv;
    @(negedge clk);
    for (int s = 0; s < 4; s++) begin
      in_valid[s] = src_q[s].size() > 0 && in_qlen[s] < DEPTH;
      in_flit[s]  = src_q[s].size() > 0 ? src_q[s][0] : '0;
      nb_qlen[s]  = 4'(dn_cnt[s]);
    end
    inj_valid = src_q[4].size() > 0;
    inj_flit  = src_q[4].size() > 0 ? src_q[4][0] : '0;
    ej_ready  = rand_sinks ? ($urandom_range(0, 3) != 0) : 1'b1;
    #1;
    for (int s = 0; s < 4; s++) begin
      sent[s] = in_valid[s];
      ov[s] = out_valid[s]; of[s] = out_flit[s];
      if (out_valid[s]) chk(dn_cnt[s] < DEPTH, "no write into full downstream queue");
    end
    sent[4] = inj_valid && inj_ready;
    ejv = ej_valid; of[4] = ej_flit;
    n_mis += events.misroute; n_dor += events.dor; n_hold += events.hold;
    n_stall += events.stall; n_absorb += events.absorb; n_prof += events.profit;
    @(posedge clk);
    #1;
    cyc++;
    for (int s = 0; s < 5; s++) if (sent[s]) void'(src_q[s].pop_front());
    for (int s = 0; s < 4; s++) begin
      if (ov[s]) begin see_out(s, of[s]); dn_cnt[s]++; end
      if (!hold_side[s] && dn_cnt[s] > 0 && (!rand_sinks || $urandom_range(0, 1) == 1)) dn_cnt[s]--;
    end
    if (ejv) see_out(4, of[4]);
  endtask

  function automatic bit all_idle();
    for (int s = 0; s < 5; s++) if (src_q[s].size() > 0 || cur_id[s] != 0) return 0;
    return 1;
  endfunction

  task automatic drain(input int max_cycles);
    int n = 0;
    while (!all_idle() && n < max_cycles) begin step(); n++; end
    repeat (4) step();
    chk(all_idle(), "drained");
    if (!all_idle())
      for (int s = 0; s < 5; s++) $display("  port %0d: queued %0d, open packet %0d", s, src_q[s].size(), cur_id[s]);
  endtask

  initial begin
    int id, t0, m0;
    int d4_sides [3];
    d4_sides = '{0, 1, 3};
    in_valid = '0; in_flit = '0; nb_qlen = '0; inj_valid = 0; inj_flit = '0; ej_ready = 1;
    for (int s = 0; s < 5; s++) begin cur_id[s] = 0; cur_seq[s] = 0; end
    for (int s = 0; s < 4; s++) begin dn_cnt[s] = 0; hold_side[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // D1: local packet to (3,1): dimension-ordered east, header one clock after entering the queue.
    id = make_packet(4, 1 * 4 + 3, 0);
    step();                    // header enters the injection queue
    t0 = cyc;
    m0 = n_dor;
    step();                    // header leaves on East
    chk(last_out_port == 2 && last_out_time == t0 + 1, "D1 DOR east, one-cycle hop");
    chk(n_dor == m0 + 1, "D1 counted as dimension-ordered");
    drain(50);
    chk(pkt_seen[id] == 1, "D1 delivered");

    // D2: East downstream queue full: penalty N/S misroute (0+2) < East unavailable -> misroute.
    dn_cnt[2] = DEPTH; hold_side[2] = 1;
    m0 = n_mis;
    id = make_packet(4, 1 * 4 + 3, 1);
    step(); step();
    chk(last_out_port == 0, "D2 misroute to North (first of the equal misroutes)");
    chk(n_mis == m0 + 1, "D2 counted as misroute");
    drain(50);
    hold_side[2] = 0; dn_cnt[2] = 0;

    // D2b: East queue holding 1 flit (penalty 1) still beats a misroute (penalty 2).
    dn_cnt[2] = 1; hold_side[2] = 1;
    id = make_packet(4, 1 * 4 + 3, 0);
    step(); step();
    chk(last_out_port == 2, "D2b profitable queue of 1 beats misroute");
    hold_side[2] = 0;
    drain(50);

    // D3: packet from West for this node is absorbed.
    m0 = n_absorb;
    id = make_packet(3, ME, 1);
    drain(50);
    chk(pkt_seen[id] == 1 && n_absorb == m0 + NPAY + 2, "D3 absorbed all flits locally");

    // D4: a header from the North, South or West side and a local header for
    // (3,1) in the same cycle: the incoming one gets East. Repeated so that
    // the rotating side order takes several values.
    for (int rep = 0; rep < 4; rep++) begin
      foreach (d4_sides[j]) begin
        int idw, idl;
        idw = make_packet(d4_sides[j], 1 * 4 + 3, 1);
        idl = make_packet(4, 1 * 4 + 3, 1);
        step(); step();
        chk(cur_id[2] == idw, "D4 incoming packet served before the local node");
        drain(100);
        chk(pkt_seen[idw] == 1 && pkt_seen[idl] == 1, "D4 both delivered");
        repeat (j + 1) step();
      end
    end

    // D5: body flits stall behind a full East queue, then resume.
    m0 = n_stall;
    id = make_packet(4, 1 * 4 + 3, 1);
    step(); step(); step();
    dn_cnt[2] = DEPTH; hold_side[2] = 1;
    repeat (5) step();
    chk(n_stall > m0, "D5 stall counted");
    hold_side[2] = 0;
    drain(100);
    chk(pkt_seen[id] == 1, "D5 delivered after stall");

    // Random traffic.
    rand_sinks = 1;
    for (int r = 0; r < 3000; r++) begin
      for (int s = 0; s < 5; s++)
        if (src_q[s].size() < 4 && $urandom_range(0, 7) == 0)
          void'(make_packet(s, $urandom_range(0, 15), 1'($urandom_range(0, 1))));
      step();
    end
    drain(2000);
    begin
      int lost;
      lost = 0;
      foreach (pkt_seen[k]) if (pkt_seen[k] != 1) lost++;
      chk(lost == 0, "every packet delivered once");
      if (lost != 0) $display("lost %0d of %0d", lost, next_id - 1);
    end
    chk(n_mis > 0 && n_dor > 0 && n_hold > 0 && n_stall > 0 && n_prof > 0, "all mechanisms seen");
    $display("packets=%0d profit=%0d misroute=%0d dor=%0d hold=%0d stall=%0d", next_id - 1, n_prof, n_mis, n_dor, n_hold, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
