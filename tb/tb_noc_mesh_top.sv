// tb_noc_mesh_top: end-to-end test of the 4x4 mesh at its default
// parameters (64-bit flits, 2-flit buffers, 64-byte cache-block payloads).
//
// 1. Latency in an empty network: a short and a long packet from node 0 to
//    node 15 (6 hops). Expected cycles from request acceptance to rsp_valid:
//    1 (packetizer to injection queue) + 6 hops + 1 (to the depacketizer)
//    + (flits - 1) = 9 for 2 flits, 17 for 10 flits.
// 2. Hot spot: the four corner nodes send long packets to node 5 so that queues fill
//    and headers take misroutes.
// 3. Random traffic between all nodes with slow receivers.
// The loads are kept below the point where misrouted packets can close a
// cycle of full 2-flit buffers: the routing rule has no deadlock avoidance,
// and saturating hot-spot traffic does lock the mesh.
// Every packet is scoreboarded (header, block, length, check code) and must
// arrive exactly once at its destination. The routing events of all switches
// are counted; each mechanism (profitable route, misroute, dimension-ordered
// choice, held header, stalled flit, absorption, busy packetizer, receiver
// back-pressure) must occur at least once.
module tb_noc_mesh_top;
  import noc_pkg::*;
  localparam int NN = 16, PB = 64, BW = PB * 8, NPAY = PB / 8;
  // Traffic: hot-spot senders and rounds; random requests per node per cycle = 1/RATE_DIV.
  localparam int HOT_SRC[4] = '{0, 3, 12, 15};
  localparam int HOT_ROUNDS = 2;
  localparam int RATE_DIV = 80;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic       [NN-1:0]        req_valid, req_ready, req_long, rsp_valid, rsp_ready, rsp_long, rsp_err;
  op_e        [NN-1:0]        req_op;
  logic       [NN-1:0][7:0]   req_dst, rsp_nflits;
  logic       [NN-1:0][31:0]  req_addr;
  logic       [NN-1:0][BW-1:0] req_data, rsp_data;
  header_t    [NN-1:0]        rsp_hdr;
  sw_events_t [NN-1:0]        events;

  noc_mesh_top dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  // Block contents are a function of the packet id.
  function automatic logic [BW-1:0] block_of(input int id);
    logic [BW-1:0] b;
    for (int w = 0; w < BW / 32; w++) b[w*32 +: 32] = 32'(id) * 32'h9E3779B1 ^ 32'(w * 7919);
    return b;
  endfunction

  typedef struct {int src; int dst; bit lng; int t_acc;} pkt_t;
  pkt_t pend[int];                       // sent, not yet received
  int   next_id = 1, n_sent = 0, n_recv = 0;
  int   want[NN][$];                     // per node: queued requests (packet ids)
  bit   slow_rx = 0;
  int   lat_sum = 0;
  int   cyc = 0;
  int   c_profit = 0, c_mis = 0, c_dor = 0, c_hold = 0, c_stall = 0, c_absorb = 0, c_txbusy = 0, c_rxhold = 0;
  int   last_lat;

  function automatic void request(input int s, input int d, input bit lng);
    int id = next_id++;
    pend[id] = '{src: s, dst: d, lng: lng, t_acc: -1};
    want[s].push_back(id);
  endfunction

  task automatic step();
    int acc[NN];
    bit got[NN];
    @(negedge clk);
    for (int n = 0; n < NN; n++) begin
      acc[n] = 0;
      req_valid[n] = want[n].size() > 0;
      if (want[n].size() > 0) begin
        int id = want[n][0];
        req_dst[n]  = 8'(pend[id].dst);
        req_long[n] = pend[id].lng;
        req_op[n]   = pend[id].lng ? OP_DATA_UPD : OP_READ_REQ;
        req_addr[n] = 32'(id);
        req_data[n] = pend[id].lng ? block_of(id) : '0;
        if (req_ready[n]) acc[n] = id; else c_txbusy++;
      end
      rsp_ready[n] = slow_rx ? ($urandom_range(0, 3) == 0) : 1'b1;
      got[n] = rsp_valid[n] && rsp_ready[n];
      if (rsp_valid[n] && !rsp_ready[n]) c_rxhold++;
      if (got[n]) begin
        int id = int'(rsp_hdr[n].addr);
        chk(pend.exists(id), "received packet was sent and not yet received");
        if (pend.exists(id)) begin
          chk(pend[id].dst == n, "delivered to its destination");
          chk(int'(rsp_hdr[n].src) == pend[id].src && int'(rsp_hdr[n].dst) == n, "header node ids");
          chk(rsp_hdr[n].op == (pend[id].lng ? OP_DATA_UPD : OP_READ_REQ), "header operation");
          chk(rsp_long[n] == pend[id].lng, "long/short");
          chk(!pend[id].lng || rsp_data[n] == block_of(id), "cache block intact");
          chk(int'(rsp_nflits[n]) == (pend[id].lng ? NPAY + 2 : 2), "flit count");
          chk(!rsp_err[n], "tail check code");
          last_lat = cyc - pend[id].t_acc;
          lat_sum += last_lat;
          pend.delete(id);
          n_recv++;
        end
      end
    end
    for (int n = 0; n < NN; n++) begin
      c_profit += int'(events[n].profit); c_mis += int'(events[n].misroute); c_dor += int'(events[n].dor);
      c_hold += int'(events[n].hold); c_stall += int'(events[n].stall); c_absorb += int'(events[n].absorb);
    end
    @(posedge clk);
    cyc++;
    #1;
    for (int n = 0; n < NN; n++) if (acc[n] != 0) begin
      pend[acc[n]].t_acc = cyc;
      void'(want[n].pop_front());
      n_sent++;
      req_valid[n] = 0;
    end
  endtask

  function automatic bit idle();
    for (int n = 0; n < NN; n++) if (want[n].size() > 0) return 0;
    return pend.size() == 0;
  endfunction

  task automatic drain(input int max_cycles, input string what);
    int k = 0;
    while (!idle() && k < max_cycles) begin step(); k++; end
    chk(idle(), what);
    if (!idle()) $display("  %0d packets outstanding", pend.size());
  endtask

  initial begin
    req_valid = '0; req_long = '0; req_op = '{default: OP_READ_REQ}; req_dst = '0; req_addr = '0;
    req_data = '0; rsp_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    step();

    // 1. Latency, empty network, 6 hops.
    request(0, 15, 0);
    drain(100, "short packet delivered");
    chk(last_lat == 9, "short packet latency 9 cycles over 6 hops");
    $display("short 0->15 latency %0d", last_lat);
    request(0, 15, 1);
    drain(100, "long packet delivered");
    chk(last_lat == 17, "long packet latency 17 cycles over 6 hops");
    $display("long 0->15 latency %0d", last_lat);

    // 2. Hot spot on node 5.
    for (int r = 0; r < HOT_ROUNDS; r++)
      foreach (HOT_SRC[i]) request(HOT_SRC[i], 5, 1);
    drain(20000, "hot-spot traffic drained");

    // 3. Random traffic with slow receivers part of the time.
    for (int r = 0; r < 4000; r++) begin
      slow_rx = (r / 500) % 2 == 1;
      for (int n = 0; n < NN; n++)
        if (want[n].size() < 2 && $urandom_range(0, RATE_DIV - 1) == 0)
          request(n, $urandom_range(0, NN - 1), 1'($urandom_range(0, 1)));
      step();
    end
    slow_rx = 0;
    drain(40000, "random traffic drained");

    chk(n_sent == n_recv && n_recv == next_id - 1, "every packet received once");
    $display("packets %0d, mean latency %0d cycles", n_recv, lat_sum / (n_recv > 0 ? n_recv : 1));
    $display("events: profit=%0d misroute=%0d dor=%0d hold=%0d stall=%0d absorb=%0d txbusy=%0d rxhold=%0d",
             c_profit, c_mis, c_dor, c_hold, c_stall, c_absorb, c_txbusy, c_rxhold);
    chk(c_profit > 0, "profitable routes taken");
    chk(c_mis > 0, "misroutes taken");
    chk(c_dor > 0, "dimension-ordered choices taken");
    chk(c_hold > 0, "headers held");
    chk(c_stall > 0, "flits stalled");
    chk(c_absorb > 0, "flits absorbed");
    chk(c_txbusy > 0, "packetizer busy");
    chk(c_rxhold > 0, "receiver back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
