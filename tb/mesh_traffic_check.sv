// mesh_traffic_check: traffic generator and scoreboard around one mesh
// instance, used by the workload testbench to run the same traffic on
// several configurations (payload size, input buffer depth).
//
// It first measures the latency of one long packet across the mesh diagonal
// in an empty network (expected 1 + hops + 1 + (flits - 1) cycles from
// request acceptance to delivery), then runs uniform random traffic at
// 1/RATE_DIV requests per node per cycle, half of them long packets, and
// drains the network. Every packet is checked at its destination. When done
// it raises `done` and reports its checks, failures, packet count, mean
// latency and the number of misroutes. It never ends the simulation itself.
module mesh_traffic_check
  import noc_pkg::*;
#(
  parameter int PB       = 64,
  parameter int BUF      = 2,
  parameter int QW       = 4,
  parameter int RATE_DIV = 80,
  parameter int CYCLES   = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   packets,
  output int   mean_lat,
  output int   misroutes,
  output int   diag_lat
);
  localparam int NN = 16, BW = PB * 8, NPAY = PB / 8;

  logic       [NN-1:0]         req_valid, req_ready, req_long, rsp_valid, rsp_ready, rsp_long, rsp_err;
  op_e        [NN-1:0]         req_op;
  logic       [NN-1:0][7:0]    req_dst, rsp_nflits;
  logic       [NN-1:0][31:0]   req_addr;
  logic       [NN-1:0][BW-1:0] req_data, rsp_data;
  header_t    [NN-1:0]         rsp_hdr;
  sw_events_t [NN-1:0]         events;

  noc_mesh_top #(.PAYLOAD_BYTES(PB), .BUF_DEPTH(BUF), .QLEN_W(QW)) dut (.*);

  function automatic logic [BW-1:0] block_of(input int id);
    logic [BW-1:0] b;
    for (int w = 0; w < BW / 32; w++) b[w*32 +: 32] = 32'(id) * 32'h9E3779B1 ^ 32'(w * 7919 + PB);
    return b;
  endfunction

  task automatic chk(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL [PB=%0d BUF=%0d] %s at %0t", PB, BUF, w, $time); end
  endtask

  typedef struct {int src; int dst; bit lng; int t_acc;} pkt_t;
  pkt_t pend[int];
  int   want[NN][$];
  int   next_id = 1, cyc = 0, lat_sum = 0, last_lat = 0;

  function automatic void request(input int s, input int d, input bit lng);
    int id;
    id = next_id++;
    pend[id] = '{src: s, dst: d, lng: lng, t_acc: -1};
    want[s].push_back(id);
  endfunction

  task automatic step();
    int acc[NN];
    @(negedge clk);
    for (int n = 0; n < NN; n++) begin
      acc[n] = 0;
      req_valid[n] = want[n].size() > 0;
      if (want[n].size() > 0) begin
        int id;
        id = want[n][0];
        req_dst[n]  = 8'(pend[id].dst);
        req_long[n] = pend[id].lng;
        req_op[n]   = pend[id].lng ? OP_DATA_FETCH : OP_READ_REQ;
        req_addr[n] = 32'(id);
        req_data[n] = pend[id].lng ? block_of(id) : '0;
        if (req_ready[n]) acc[n] = id;
      end
      rsp_ready[n] = 1'b1;
      if (rsp_valid[n]) begin
        int id;
        id = int'(rsp_hdr[n].addr);
        chk(pend.exists(id) && pend[id].dst == n, "packet delivered once, to its destination");
        if (pend.exists(id)) begin
          chk(int'(rsp_hdr[n].src) == pend[id].src && rsp_long[n] == pend[id].lng && !rsp_err[n] &&
              (!pend[id].lng || rsp_data[n] == block_of(id)) &&
              int'(rsp_nflits[n]) == (pend[id].lng ? NPAY + 2 : 2), "packet contents");
          last_lat = cyc - pend[id].t_acc;
          lat_sum += last_lat;
          packets++;
          pend.delete(id);
        end
      end
      misroutes += int'(events[n].misroute);
    end
    @(posedge clk);
    cyc++;
    #1;
    for (int n = 0; n < NN; n++) if (acc[n] != 0) begin
      pend[acc[n]].t_acc = cyc;
      void'(want[n].pop_front());
      req_valid[n] = 0;
    end
  endtask

  function automatic bit idle();
    for (int n = 0; n < NN; n++) if (want[n].size() > 0) return 0;
    return pend.size() == 0;
  endfunction

  task automatic drain(input int max_cycles);
    int k;
    k = 0;
    while (!idle() && k < max_cycles) begin step(); k++; end
    chk(idle(), "network drained");
    if (!idle()) $display("  [PB=%0d BUF=%0d] %0d packets outstanding", PB, BUF, pend.size());
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; packets = 0; mean_lat = 0; misroutes = 0; diag_lat = 0;
    req_valid = '0; req_long = '0; req_op = '{default: OP_READ_REQ}; req_dst = '0; req_addr = '0;
    req_data = '0; rsp_ready = '1;
    @(posedge rst_n);
    step();
    // Empty network, 0 -> 15, 6 hops, NPAY + 2 flits.
    request(0, 15, 1);
    drain(200);
    diag_lat = last_lat;
    chk(last_lat == 1 + 6 + 1 + (NPAY + 1), "long packet latency over 6 hops");
    for (int r = 0; r < CYCLES; r++) begin
      for (int n = 0; n < NN; n++)
        if (want[n].size() < 2 && $urandom_range(0, RATE_DIV - 1) == 0)
          request(n, $urandom_range(0, NN - 1), 1'($urandom_range(0, 1)));
      step();
    end
    drain(50000);
    chk(packets == next_id - 1, "all packets received");
    mean_lat = lat_sum / (packets > 0 ? packets : 1);
    done = 1;
  end
endmodule
