// tb_noc_mesh_workloads: the network configurations the design was evaluated
// with, on the 4x4 mesh:
//   - long-packet payloads of 16, 32, 64, 128 and 256 bytes (one cache block
//     per packet) with 2-flit input buffers;
//   - input buffers of 2, 4, 8 and 16 flits with 64-byte payloads.
// Each configuration gets its own mesh and the same kind of random traffic
// (see mesh_traffic_check); the load per node is scaled down as packets get
// longer so that the offered flit rate stays similar. Every packet is
// scoreboarded, and the empty-network latency of a long packet over six hops
// is checked against 1 + 6 + 1 + (flits - 1). Mean latency and misroute
// counts are printed per configuration.
module tb_noc_mesh_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NC = 8;
  localparam int PBS[NC]  = '{16, 32, 64, 128, 256, 64, 64, 64};
  localparam int BUFS[NC] = '{2, 2, 2, 2, 2, 4, 8, 16};
  localparam int QWS[NC]  = '{4, 4, 4, 4, 4, 4, 4, 5};
  localparam int RATE[NC] = '{40, 50, 80, 140, 260, 80, 80, 80};

  logic [NC-1:0] done;
  int ck[NC], fl[NC], pk[NC], ml[NC], mr[NC], dl[NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    mesh_traffic_check #(.PB(PBS[c]), .BUF(BUFS[c]), .QW(QWS[c]), .RATE_DIV(RATE[c]), .CYCLES(3000)) u_run (
      .clk, .rst_n, .done(done[c]), .checks(ck[c]), .failures(fl[c]), .packets(pk[c]),
      .mean_lat(ml[c]), .misroutes(mr[c]), .diag_lat(dl[c])
    );
  end

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    $display("watchdog expired, done=%b", done);
    for (int c = 0; c < NC; c++) begin checks += ck[c]; failures += fl[c]; end
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    for (int c = 0; c < NC; c++) begin
      $display("payload %3d B, buffer %2d flits: %5d packets, 6-hop latency %0d, mean latency %0d cycles, %0d misroutes",
               PBS[c], BUFS[c], pk[c], dl[c], ml[c], mr[c]);
      checks += ck[c] + 1;
      failures += fl[c];
      if (mr[c] == 0 && BUFS[c] == 2) begin
        failures++;
        $display("FAIL no misroute with 2-flit buffers, payload %0d", PBS[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
