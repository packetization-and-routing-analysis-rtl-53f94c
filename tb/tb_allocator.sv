// tb_allocator: random stimulus for the look-ahead allocator, each decision
// compared with a reference model written directly from the penalty rule:
// profitable penalty = Q*D_B, misroute penalty = Q*D_B + 2*D_S, outputs that
// are reserved, full, off-mesh or the arrival side are skipped, ties go to a
// profitable route, then the dimension-ordered one, then N,S,E,W. Directed
// cases cover the dimension-ordered default, a misroute and a hold.
module tb_allocator;
  import noc_pkg::*;
  localparam int QP_MAX = 2, DB = 1, DS = 1;
  int checks = 0, failures = 0;
  int n_mis = 0, n_dor = 0, n_hold = 0;

  logic req;
  logic [2:0] in_port, dor_dir, sel;
  logic [3:0][3:0] qlen;
  logic [4:0] free_mask, prof_mask, mis_mask;
  logic grant, misroute, used_dor;

  allocator #(.QLEN_W(4), .QP_MAX(QP_MAX), .D_B(DB), .D_S(DS)) dut (.*);

  task automatic model(output bit g, output int s, output bit m);
    int best = -1, bpen = 0, bm = 0, bnd = 0;
    g = 0; s = 0; m = 0;
    if (prof_mask[4]) begin
      g = req && free_mask[4]; s = 4; m = 0; return;
    end
    for (int d = 0; d < 4; d++) begin
      int pen, nd;
      bit ok;
      ok = free_mask[d] && qlen[d] < QP_MAX && (prof_mask[d] || mis_mask[d]) && in_port != d;
      if (!ok) continue;
      pen = qlen[d] * DB + (mis_mask[d] ? 2 * DS : 0);
      nd = (d != dor_dir);
      if (best < 0 || pen < bpen || (pen == bpen && (mis_mask[d] < bm || (mis_mask[d] == bm && nd < bnd)))) begin
        best = d; bpen = pen; bm = mis_mask[d]; bnd = nd;
      end
    end
    g = req && best >= 0;
    s = best < 0 ? 0 : best;
    m = g && mis_mask[s];
  endtask

  task automatic check_now(input string what);
    bit g, m; int s;
    #1;
    model(g, s, m);
    checks++;
    if (grant !== g || (g && (int'(sel) != s || misroute !== m))) begin
      failures++;
      $display("FAIL %s: grant %0b/%0b sel %0d/%0d mis %0b/%0b q=%h free=%b p=%b m=%b in=%0d",
               what, grant, g, sel, s, misroute, m, qlen, free_mask, prof_mask, mis_mask, in_port);
    end
    if (grant && misroute) n_mis++;
    if (used_dor) n_dor++;
    if (req && !grant) n_hold++;
  endtask

  initial begin
    // Dimension-ordered default: destination north-east, all queues empty.
    req = 1; in_port = 3'd3; qlen = '0; free_mask = 5'b11111;
    prof_mask = 5'b00101; mis_mask = 5'b01010; dor_dir = 3'd0;
    check_now("dor default");
    checks++; if (!(grant && sel == 0 && used_dor && !misroute)) failures++;
    // North queue 1, east 0: east profitable wins, not the DOR choice.
    qlen[0] = 4'd1;
    check_now("shorter profitable queue");
    checks++; if (!(grant && sel == 2 && !used_dor)) failures++;
    // Both profitable full: take a misroute (south, not the arrival side west).
    qlen[0] = 4'd2; qlen[2] = 4'd2; qlen[1] = 4'd1;
    check_now("misroute when profitable full");
    checks++; if (!(grant && sel == 1 && misroute)) failures++;
    // Penalty rule: profitable Q=1 (pen 1) against misroute Q=0 (pen 2).
    qlen = '0; qlen[0] = 4'd1; qlen[2] = 4'd1; free_mask = 5'b11111;
    check_now("profit 1 vs misroute 2");
    checks++; if (!(sel == 0 && !misroute)) failures++;
    // Everything reserved: hold.
    free_mask = 5'b10000;
    check_now("hold");
    checks++; if (grant) failures++;
    // Local destination.
    free_mask = 5'b11111; prof_mask = 5'b10000; mis_mask = '0; dor_dir = 3'd4;
    check_now("absorb");
    checks++; if (!(grant && sel == 4)) failures++;
    free_mask = 5'b01111;
    check_now("absorb blocked");
    // Random.
    for (int i = 0; i < 5000; i++) begin
      logic [3:0] exists, prof;
      req = $urandom_range(0, 7) != 0;
      exists = 4'($urandom) | 4'b0001;
      prof = 4'($urandom) & exists;
      if ($urandom_range(0, 9) == 0) begin
        prof_mask = 5'b10000; mis_mask = '0; dor_dir = 3'd4;
      end else begin
        if (prof == 0) prof = 4'b0001;
        prof_mask = {1'b0, prof};
        mis_mask  = {1'b0, exists & ~prof};
        dor_dir   = prof[0] ? 3'd0 : prof[1] ? 3'd1 : prof[2] ? 3'd2 : 3'd3;
      end
      for (int d = 0; d < 4; d++) qlen[d] = 4'($urandom_range(0, 2));
      free_mask = 5'($urandom);
      in_port = 3'($urandom_range(0, 4));
      check_now("random");
    end
    checks++;
    if (n_mis == 0 || n_dor == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage mis=%0d dor=%0d hold=%0d", n_mis, n_dor, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
