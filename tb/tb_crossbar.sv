// tb_crossbar: random reservations (each input owning at most one output),
// random input validity and downstream room; every output flit, valid and
// input pop is compared with values computed here.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] in_valid, out_busy, out_space, out_valid, in_pop;
  flit_t [4:0] in_flit, out_flit;
  logic [4:0][2:0] out_owner;

  crossbar #(.NP(5)) dut (.*);

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int perm[5];
      logic [4:0] exp_pop;
      for (int i = 0; i < 5; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < 5; i++) begin
        in_flit[i]   = '{ftype: ftype_e'($urandom_range(0, 2)), data: {$urandom, $urandom}};
        out_owner[i] = 3'(perm[i]);
      end
      in_valid = 5'($urandom); out_busy = 5'($urandom); out_space = 5'($urandom);
      #1;
      exp_pop = '0;
      for (int o = 0; o < 5; o++) begin
        bit ev;
        ev = out_busy[o] && out_space[o] && in_valid[perm[o]];
        if (ev) exp_pop[perm[o]] = 1'b1;
        checks++;
        if (out_valid[o] !== ev || (ev && out_flit[o] !== in_flit[perm[o]])) begin
          failures++;
          $display("FAIL out %0d", o);
        end
      end
      checks++;
      if (in_pop !== exp_pop) begin failures++; $display("FAIL pop %b/%b", in_pop, exp_pop); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
