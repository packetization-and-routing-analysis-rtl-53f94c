// tb_flit_fifo: self-checking test of the channel input buffer.
// Random pushes and pops (never pushing when full, never popping when empty)
// are compared against a queue model; the head flit, empty/full and the
// queue-length code are checked every cycle. Depth 2 is the default.
module tb_flit_fifo;
  import noc_pkg::*;
  localparam int DEPTH = 2;

  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  flit_t din, dout;
  logic [3:0] qlen;
  int checks = 0, failures = 0;
  flit_t model[$];

  flit_fifo #(.DEPTH(DEPTH), .QLEN_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && qlen == 0, "empty after reset");
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // Outputs before this cycle's edge.
      check(qlen == 4'(model.size()), "qlen matches model");
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(dout == model[0], "head flit");
      push = ($urandom_range(0, 2) != 0) && (model.size() < DEPTH || ($urandom_range(0,1) == 1 && model.size() > 0));
      pop  = (model.size() > 0) && ($urandom_range(0, 2) != 0);
      if (push && model.size() == DEPTH && !pop) push = 0;
      din.ftype = ftype_e'($urandom_range(0, 2));
      din.data  = {$urandom, $urandom};
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
