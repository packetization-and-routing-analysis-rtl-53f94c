// tb_packetizer: sends random long and short requests with random output
// back-pressure and checks the flit stream: header fields, payload flits in
// order, the tail check code (XOR of header and payload), packet lengths of
// 2 and PAYLOAD_BYTES/8+2 flits, and one flit per clock without back-pressure.
module tb_packetizer;
  import noc_pkg::*;
  localparam int PB = 64, NPAY = PB / 8, ME = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, req_long, out_valid, out_ready;
  op_e req_op;
  logic [7:0] req_dst;
  logic [31:0] req_addr;
  logic [PB*8-1:0] req_data;
  flit_t out_flit;

  packetizer #(.PAYLOAD_BYTES(PB), .MY_ID(ME)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  initial begin
    req_valid = 0; out_ready = 0; req_long = 0; req_op = OP_READ_REQ; req_dst = 0; req_addr = 0; req_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      header_t h;
      logic [63:0] x;
      int nflits, t0;
      flit_t f;
      bit bp;
      bp = (p % 3 != 0);
      @(negedge clk);
      req_long = $urandom_range(0, 1);
      req_op   = req_long ? OP_DATA_FETCH : OP_READ_REQ;
      req_dst  = 8'($urandom_range(0, 15));
      req_addr = $urandom;
      for (int w = 0; w < PB / 4; w++) req_data[w*32 +: 32] = $urandom;
      chk(req_ready, "ready when idle");
      req_valid = 1;
      @(posedge clk);
      #1 req_valid = 0;
      x = '0; nflits = 0; t0 = 0;
      forever begin
        @(negedge clk);
        out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
        chk(out_valid, "valid during packet");
        chk(!req_ready, "busy during packet");
        f = out_flit;
        @(posedge clk);
        if (out_ready) begin
          if (nflits == 0) begin
            h = header_t'(f.data);
            chk(f.ftype == F_HEAD, "head type");
            chk(h.dst == req_dst && h.src == 8'(ME) && h.addr == req_addr && h.op == req_op, "header fields");
            x ^= f.data;
          end else if (f.ftype == F_BODY) begin
            chk(req_long && f.data == req_data[(nflits-1)*64 +: 64], "payload flit");
            x ^= f.data;
          end else begin
            chk(f.ftype == F_TAIL, "tail type");
            chk(f.data == x, "tail check code");
            nflits++;
            break;
          end
          nflits++;
        end
        t0++;
      end
      chk(nflits == (req_long ? NPAY + 2 : 2), "packet length");
      if (!bp) chk(t0 + 1 == nflits, "one flit per clock");
      #1 out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
