// tb_depacketizer: feeds long and short packets built here (header, payload,
// XOR tail), some with a corrupted tail, with gaps in the flit stream and a
// slow consumer, and checks the reassembled header, block, length, flit count
// and error flag, and that in_ready holds flits while a packet waits.
module tb_depacketizer;
  import noc_pkg::*;
  localparam int PB = 64, NPAY = PB / 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, rsp_valid, rsp_ready, rsp_long, rsp_err;
  flit_t in_flit;
  header_t rsp_hdr;
  logic [PB*8-1:0] rsp_data;
  logic [7:0] rsp_nflits;

  depacketizer #(.PAYLOAD_BYTES(PB)) dut (.*);
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

  task automatic send(input flit_t f);
    @(negedge clk);
    while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_flit = f;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_flit = '0; rsp_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      header_t h;
      logic [PB*8-1:0] blk;
      logic [63:0] x;
      bit lng, bad;
      lng = 1'($urandom_range(0, 1));
      bad = ($urandom_range(0, 4) == 0);
      h = '{op: lng ? OP_DATA_UPD : OP_INVALIDATE, dst: 8'($urandom_range(0, 15)),
            src: 8'($urandom_range(0, 15)), rsvd: '0, addr: $urandom};
      for (int w = 0; w < PB / 4; w++) blk[w*32 +: 32] = $urandom;
      if (!lng) blk = '0;
      x = 64'(h);
      send('{ftype: F_HEAD, data: 64'(h)});
      if (lng) for (int i = 0; i < NPAY; i++) begin
        send('{ftype: F_BODY, data: blk[i*64 +: 64]});
        x ^= blk[i*64 +: 64];
      end
      send('{ftype: F_TAIL, data: bad ? ~x : x});
      @(negedge clk);
      chk(rsp_valid, "packet presented");
      chk(!in_ready, "input held while packet waits");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      chk(rsp_hdr == h, "header");
      chk(rsp_long == lng && rsp_data == blk, "block");
      chk(rsp_nflits == 8'(lng ? NPAY + 2 : 2), "flit count");
      chk(rsp_err == bad, "check code");
      rsp_ready = 1;
      @(posedge clk);
      #1 rsp_ready = 0;
      chk(!rsp_valid, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
