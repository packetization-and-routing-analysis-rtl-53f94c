// tb_route_lut: checks the profitable-route / misroute table of a switch at
// three positions of a 4x4 mesh (corner, edge, interior) against sets worked
// out here from the coordinates, for every destination.
module tb_route_lut;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic [NODE_W-1:0] dest;
  logic [4:0] pm0, mm0, pm1, mm1, pm2, mm2;
  logic [2:0] d0, d1, d2;
  logic v0, v1, v2;

  route_lut #(.MESH_X(4), .MESH_Y(4), .MY_X(0), .MY_Y(0)) u0 (.dest, .prof_mask(pm0), .mis_mask(mm0), .dor_dir(d0), .dest_valid(v0));
  route_lut #(.MESH_X(4), .MESH_Y(4), .MY_X(3), .MY_Y(1)) u1 (.dest, .prof_mask(pm1), .mis_mask(mm1), .dor_dir(d1), .dest_valid(v1));
  route_lut #(.MESH_X(4), .MESH_Y(4), .MY_X(1), .MY_Y(2)) u2 (.dest, .prof_mask(pm2), .mis_mask(mm2), .dor_dir(d2), .dest_valid(v2));

  task automatic expect_entry(input int mx, input int my, input int n,
                              input logic [4:0] pm, input logic [4:0] mm, input logic [2:0] dd);
    int dx, dy;
    logic [4:0] ep, em, ex;
    logic [2:0] ed;
    dx = n % 4; dy = n / 4;
    ex = '0; ep = '0;
    ex[0] = my > 0; ex[1] = my < 3; ex[2] = mx < 3; ex[3] = mx > 0;
    if (dx == mx && dy == my) begin
      ep = 5'b10000; em = '0; ed = 3'd4;
    end else begin
      ep[0] = dy < my; ep[1] = dy > my; ep[2] = dx > mx; ep[3] = dx < mx;
      em = ex & ~ep;
      ed = (dy < my) ? 3'd0 : (dy > my) ? 3'd1 : (dx > mx) ? 3'd2 : 3'd3;
    end
    checks++;
    if (pm !== ep || mm !== em || dd !== ed) begin
      failures++;
      $display("FAIL at (%0d,%0d) dest %0d: prof %b/%b mis %b/%b dor %0d/%0d", mx, my, n, pm, ep, mm, em, dd, ed);
    end
  endtask

  initial begin
    for (int n = 0; n < 16; n++) begin
      dest = 8'(n);
      #1;
      expect_entry(0, 0, n, pm0, mm0, d0);
      expect_entry(3, 1, n, pm1, mm1, d1);
      expect_entry(1, 2, n, pm2, mm2, d2);
      checks++;
      if (!(v0 && v1 && v2)) failures++;
    end
    dest = 8'd20;
    #1;
    checks++;
    if (v0 || pm0 != 5'b10000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
