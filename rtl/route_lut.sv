// route_lut: hard-coded profitable-route / misroute table of one switch.
//
// For every destination node the table holds three things seen from this
// tile: the set of profitable outputs (those that bring a packet closer to
// its destination), the set of misroutes (the remaining outputs that exist at
// this position of the mesh) and the dimension-ordered output. Keeping the
// choices in a table fixed when the topology is set, instead of comparing node
// ids for every header, follows the network description. The table is a
// constant array filled at elaboration by a function of the tile coordinates.
//
// Node id = y * MESH_X + x; north is y-1, south y+1, east x+1, west x-1.
// Dimension order is column first: north/south until the destination row is
// reached, then east/west. A packet for this node has the local port as its
// only profitable route and no misroute. Outputs off the mesh edge are in
// neither set. The lookup is purely combinational.
//
// Masks are indexed by noc_pkg::port_e: bit 0 N, 1 S, 2 E, 3 W, 4 Local.
module route_lut
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0
) (
  input  logic [NODE_W-1:0] dest,
  output logic [NPORTS-1:0] prof_mask,
  output logic [NPORTS-1:0] mis_mask,
  output logic [2:0]        dor_dir,
  output logic              dest_valid
);
  localparam int unsigned NNODES = MESH_X * MESH_Y;

  typedef struct packed {
    logic [NPORTS-1:0] prof;
    logic [NPORTS-1:0] mis;
    logic [2:0]        dor;
  } entry_t;

  typedef entry_t [NNODES-1:0] table_t;  // packed: one entry per destination

  function automatic entry_t build_entry(input int n);
    entry_t            e;
    int                dx, dy;
    logic [NPORTS-1:0] exists, prof;
    dx = n % int'(MESH_X);
    dy = n / int'(MESH_X);
    exists = {1'b0, (MY_X > 0), (MY_X < MESH_X - 1), (MY_Y < MESH_Y - 1), (MY_Y > 0)};
    prof   = {1'b0, (dx < int'(MY_X)), (dx > int'(MY_X)), (dy > int'(MY_Y)), (dy < int'(MY_Y))};
    if (dx == int'(MY_X) && dy == int'(MY_Y)) begin
      e.prof = NPORTS'(1) << P_LOCAL;
      e.mis  = '0;
      e.dor  = 3'(P_LOCAL);
    end else begin
      e.prof = prof;
      e.mis  = exists & ~prof;
      if (dy < int'(MY_Y))      e.dor = 3'(P_NORTH);
      else if (dy > int'(MY_Y)) e.dor = 3'(P_SOUTH);
      else if (dx > int'(MY_X)) e.dor = 3'(P_EAST);
      else                      e.dor = 3'(P_WEST);
    end
    return e;
  endfunction

  function automatic table_t build_table();
    table_t t;
    for (int n = 0; n < int'(NNODES); n++) t[n] = build_entry(n);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb begin
    dest_valid = (int'(dest) < int'(NNODES));
    if (dest_valid) begin
      prof_mask = TABLE[dest].prof;
      mis_mask  = TABLE[dest].mis;
      dor_dir   = TABLE[dest].dor;
    end else begin
      // Unknown destination: absorb locally so the packet cannot wander.
      prof_mask = NPORTS'(1) << P_LOCAL;
      mis_mask  = '0;
      dor_dir   = 3'(P_LOCAL);
    end
  end

endmodule
