// noc_pkg: types and constants shared by the contention-look-ahead mesh network.
//
// A flit is 64 data bits plus a 2-bit flit type that travels on dedicated
// control wires beside the data (head, body, tail). The header flit carries
// the operation, destination and source node ids and a memory address.
// Switch ports are numbered North, South, East, West, Local. The 64-bit flit
// width and the 4-bit queue-length code follow the network description; the
// header field layout and the operation codes are this design's choice.
package noc_pkg;

  localparam int unsigned FLIT_W = 64;  // flit size, 8 bytes
  localparam int unsigned NODE_W = 8;   // node id width in the header
  localparam int unsigned NPORTS = 5;   // N, S, E, W, Local
  localparam int unsigned NSIDES = 4;

  typedef enum logic [2:0] {
    P_NORTH = 3'd0,
    P_SOUTH = 3'd1,
    P_EAST  = 3'd2,
    P_WEST  = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    F_BODY = 2'd0,
    F_HEAD = 2'd1,
    F_TAIL = 2'd2
  } ftype_e;

  typedef struct packed {
    ftype_e            ftype;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Operation carried in the header flit.
  typedef enum logic [3:0] {
    OP_READ_REQ   = 4'd0,  // memory access request (short)
    OP_DATA_FETCH = 4'd1,  // reply carrying a cache block (long)
    OP_DATA_UPD   = 4'd2,  // write-back / write-through data (long)
    OP_INVALIDATE = 4'd3,  // coherence invalidate (short)
    OP_COH_UPDATE = 4'd4,  // coherence update with data (long)
    OP_IO_INTR    = 4'd5   // IO / interrupt
  } op_e;

  typedef struct packed {
    op_e               op;    // [63:60]
    logic [NODE_W-1:0] dst;   // [59:52]
    logic [NODE_W-1:0] src;   // [51:44]
    logic [11:0]       rsvd;  // [43:32]
    logic [31:0]       addr;  // [31:0]
  } header_t;

  // Per-cycle event counts of one switch, for statistics.
  typedef struct packed {
    logic [2:0] profit;    // headers sent on a profitable side
    logic [2:0] misroute;  // headers sent on a misroute
    logic [2:0] dor;       // headers that took the dimension-ordered choice
    logic [2:0] hold;      // headers that found no eligible output
    logic [2:0] stall;     // body/tail flits blocked by a full downstream queue
    logic [2:0] absorb;    // flits delivered to the local node
  } sw_events_t;

  // Opposite side: the input of the neighbour that an output feeds.
  function automatic logic [2:0] opposite(input logic [2:0] p);
    case (p)
      3'(P_NORTH): return 3'(P_SOUTH);
      3'(P_SOUTH): return 3'(P_NORTH);
      3'(P_EAST):  return 3'(P_WEST);
      default:     return 3'(P_EAST);
    endcase
  endfunction

endpackage
