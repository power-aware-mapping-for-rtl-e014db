// noc_pkg: types and constants shared by the reconfigurable-mesh NoC.
//
// A flit is FLIT_W = 32 data bits (the link width used throughout the
// design) plus two framing bits, head and tail, carried beside the data.
// The head flit of a packet names its source and destination tile in its
// low data bits; routers look the (source, destination) pair up in their
// routing table. The framing bits and the header layout are this design's
// own choice.
//
// Ports of routers and switch boxes are numbered N=0, E=1, S=2, W=3; a
// router also has the local port L=4. A switch box has six two-port
// connections, one per pair of its four ports; its 6-bit configuration word
// holds one bit per pair in the order N-E, N-S, N-W, E-S, E-W, S-W.
//
// The network is laid out on a (2*ROWS-1) x (2*COLS-1) grid: routers sit at
// even (row, column) positions, switch boxes at every other position, and
// every grid position is wired to its four neighbours by one wire segment.
// The index helpers below number routers and switch boxes row by row.
package noc_pkg;

  localparam int unsigned FLIT_W    = 32;  // link / flit width in bits
  localparam int unsigned NODE_ID_W = 8;   // width of the source and destination fields
  localparam int unsigned PORT_W    = 3;   // width of a router port number
  localparam int unsigned NUM_DIRS  = 4;   // N, E, S, W
  localparam int unsigned NUM_RPORTS = 5;  // N, E, S, W, local
  localparam int unsigned SW_CFG_W  = 6;   // one bit per pair of switch-box ports

  typedef enum logic [PORT_W-1:0] {
    P_N = 3'd0,
    P_E = 3'd1,
    P_S = 3'd2,
    P_W = 3'd3,
    P_L = 3'd4
  } port_e;

  typedef struct packed {
    logic              head;  // first flit of a packet
    logic              tail;  // last flit of a packet (head and tail both set: one-flit packet)
    logic [FLIT_W-1:0] data;  // payload; in a head flit [15:8]=source, [7:0]=destination
  } flit_t;

  localparam int unsigned FLIT_BITS = FLIT_W + 2;

  // Destination and source tile of a head flit.
  function automatic logic [NODE_ID_W-1:0] hdr_dst(flit_t f);
    return f.data[NODE_ID_W-1:0];
  endfunction

  function automatic logic [NODE_ID_W-1:0] hdr_src(flit_t f);
    return f.data[2*NODE_ID_W-1:NODE_ID_W];
  endfunction

  // Bit of the switch-box configuration word that joins ports a and b (a != b).
  function automatic int unsigned pair_bit(int unsigned a, int unsigned b);
    int unsigned lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    case ({lo[1:0], hi[1:0]})
      4'b00_01: return 0;  // N-E
      4'b00_10: return 1;  // N-S
      4'b00_11: return 2;  // N-W
      4'b01_10: return 3;  // E-S
      4'b01_11: return 4;  // E-W
      default:  return 5;  // S-W
    endcase
  endfunction

  // Opposite direction: the port on the neighbouring grid position that a
  // segment leaving in direction d arrives at.
  function automatic int unsigned opposite(int unsigned d);
    return (d + 2) % 4;
  endfunction

  // Router number of the router at grid position (r, c), both even.
  function automatic int unsigned router_index(int unsigned r, int unsigned c, int unsigned cols);
    return (r / 2) * cols + (c / 2);
  endfunction

  // Switch-box number of the switch at grid position (r, c): its row-major
  // position on the grid less the routers that come before it.
  function automatic int unsigned switch_index(int unsigned r, int unsigned c, int unsigned cols);
    int unsigned gc, lin, n_before;
    gc     = 2 * cols - 1;
    lin    = r * gc + c;
    n_before = ((r + 1) / 2) * cols + (((r % 2) == 0) ? (c + 1) / 2 : 0);
    return lin - n_before;
  endfunction

endpackage
