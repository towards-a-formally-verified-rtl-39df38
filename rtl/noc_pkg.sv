// noc_pkg: types, constants and the routing function shared by the HERMES-style
// 2D-mesh network-on-chip.
//
// A packet is the unit that moves through the network: it is stored whole in a
// buffer and moves whole across a link in one handshake (store-and-forward packet
// switching). A packet holds a header (destination and source coordinates) and a
// payload. For the source-routed variant of the network the packet also carries a
// list of hops, appended when the packet is injected; the hop-by-hop variant leaves
// that list at zero.
//
// Coordinates: x grows towards East, y grows towards South (a packet whose
// destination y is larger than the current y is sent South). Port numbers: Local 0,
// East 1, West 2, North 3, South 4.
//
// The XY routing rule itself follows the document; the payload width, the
// coordinate width and the encodings are this design's own choices.
package noc_pkg;

  // Coordinate width: meshes up to 8 x 8 nodes.
  localparam int unsigned COORD_W = 3;
  localparam int unsigned MAX_DIM = 1 << COORD_W;
  // Payload width of one packet.
  localparam int unsigned DATA_W  = 32;
  // Ports per switch: Local, East, West, North, South.
  localparam int unsigned NPORTS  = 5;
  // Longest XY route in the largest mesh, the final Local hop included.
  localparam int unsigned MAX_HOPS = 2 * (MAX_DIM - 1) + 1;

  typedef enum logic [2:0] {
    PORT_L = 3'd0,
    PORT_E = 3'd1,
    PORT_W = 3'd2,
    PORT_N = 3'd3,
    PORT_S = 3'd4
  } port_e;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
  } xy_t;

  // What an IP core sends and receives: header and payload.
  typedef struct packed {
    xy_t               dst;
    xy_t               src;
    logic [DATA_W-1:0] data;
  } msg_t;

  // What travels inside the network: the message plus its remaining route.
  // route[0] is the next hop; unused entries are zero.
  typedef struct packed {
    logic [MAX_HOPS-1:0][2:0] route;
    msg_t                     msg;
  } packet_t;

  // Routing logic: the XY algorithm. Route along X until the destination column is
  // reached, then along Y; take the Local port when the destination is reached.
  function automatic port_e xy_route(xy_t from, xy_t to);
    port_e p;
    if (from == to)
      p = PORT_L;
    else if (from.x != to.x)
      p = (from.x < to.x) ? PORT_E : PORT_W;
    else
      p = (from.y < to.y) ? PORT_S : PORT_N;
    return p;
  endfunction

  // Coordinates of the neighbour reached by leaving through port p.
  function automatic xy_t xy_step(xy_t from, port_e p);
    xy_t n;
    n = from;
    case (p)
      PORT_E:  n.x = from.x + coord_t'(1);
      PORT_W:  n.x = from.x - coord_t'(1);
      PORT_S:  n.y = from.y + coord_t'(1);
      PORT_N:  n.y = from.y - coord_t'(1);
      default: n = from;
    endcase
    return n;
  endfunction

  // The route as it looks after the first hop has been taken.
  function automatic logic [MAX_HOPS-1:0][2:0] route_shift(logic [MAX_HOPS-1:0][2:0] r);
    logic [MAX_HOPS-1:0][2:0] s;
    for (int i = 0; i < int'(MAX_HOPS) - 1; i++)
      s[i] = r[i+1];
    s[MAX_HOPS-1] = 3'd0;
    return s;
  endfunction

endpackage
