// route_control: the routing decision for the packet at the head of one input
// buffer of a switch.
//
// Two modes, chosen by SOURCE_ROUTED:
//  - 0, hop-by-hop (the network's implementation): the output port is computed
//    here from this switch's coordinates (X, Y) and the packet's destination with
//    the XY algorithm: Local when the destination is reached, otherwise East/West
//    until the column matches, then South/North.
//  - 1, source routing (the network's specification): the route was computed when
//    the packet was injected, and the decision is simply the first hop of the
//    route the packet carries.
// Purely combinational; the decision is valid in the same cycle as the head
// packet. The algorithm follows the document; the port encoding is this design's.
module route_control
  import noc_pkg::*;
#(
  parameter int unsigned X             = 0,
  parameter int unsigned Y             = 0,
  parameter bit          SOURCE_ROUTED = 1'b0
) (
  input  packet_t pkt,       // packet at the head of the input buffer
  output port_e   out_port   // output port it requests
);

  localparam xy_t HERE = '{x: coord_t'(X), y: coord_t'(Y)};

  always_comb begin
    if (SOURCE_ROUTED)
      out_port = port_e'(pkt.route[0]);
    else
      out_port = xy_route(HERE, pkt.msg.dst);
  end

endmodule
