// source_route_gen: appends the complete XY route to a message as it is injected
// at its source node (the injection step of the source-routed specification).
//
// Starting from the injecting node's coordinates, the XY rule is applied hop by
// hop until the destination is reached; each chosen port is written into the
// route, ending with the Local port. route[0] is the first hop, taken at the
// source switch itself. Entries after the Local hop are zero. Combinational.
// Computing the whole route at injection follows the document; the unrolled loop
// over MAX_HOPS positions is this design's way of doing it.
module source_route_gen
  import noc_pkg::*;
(
  input  xy_t     here,   // coordinates of the injecting node
  input  msg_t    msg,    // message from the IP core
  output packet_t pkt     // message with its route
);

  always_comb begin
    xy_t   cur;
    port_e p;
    logic  done;
    cur       = here;
    done      = 1'b0;
    pkt.msg   = msg;
    pkt.route = '0;
    for (int i = 0; i < int'(MAX_HOPS); i++) begin
      if (!done) begin
        p            = xy_route(cur, msg.dst);
        pkt.route[i] = p;
        done         = (p == PORT_L);
        cur          = xy_step(cur, p);
      end
    end
  end

endmodule
