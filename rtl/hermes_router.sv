// hermes_router: one five-port packet switch of the 2D mesh (Local, East, West,
// North, South), at coordinates (X, Y).
//
// One clock step of the switch applies, in order, the four functions of the
// router: input units (input_port: handshake and input queue per port), route
// control (route_control: XY decision, or first hop of a carried route when
// SOURCE_ROUTED), flow control (flow_control: round-robin, move a packet to an
// empty one-place output buffer) and output units (output_port: handshake
// towards the neighbour). A packet that enters an input port at cycle t can be
// in the output buffer at t+1 and leave over the link at t+2 at the earliest,
// so each hop costs two cycles when there is no contention.
//
// Link ports are arrays indexed by port number (noc_pkg::port_e). rx/data_in/
// ack_rx are the receiving side of each link, tx/data_out/ack_tx the sending
// side. The port set, XY routing, store-and-forward switching, input queues,
// one-place output buffers and round-robin arbitration follow the document;
// buffer depth, widths and timing are this design's choices.
module hermes_router
  import noc_pkg::*;
#(
  parameter int unsigned X             = 0,
  parameter int unsigned Y             = 0,
  parameter int unsigned BUF_DEPTH     = 4,
  parameter bit          SOURCE_ROUTED = 1'b0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic    [NPORTS-1:0]      rx,
  input  packet_t [NPORTS-1:0]      data_in,
  output logic    [NPORTS-1:0]      ack_rx,
  output logic    [NPORTS-1:0]      tx,
  output packet_t [NPORTS-1:0]      data_out,
  input  logic    [NPORTS-1:0]      ack_tx
);

  packet_t [NPORTS-1:0]    head;
  logic    [NPORTS-1:0]    head_valid, pop;
  port_e   [NPORTS-1:0]    dir;
  logic    [NPORTS-1:0]    load, out_full;
  logic    [NPORTS-1:0][2:0] sel;
  packet_t [NPORTS-1:0]    load_data;

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    input_port #(.BUF_DEPTH(BUF_DEPTH)) u_in (
      .clk       (clk),
      .rst_n     (rst_n),
      .rx        (rx[p]),
      .data_in   (data_in[p]),
      .ack_rx    (ack_rx[p]),
      .head      (head[p]),
      .head_valid(head_valid[p]),
      .pop       (pop[p])
    );

    route_control #(.X(X), .Y(Y), .SOURCE_ROUTED(SOURCE_ROUTED)) u_rc (
      .pkt     (head[p]),
      .out_port(dir[p])
    );

    assign load_data[p] = head[sel[p]];

    output_port #(.SOURCE_ROUTED(SOURCE_ROUTED)) u_out (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load[p]),
      .load_data(load_data[p]),
      .full     (out_full[p]),
      .tx       (tx[p]),
      .data_out (data_out[p]),
      .ack_tx   (ack_tx[p])
    );
  end

  flow_control u_fc (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid   (head_valid),
    .dir     (dir),
    .out_full(out_full),
    .pop     (pop),
    .load    (load),
    .sel     (sel)
  );

endmodule
