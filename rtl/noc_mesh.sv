// noc_mesh: a MESH_W x MESH_H two-dimensional mesh of HERMES-style packet
// switches, each with an IP core port (the Local port).
//
// Node (x, y) has index y*MESH_W + x. Its East port is linked to the West port of
// (x+1, y) and its South port to the North port of (x, y+1); every link is a pair
// of opposite one-way channels, each with a Tx/Rx request, an AckTx/AckRx grant
// and a whole packet as data. Ports on the mesh edge are left idle (XY routing
// never uses them).
//
// IP side, per node n: inject_valid/inject_msg/inject_ack is the handshake into
// the Local input port (a message moves when valid and ack are both high);
// eject_valid/eject_msg/eject_ack is the handshake out of the Local output port.
// The message carries destination and source coordinates and a payload.
//
// SOURCE_ROUTED = 0 (default) is the implementation: routing is decided at each
// switch with XY. SOURCE_ROUTED = 1 is the specification: the whole XY route is
// appended to a message when it is injected, each switch takes the first hop of
// it, and the route is stripped again when the message is delivered. Both give
// the same deliveries for the same injections.
// Mesh dimensions and buffer depth are not fixed by the document: 4 x 4 and 4
// are this design's defaults. Everything else follows the document's structure.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_W        = 4,
  parameter int unsigned MESH_H        = 4,
  parameter int unsigned BUF_DEPTH     = 4,
  parameter bit          SOURCE_ROUTED = 1'b0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [MESH_W*MESH_H-1:0]    inject_valid,
  input  msg_t [MESH_W*MESH_H-1:0]    inject_msg,
  output logic [MESH_W*MESH_H-1:0]    inject_ack,
  output logic [MESH_W*MESH_H-1:0]    eject_valid,
  output msg_t [MESH_W*MESH_H-1:0]    eject_msg,
  input  logic [MESH_W*MESH_H-1:0]    eject_ack
);

  localparam int unsigned NN = MESH_W * MESH_H;

  // Per-node switch ports.
  logic    [NN-1:0][NPORTS-1:0] rx, ack_rx, tx, ack_tx;
  packet_t [NN-1:0][NPORTS-1:0] data_in, data_out;

  for (genvar y = 0; y < int'(MESH_H); y++) begin : g_y
    for (genvar x = 0; x < int'(MESH_W); x++) begin : g_x
      localparam int unsigned N = y * MESH_W + x;

      hermes_router #(
        .X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH), .SOURCE_ROUTED(SOURCE_ROUTED)
      ) u_router (
        .clk     (clk),
        .rst_n   (rst_n),
        .rx      (rx[N]),
        .data_in (data_in[N]),
        .ack_rx  (ack_rx[N]),
        .tx      (tx[N]),
        .data_out(data_out[N]),
        .ack_tx  (ack_tx[N])
      );

      // Local port: injection, with the route appended in the source-routed mode.
      if (SOURCE_ROUTED) begin : g_src
        source_route_gen u_srg (
          .here('{x: coord_t'(x), y: coord_t'(y)}),
          .msg (inject_msg[N]),
          .pkt (data_in[N][PORT_L])
        );
      end else begin : g_dist
        assign data_in[N][PORT_L] = '{route: '0, msg: inject_msg[N]};
      end
      assign rx[N][PORT_L]  = inject_valid[N];
      assign inject_ack[N]  = ack_rx[N][PORT_L];
      // Local port: delivery, without the route.
      assign eject_valid[N]     = tx[N][PORT_L];
      assign eject_msg[N]       = data_out[N][PORT_L].msg;
      assign ack_tx[N][PORT_L]  = eject_ack[N];

      // East side: link to the West side of (x+1, y).
      if (x + 1 < int'(MESH_W)) begin : g_e
        assign rx[N][PORT_E]      = tx[N+1][PORT_W];
        assign data_in[N][PORT_E] = data_out[N+1][PORT_W];
        assign ack_tx[N][PORT_E]  = ack_rx[N+1][PORT_W];
      end else begin : g_e_edge
        assign rx[N][PORT_E]      = 1'b0;
        assign data_in[N][PORT_E] = '0;
        assign ack_tx[N][PORT_E]  = 1'b0;
      end
      // West side: link to the East side of (x-1, y).
      if (x > 0) begin : g_w
        assign rx[N][PORT_W]      = tx[N-1][PORT_E];
        assign data_in[N][PORT_W] = data_out[N-1][PORT_E];
        assign ack_tx[N][PORT_W]  = ack_rx[N-1][PORT_E];
      end else begin : g_w_edge
        assign rx[N][PORT_W]      = 1'b0;
        assign data_in[N][PORT_W] = '0;
        assign ack_tx[N][PORT_W]  = 1'b0;
      end
      // South side: link to the North side of (x, y+1).
      if (y + 1 < int'(MESH_H)) begin : g_s
        assign rx[N][PORT_S]      = tx[N+MESH_W][PORT_N];
        assign data_in[N][PORT_S] = data_out[N+MESH_W][PORT_N];
        assign ack_tx[N][PORT_S]  = ack_rx[N+MESH_W][PORT_N];
      end else begin : g_s_edge
        assign rx[N][PORT_S]      = 1'b0;
        assign data_in[N][PORT_S] = '0;
        assign ack_tx[N][PORT_S]  = 1'b0;
      end
      // North side: link to the South side of (x, y-1).
      if (y > 0) begin : g_n
        assign rx[N][PORT_N]      = tx[N-MESH_W][PORT_S];
        assign data_in[N][PORT_N] = data_out[N-MESH_W][PORT_S];
        assign ack_tx[N][PORT_N]  = ack_rx[N-MESH_W][PORT_S];
      end else begin : g_n_edge
        assign rx[N][PORT_N]      = 1'b0;
        assign data_in[N][PORT_N] = '0;
        assign ack_tx[N][PORT_N]  = 1'b0;
      end
    end
  end

endmodule
