// output_port: output unit of one switch port: the one-place output buffer and
// the sending side of the link handshake.
//
// The switch loads a packet with load/load_data only while the buffer is empty
// (full low). While it holds a packet the port raises tx (the receiver's Rx) and
// drives the packet on data_out; the packet leaves, and the buffer empties, on a
// cycle where ack_tx (the receiver's AckRx) is high. Until then tx stays high and
// data_out stays unchanged. The buffer cannot be reloaded in the cycle it
// empties, so a port passes at most one packet every two cycles.
// With SOURCE_ROUTED set, the hop just taken is removed from the route as the
// packet crosses the link, so the next switch finds its own hop first.
// The one-place buffer, the empty-buffer rule and the handshake follow the
// document; the exact cycle timing is this design's choice.
module output_port
  import noc_pkg::*;
#(
  parameter bit SOURCE_ROUTED = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  // switch side
  input  logic    load,
  input  packet_t load_data,
  output logic    full,
  // link side
  output logic    tx,
  output packet_t data_out,
  input  logic    ack_tx
);

  packet_t buf_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= 1'b0;
    end else if (load) begin
      full <= 1'b1;
    end else if (tx && ack_tx) begin
      full <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (load)
      buf_q <= load_data;
  end

  assign tx = full;

  always_comb begin
    data_out = buf_q;
    if (SOURCE_ROUTED)
      data_out.route = route_shift(buf_q.route);
  end

  // A packet is only loaded into an empty buffer.
  a_load_empty: assert property (@(posedge clk) disable iff (!rst_n) load |-> !full);
  // Request stays active, with the same data, until it is granted.
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              tx && !ack_tx |=> tx && $stable(data_out));

endmodule
