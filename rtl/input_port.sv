// input_port: input unit of one switch port: the receiving side of the link
// handshake and the input buffer queue.
//
// Handshake: the sender raises rx (its Tx) and holds the packet on data_in until
// it sees ack_rx (its AckTx). ack_rx is granted in the same cycle when the queue
// has room and denied while it is full; a packet moves on a cycle where both rx
// and ack_rx are high. The queue is a first-in first-out buffer of BUF_DEPTH
// whole packets; head/head_valid show the oldest one, and pop removes it.
// One packet can enter and one leave per cycle. The request/grant handshake and
// the input queue follow the document; the depth and the same-cycle grant are
// this design's choices.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // link side
  input  logic    rx,
  input  packet_t data_in,
  output logic    ack_rx,
  // switch side
  output packet_t head,
  output logic    head_valid,
  input  logic    pop
);

  localparam int unsigned AW = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1;

  packet_t               mem [BUF_DEPTH];
  logic [AW-1:0]         rd_ptr, wr_ptr;
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);
  logic [CW-1:0]         count;
  logic                  push, full;

  assign full       = (count == CW'(BUF_DEPTH));
  assign ack_rx     = rx && !full;
  assign push       = rx && ack_rx;
  assign head_valid = (count != '0);
  assign head       = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(BUF_DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push)
        wr_ptr <= incr(wr_ptr);
      if (pop && head_valid)
        rd_ptr <= incr(rd_ptr);
      count <= count + CW'(push) - CW'(pop && head_valid);
    end
  end

  always_ff @(posedge clk) begin
    if (push)
      mem[wr_ptr] <= data_in;
  end

  // Popping an empty queue is a fault of the switch.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
