// tb_hermes_router: self-checking test of one switch, placed at (1, 1) of a 3 x 3
// mesh so that all five ports are used. Each input gets packets whose destination
// is one that XY routing can send through that input (no U-turns); the expected
// output port is computed here from the XY rule. Receivers grant at random.
// Checks: every packet leaves exactly once, on the expected port, unchanged; a
// lone packet in an idle switch is offered on its output one cycle after it is
// accepted and crosses the link at the next edge (two cycles per hop);
// contention for an output port and a denied handshake both occur.
module tb_hermes_router;
  import noc_pkg::*;
  localparam int NP = int'(NPORTS);
  logic clk = 0, rst_n = 0;
  logic    [NPORTS-1:0] rx, ack_rx, tx, ack_tx;
  packet_t [NPORTS-1:0] data_in, data_out;
  int checks = 0, failures = 0, sent = 0, got = 0, denied = 0, contention = 0;
  int exp_port[int];
  int seq = 0;

  hermes_router #(.X(1), .Y(1), .BUF_DEPTH(2)) dut (.clk(clk), .rst_n(rst_n), .rx(rx),
    .data_in(data_in), .ack_rx(ack_rx), .tx(tx), .data_out(data_out), .ack_tx(ack_tx));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xy_ref(int dx, int dy);
    if (dx == 1 && dy == 1) return 0;
    if (dx > 1) return 1;
    if (dx < 1) return 2;
    if (dy > 1) return 4;
    return 3;
  endfunction

  // A destination that can arrive through input port p under XY routing.
  function automatic void pick_dst(int p, output int dx, output int dy);
    case (p)
      1: begin dx = $urandom_range(0, 1); dy = $urandom_range(0, 2); end // from East: going West
      2: begin dx = $urandom_range(1, 2); dy = $urandom_range(0, 2); end // from West: going East
      3: begin dx = 1; dy = $urandom_range(1, 2); end                  // from North: going South
      4: begin dx = 1; dy = $urandom_range(0, 1); end                  // from South: going North
      default: begin dx = $urandom_range(0, 2); dy = $urandom_range(0, 2); end
    endcase
  endfunction

  function automatic packet_t new_pkt(int p);
    packet_t k;
    int dx, dy;
    pick_dst(p, dx, dy);
    k = '0;
    k.msg.dst.x = 3'(dx);
    k.msg.dst.y = 3'(dy);
    k.msg.data  = 32'(seq);
    exp_port[seq] = xy_ref(dx, dy);
    seq++;
    return k;
  endfunction

  // Receivers: check what leaves.
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (tx[p] && !ack_tx[p]) denied++;
      if (tx[p] && ack_tx[p]) begin
        int id;
        id = int'(data_out[p].msg.data);
        checks++;
        if (!exp_port.exists(id) || exp_port[id] != p) begin
          failures++; $display("packet %0d left on port %0d", id, p);
        end else begin
          exp_port.delete(id);
          got++;
        end
      end
    end
    for (int j = 0; j < NP; j++) begin
      int n;
      n = 0;
      for (int i = 0; i < NP; i++)
        if (dut.u_fc.req_m[j][i]) n++;
      if (n > 1) contention++;
    end
  end

  initial begin
    int lat;
    rx = '0; ack_tx = '0; data_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Latency: one packet West -> East through an idle switch.
    @(negedge clk);
    ack_tx = '1;
    data_in[2] = new_pkt(2);
    data_in[2].msg.dst.x = 3'd2; data_in[2].msg.dst.y = 3'd1;
    exp_port[seq-1] = 1;
    rx[2] = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rx[2] = 1'b0;
    lat = 0;   // clock edges since acceptance
    while (!tx[1] && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 1) begin failures++; $display("latency %0d, expected 1", lat); end
    sent++;
    // Random traffic on all ports.
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        if (!rx[p] && $urandom_range(0, 99) < 50 && t < 3500) begin
          data_in[p] = new_pkt(p);
          rx[p] = 1'b1;
        end
        ack_tx[p] = ($urandom_range(0, 99) < 60);
      end
      @(posedge clk);
      #1;
      for (int p = 0; p < NP; p++)
        if (rx[p] && ack_rx[p]) begin rx[p] = 1'b0; sent++; end
    end
    checks++;
    if (got != sent || exp_port.size() != 0) begin
      failures++; $display("sent %0d got %0d outstanding %0d", sent, got, exp_port.size());
    end
    checks++;
    if (denied == 0 || contention == 0) begin failures++; $display("no denial or contention"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
