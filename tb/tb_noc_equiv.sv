// tb_noc_equiv: the two routing modes of the mesh side by side.
//
// A hop-by-hop mesh (routing decided by XY at each switch) and a source-routed
// mesh (complete XY route appended at injection, each switch takes the first hop
// and drops it) receive identical injections and identical delivery grants. As
// the route is removed on delivery, both must accept the same messages in the
// same cycles and deliver the same messages at the same nodes in the same cycles;
// every cycle all IP-side outputs of the two are compared. Random traffic with
// back-pressure is run, then the network is drained. The mesh is 8 x 8, the
// largest the 3-bit coordinates allow, so routes of the full 15-hop length
// (corner to corner) must occur.
module tb_noc_equiv;
  import noc_pkg::*;
  localparam int W = 8, H = 8, NN = W * H;
  logic clk = 0, rst_n = 0;
  logic [NN-1:0] inject_valid, eject_ack;
  msg_t [NN-1:0] inject_msg;
  logic [NN-1:0] ack_hop, ack_src, ev_hop, ev_src;
  msg_t [NN-1:0] em_hop, em_src;
  int checks = 0, failures = 0, delivered = 0, seq = 0, longest = 0;

  noc_mesh #(.MESH_W(W), .MESH_H(H), .SOURCE_ROUTED(1'b0)) dut_hop (.clk(clk), .rst_n(rst_n),
    .inject_valid(inject_valid), .inject_msg(inject_msg), .inject_ack(ack_hop),
    .eject_valid(ev_hop), .eject_msg(em_hop), .eject_ack(eject_ack));
  noc_mesh #(.MESH_W(W), .MESH_H(H), .SOURCE_ROUTED(1'b1)) dut_src (.clk(clk), .rst_n(rst_n),
    .inject_valid(inject_valid), .inject_msg(inject_msg), .inject_ack(ack_src),
    .eject_valid(ev_src), .eject_msg(em_src), .eject_ack(eject_ack));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (ack_hop !== ack_src || ev_hop !== ev_src) begin
      failures++; $display("handshake differs: ack %h/%h valid %h/%h", ack_hop, ack_src, ev_hop, ev_src);
    end
    for (int n = 0; n < NN; n++)
      if (ev_hop[n]) begin
        checks++;
        if (em_hop[n] !== em_src[n]) begin failures++; $display("message differs at node %0d", n); end
      end
  end

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < NN; n++) if (ev_hop[n] && eject_ack[n]) delivered++;

  initial begin
    inject_valid = '0; inject_msg = '0; eject_ack = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int n = 0; n < NN; n++) begin
        if (!inject_valid[n] && t < 3500 && $urandom_range(0, 99) < 30) begin
          inject_msg[n].src.x = 3'(n % W);
          inject_msg[n].src.y = 3'(n / W);
          inject_msg[n].dst.x = 3'($urandom_range(0, W - 1));
          inject_msg[n].dst.y = 3'($urandom_range(0, H - 1));
          inject_msg[n].data  = 32'(seq++);
          inject_valid[n] = 1'b1;
          if (n == 0 && inject_msg[n].dst.x == 3'(W - 1) && inject_msg[n].dst.y == 3'(H - 1)) longest++;
        end
        eject_ack[n] = (t >= 3500) || ($urandom_range(0, 99) < 60);
      end
      @(posedge clk);
      #1;
      for (int n = 0; n < NN; n++) if (inject_valid[n] && ack_hop[n]) inject_valid[n] = 1'b0;
    end
    checks++;
    if (delivered == 0 || delivered != seq - $countones(inject_valid)) begin
      failures++; $display("delivered %0d of %0d", delivered, seq);
    end
    checks++;
    if (longest == 0) begin failures++; $display("no corner-to-corner route"); end
    $display("delivered=%0d corner_to_corner=%0d", delivered, longest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
