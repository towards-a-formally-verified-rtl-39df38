// tb_noc_mesh: end-to-end test of the mesh at its default size (4 x 4, hop-by-hop
// XY routing), driving every IP port.
//
// 1. Latency: in an idle network a packet from (0,0) to (3,3) must be delivered
//    2*hops+1 = 13 cycles after it is accepted, and a packet to its own node
//    after 1 cycle.
// 2. Uniform random traffic, then hot spots (every node sends to node 0, then to
//    the opposite corner) while
//    the IP cores accept deliveries only some of the time.
// Every delivered message is checked against a scoreboard: right node, right
// source, payload unchanged, delivered once; at the end nothing is missing.
// Each mechanism of the design is counted and must occur: delivery to the own
// node, hops in each of the four directions, a denied link handshake, a denied
// injection, two inputs competing for one output, and a packet blocked by a
// busy output buffer.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int W = 4, H = 4, NN = W * H;
  logic clk = 0, rst_n = 0;
  logic [NN-1:0] inject_valid, inject_ack, eject_valid, eject_ack;
  msg_t [NN-1:0] inject_msg, eject_msg;
  int checks = 0, failures = 0, sent = 0, got = 0;
  int exp_node[int];
  int exp_src[int];
  int seq = 0;
  // mechanism counters
  int n_local = 0, n_dir[5], n_link_deny = 0, n_inj_deny = 0;
  int n_conflict[NN], n_blocked[NN];

  noc_mesh dut (.clk(clk), .rst_n(rst_n), .inject_valid(inject_valid), .inject_msg(inject_msg),
    .inject_ack(inject_ack), .eject_valid(eject_valid), .eject_msg(eject_msg), .eject_ack(eject_ack));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Internal events per switch.
  for (genvar gy = 0; gy < H; gy++) begin : g_py
    for (genvar gx = 0; gx < W; gx++) begin : g_px
      localparam int N = gy * W + gx;
      always @(posedge clk) if (rst_n) begin
        for (int j = 0; j < int'(NPORTS); j++) begin
          int n;
          n = 0;
          for (int i = 0; i < int'(NPORTS); i++)
            if (dut.g_y[gy].g_x[gx].u_router.u_fc.req_m[j][i]) n++;
          if (n > 1) n_conflict[N]++;
        end
        for (int i = 0; i < int'(NPORTS); i++)
          if (dut.g_y[gy].g_x[gx].u_router.head_valid[i] &&
              dut.g_y[gy].g_x[gx].u_router.out_full[dut.g_y[gy].g_x[gx].u_router.dir[i]])
            n_blocked[N]++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      for (int p = 1; p < int'(NPORTS); p++) begin
        if (dut.tx[n][p] && dut.ack_tx[n][p]) n_dir[p]++;
        if (dut.tx[n][p] && !dut.ack_tx[n][p]) n_link_deny++;
      end
      if (inject_valid[n] && !inject_ack[n]) n_inj_deny++;
      if (eject_valid[n] && eject_ack[n]) begin
        int id;
        id = int'(eject_msg[n].data);
        checks++;
        if (!exp_node.exists(id) || exp_node[id] != n || exp_src[id] != int'(eject_msg[n].src)
            || int'(eject_msg[n].dst) != int'({3'(n % W), 3'(n / W)})) begin
          failures++; $display("bad delivery id=%0d at node %0d", id, n);
        end else begin
          if (exp_src[id] == int'(eject_msg[n].dst)) n_local++;
          exp_node.delete(id);
          exp_src.delete(id);
          got++;
        end
      end
    end
  end

  function automatic msg_t new_msg(int src, int dst);
    msg_t m;
    m.src.x = 3'(src % W); m.src.y = 3'(src / W);
    m.dst.x = 3'(dst % W); m.dst.y = 3'(dst / W);
    m.data = 32'(seq);
    exp_node[seq] = dst;
    exp_src[seq] = int'(m.src);
    seq++;
    return m;
  endfunction

  // Send one message from src to dst into an idle network; return the cycles
  // from acceptance to delivery.
  task automatic lone_packet(int src, int dst, output int lat);
    @(negedge clk);
    inject_msg[src] = new_msg(src, dst);
    inject_valid[src] = 1'b1;
    @(posedge clk);                 // accepted at this edge
    @(negedge clk);
    inject_valid[src] = 1'b0;
    sent++;
    lat = 0;                        // clock edges since acceptance
    while (!eject_valid[dst] && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    @(posedge clk);
  endtask

  task automatic traffic(int cycles, int rate, int hotspot, int ack_rate);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      for (int n = 0; n < NN; n++) begin
        if (!inject_valid[n] && $urandom_range(0, 99) < rate) begin
          inject_msg[n] = new_msg(n, (hotspot >= 0) ? hotspot : $urandom_range(0, NN - 1));
          inject_valid[n] = 1'b1;
        end
        eject_ack[n] = ($urandom_range(0, 99) < ack_rate);
      end
      @(posedge clk);
      #1;
      for (int n = 0; n < NN; n++)
        if (inject_valid[n] && inject_ack[n]) begin inject_valid[n] = 1'b0; sent++; end
    end
  endtask

  initial begin
    int lat;
    foreach (n_dir[p]) n_dir[p] = 0;
    foreach (n_conflict[n]) begin n_conflict[n] = 0; n_blocked[n] = 0; end
    inject_valid = '0; inject_msg = '0; eject_ack = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    lone_packet(0, NN - 1, lat);
    checks++;
    if (lat != 2 * ((W - 1) + (H - 1)) + 1) begin failures++; $display("corner latency %0d", lat); end
    lone_packet(5, 5, lat);
    checks++;
    if (lat != 1) begin failures++; $display("local latency %0d", lat); end
    traffic(3000, 20, -1, 80);      // uniform
    traffic(1000, 60, 0, 50);       // hot spot at the north-west corner
    traffic(1000, 60, NN - 1, 50);  // hot spot at the south-east corner
    traffic(500, 0, -1, 100);       // drain
    checks++;
    if (got != sent || exp_node.size() != 0) begin
      failures++; $display("sent %0d delivered %0d missing %0d", sent, got, exp_node.size());
    end
    begin
      int conf, blk;
      conf = 0; blk = 0;
      foreach (n_conflict[n]) begin conf += n_conflict[n]; blk += n_blocked[n]; end
      $display("delivered=%0d local=%0d E=%0d W=%0d N=%0d S=%0d link_deny=%0d inject_deny=%0d conflict=%0d blocked=%0d",
               got, n_local, n_dir[1], n_dir[2], n_dir[3], n_dir[4], n_link_deny, n_inj_deny, conf, blk);
      foreach (n_dir[p]) if (p > 0) begin checks++; if (n_dir[p] == 0) failures++; end
      checks++; if (n_local == 0) failures++;
      checks++; if (n_link_deny == 0) failures++;
      checks++; if (n_inj_deny == 0) failures++;
      checks++; if (conf == 0) failures++;
      checks++; if (blk == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
