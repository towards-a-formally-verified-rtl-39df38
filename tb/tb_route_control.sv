// tb_route_control: self-checking test of the per-port routing decision.
// A hop-by-hop instance at (2, 1) is given every destination of an 8 x 8 mesh and
// its choice is compared with the XY rule written out here (Local at the
// destination, East/West while the column differs, then South/North with y
// growing southward). A source-routed instance must return the first hop of the
// route the packet carries, whatever its destination.
module tb_route_control;
  import noc_pkg::*;
  packet_t pkt;
  port_e   op_xy, op_src;
  int checks = 0, failures = 0;

  route_control #(.X(2), .Y(1), .SOURCE_ROUTED(1'b0)) dut_xy  (.pkt(pkt), .out_port(op_xy));
  route_control #(.X(2), .Y(1), .SOURCE_ROUTED(1'b1)) dut_src (.pkt(pkt), .out_port(op_src));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex;
    for (int dx = 0; dx < 8; dx++) begin
      for (int dy = 0; dy < 8; dy++) begin
        pkt = '0;
        pkt.msg.dst.x = 3'(dx);
        pkt.msg.dst.y = 3'(dy);
        pkt.msg.data  = $urandom;
        pkt.route[0]  = 3'($urandom_range(0, 4));
        for (int k = 1; k < int'(MAX_HOPS); k++) pkt.route[k] = 3'($urandom_range(0, 4));
        #1;
        if (dx == 2 && dy == 1) ex = 0;
        else if (dx > 2) ex = 1;
        else if (dx < 2) ex = 2;
        else if (dy > 1) ex = 4;
        else ex = 3;
        checks++;
        if (int'(op_xy) != ex) begin
          failures++;
          $display("XY mismatch dst=(%0d,%0d) got %0d exp %0d", dx, dy, op_xy, ex);
        end
        checks++;
        if (op_src !== port_e'(pkt.route[0])) begin
          failures++;
          $display("source mismatch got %0d exp %0d", op_src, pkt.route[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
