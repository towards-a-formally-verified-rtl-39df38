// tb_source_route_gen: self-checking test of route computation at injection.
// For random source/destination pairs in an 8 x 8 mesh the produced route is
// walked hop by hop here: it must contain only X moves before Y moves, each move
// must go towards the destination, it must end with Local exactly at the
// destination after |dx|+|dy| moves, the entries after Local must be zero and the
// message must pass unchanged.
module tb_source_route_gen;
  import noc_pkg::*;
  xy_t     here;
  msg_t    msg;
  packet_t pkt;
  int checks = 0, failures = 0;

  source_route_gen dut (.here(here), .msg(msg), .pkt(pkt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int cx, cy, tx, ty, n, k;
      bit ok, in_y, ended;
      here.x = 3'($urandom); here.y = 3'($urandom);
      msg.dst.x = 3'($urandom); msg.dst.y = 3'($urandom);
      msg.src = here; msg.data = $urandom;
      #1;
      cx = int'(here.x); cy = int'(here.y); tx = int'(msg.dst.x); ty = int'(msg.dst.y);
      ok = 1; in_y = 0; ended = 0; n = 0;
      for (k = 0; k < int'(MAX_HOPS); k++) begin
        int h;
        h = int'(pkt.route[k]);
        if (ended) begin
          if (h != 0) ok = 0;
        end else begin
          case (h)
            0: begin ended = 1; if (cx != tx || cy != ty) ok = 0; end
            1: begin if (in_y || cx >= tx) ok = 0; cx++; n++; end
            2: begin if (in_y || cx <= tx) ok = 0; cx--; n++; end
            3: begin in_y = 1; if (cx != tx || cy <= ty) ok = 0; cy--; n++; end
            4: begin in_y = 1; if (cx != tx || cy >= ty) ok = 0; cy++; n++; end
            default: ok = 0;
          endcase
        end
      end
      if (!ended) ok = 0;
      if (n != ((tx > int'(here.x)) ? tx - int'(here.x) : int'(here.x) - tx)
             + ((ty > int'(here.y)) ? ty - int'(here.y) : int'(here.y) - ty)) ok = 0;
      if (pkt.msg !== msg) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("bad route from (%0d,%0d) to (%0d,%0d): %h", here.x, here.y, tx, ty, pkt.route);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
