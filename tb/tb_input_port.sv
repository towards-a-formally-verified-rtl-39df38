// tb_input_port: self-checking test of the input unit (handshake receiver and
// packet queue). Random requests and pops; a queue in the testbench predicts the
// head packet and whether the grant must be given (room left) or denied (full).
// Both the accepted and the denied case must occur.
module tb_input_port;
  import noc_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic rx, ack_rx, head_valid, pop;
  packet_t data_in, head;
  packet_t model[$];
  int checks = 0, failures = 0, denied = 0, accepted = 0;

  input_port #(.BUF_DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .rx(rx), .data_in(data_in),
    .ack_rx(ack_rx), .head(head), .head_valid(head_valid), .pop(pop));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = 0; pop = 0; data_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      rx = ($urandom_range(0, 99) < 60);
      data_in = '0;
      data_in.msg.data = $urandom;
      data_in.route[0] = 3'($urandom);
      // pop less often in the first half so the queue fills
      pop = (model.size() > 0) && head_valid && ($urandom_range(0, 99) < ((t < 2000) ? 30 : 70));
      #1;
      checks++;
      if (ack_rx !== (rx && model.size() < DEPTH)) begin
        failures++; $display("ack mismatch t=%0d", t);
      end
      checks++;
      if (head_valid !== (model.size() > 0)) begin
        failures++; $display("valid mismatch t=%0d", t);
      end
      if (model.size() > 0) begin
        checks++;
        if (head !== model[0]) begin failures++; $display("head mismatch t=%0d", t); end
      end
      if (rx && !ack_rx) denied++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (rx && model.size() + (pop ? 1 : 0) < DEPTH) begin
        model.push_back(data_in);
        accepted++;
      end
    end
    checks++;
    if (denied == 0 || accepted == 0) begin failures++; $display("grant or deny never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
