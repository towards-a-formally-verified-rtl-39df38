// tb_output_port: self-checking test of the one-place output buffer and the
// sending side of the handshake. Packets are loaded only into an empty buffer;
// the receiver grants at random. The testbench checks that tx rises after the
// load, stays with unchanged data while denied, falls after the grant, and that
// every packet arrives once. A source-routed instance must drop the first hop.
module tb_output_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, full, tx, ack_tx, full2, tx2;
  packet_t load_data, data_out, data_out2;
  int checks = 0, failures = 0, sent = 0, got = 0, held = 0;
  packet_t cur;
  bit have;

  output_port #(.SOURCE_ROUTED(1'b0)) dut (.clk(clk), .rst_n(rst_n), .load(load),
    .load_data(load_data), .full(full), .tx(tx), .data_out(data_out), .ack_tx(ack_tx));
  output_port #(.SOURCE_ROUTED(1'b1)) dut2 (.clk(clk), .rst_n(rst_n), .load(load),
    .load_data(load_data), .full(full2), .tx(tx2), .data_out(data_out2), .ack_tx(ack_tx));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; ack_tx = 0; load_data = '0; have = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (tx !== have || full !== have || tx2 !== have) begin
        failures++; $display("tx/full mismatch t=%0d", t);
      end
      if (have) begin
        checks++;
        if (data_out !== cur) begin failures++; $display("data mismatch t=%0d", t); end
        checks++;
        if (data_out2.msg !== cur.msg || data_out2.route !== route_shift(cur.route)) begin
          failures++; $display("route shift mismatch t=%0d", t);
        end
      end
      ack_tx = ($urandom_range(0, 99) < 40);
      load = !have && ($urandom_range(0, 99) < 70);
      load_data.msg.data = $urandom;
      load_data.msg.dst  = 6'($urandom);
      for (int k = 0; k < int'(MAX_HOPS); k++) load_data.route[k] = 3'($urandom_range(0, 4));
      @(posedge clk);
      if (have && ack_tx) begin have = 0; got++; end
      else if (have) held++;
      if (load) begin cur = load_data; have = 1; sent++; end
    end
    checks++;
    if (held == 0 || got == 0) begin failures++; $display("hold or send never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
