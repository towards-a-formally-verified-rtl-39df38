// tb_flow_control: self-checking test of the packet-switching scheduler.
// Random head-packet requests and output-buffer states are applied. The testbench
// keeps its own round-robin pointer per output and predicts, for every output,
// which input (if any) is moved: only requesters of an empty output compete, the
// first at or after the pointer wins. pop, load and sel are compared with that.
// Contention (two inputs for one output) and blocking (requested output full)
// must both occur.
module tb_flow_control;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  [NPORTS-1:0] valid, out_full, pop, load;
  port_e [NPORTS-1:0] dir;
  logic  [NPORTS-1:0][2:0] sel;
  int checks = 0, failures = 0, conflicts = 0, blocked = 0;
  int ptr[NPORTS];

  flow_control dut (.clk(clk), .rst_n(rst_n), .valid(valid), .dir(dir), .out_full(out_full),
    .pop(pop), .load(load), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPORTS-1:0] exp_pop, exp_load;
    int exp_sel[NPORTS];
    valid = '0; out_full = '0; dir = '0;
    foreach (ptr[j]) ptr[j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      valid = NPORTS'($urandom);
      out_full = NPORTS'($urandom) & NPORTS'($urandom);
      for (int i = 0; i < int'(NPORTS); i++) dir[i] = port_e'($urandom_range(0, 4));
      #1;
      exp_pop = '0; exp_load = '0;
      for (int j = 0; j < int'(NPORTS); j++) begin
        int nreq;
        nreq = 0;
        exp_sel[j] = -1;
        for (int i = 0; i < int'(NPORTS); i++)
          if (valid[i] && int'(dir[i]) == j) begin
            nreq++;
            if (out_full[j]) blocked++;
          end
        if (nreq > 1 && !out_full[j]) conflicts++;
        if (!out_full[j])
          for (int k = 0; k < int'(NPORTS); k++) begin
            int i;
            i = (ptr[j] + k) % NPORTS;
            if (exp_sel[j] < 0 && valid[i] && int'(dir[i]) == j) exp_sel[j] = i;
          end
        if (exp_sel[j] >= 0) begin
          exp_load[j] = 1'b1;
          exp_pop[exp_sel[j]] = 1'b1;
        end
      end
      checks++;
      if (pop !== exp_pop || load !== exp_load) begin
        failures++; $display("t=%0d pop %b/%b load %b/%b", t, pop, exp_pop, load, exp_load);
      end
      for (int j = 0; j < int'(NPORTS); j++)
        if (exp_sel[j] >= 0) begin
          checks++;
          if (int'(sel[j]) != exp_sel[j]) begin failures++; $display("t=%0d sel[%0d]", t, j); end
          ptr[j] = (exp_sel[j] + 1) % NPORTS;
        end
      @(posedge clk);
    end
    checks++;
    if (conflicts == 0 || blocked == 0) begin failures++; $display("no contention or blocking seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
