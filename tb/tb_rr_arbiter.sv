// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Random request patterns are applied; the expected grant comes from a separate
// reference (a priority pointer kept by the testbench: the first requester at or
// after the one following the last winner). A phase with all five requesting
// checks that the grant visits 0,1,2,3,4 in turn.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  int checks = 0, failures = 0;
  int ref_ptr;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req(req), .gnt(gnt));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ref_grant(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++)
      if (r[(p + k) % N]) return (N'(1) << ((p + k) % N));
    return '0;
  endfunction

  task automatic step_check(logic [N-1:0] r);
    logic [N-1:0] exp_g;
    req = r;
    #1;
    exp_g = ref_grant(r, ref_ptr);
    checks++;
    if (gnt !== exp_g) begin
      failures++;
      $display("mismatch req=%b gnt=%b exp=%b ptr=%0d", r, gnt, exp_g, ref_ptr);
    end
    for (int k = 0; k < N; k++) if (exp_g[k]) ref_ptr = (k + 1) % N;
    @(posedge clk);
    #1;
  endtask

  initial begin
    req = '0;
    ref_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // all requesting: strict rotation
    for (int k = 0; k < 2 * N; k++) begin
      step_check('1);
      checks++;
      if (ref_ptr != (k + 1) % N) failures++;
    end
    for (int t = 0; t < 1000; t++)
      step_check(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
