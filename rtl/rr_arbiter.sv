// rr_arbiter: round-robin arbiter for one output port of a switch.
//
// Grants one of N requests (one-hot gnt). The search starts at the request after
// the one granted last, so every requester is served within N grants. The
// pointer moves only on a cycle where a grant is given. Combinational grant,
// registered pointer. Round-robin priority follows the document; the
// pointer-based form is this design's.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] ptr;   // highest priority requester this cycle
  logic [PW-1:0] winner;
  logic          any;

  always_comb begin
    int unsigned idx;
    gnt    = '0;
    winner = ptr;
    any    = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      idx = int'(ptr) + i;
      if (idx >= N) idx = idx - N;
      if (!any && req[idx[PW-1:0]]) begin
        any              = 1'b1;
        winner           = idx[PW-1:0];
        gnt[idx[PW-1:0]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      ptr <= '0;
    else if (any)
      ptr <= (winner == PW'(N - 1)) ? '0 : winner + PW'(1);
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
