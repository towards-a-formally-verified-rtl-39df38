// flow_control: packet-switching flow control of one switch (the crossbar
// scheduler).
//
// Each input port i with a packet (valid[i]) requests the output port dir[i]
// chosen by its route control. An output port accepts a packet only when its
// one-place buffer is empty (out_full low). Among the inputs requesting the same
// free output, a round-robin arbiter per output picks one. For a granted pair the
// packet is moved whole: pop[i] removes it from the input buffer and load[j] with
// sel[j] = i loads it into the output buffer, in the same cycle. An input whose
// output is busy is simply not granted and keeps requesting.
// The empty-buffer rule and round-robin priority follow the document; the
// one-cycle transfer is this design's choice. Combinational apart from the
// arbiters' pointers.
module flow_control
  import noc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic  [NPORTS-1:0]        valid,
  input  port_e [NPORTS-1:0]        dir,
  input  logic  [NPORTS-1:0]        out_full,
  output logic  [NPORTS-1:0]        pop,
  output logic  [NPORTS-1:0]        load,
  output logic  [NPORTS-1:0][2:0]   sel
);

  // req_m[j][i]: input i wants output j; gnt_m[j][i]: granted.
  logic [NPORTS-1:0][NPORTS-1:0] req_m, gnt_m;

  always_comb begin
    for (int j = 0; j < int'(NPORTS); j++)
      for (int i = 0; i < int'(NPORTS); i++)
        req_m[j][i] = valid[i] && (dir[i] == port_e'(j)) && !out_full[j];
  end

  for (genvar j = 0; j < int'(NPORTS); j++) begin : g_arb
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk  (clk),
      .rst_n(rst_n),
      .req  (req_m[j]),
      .gnt  (gnt_m[j])
    );
  end

  always_comb begin
    pop  = '0;
    load = '0;
    sel  = '0;
    for (int j = 0; j < int'(NPORTS); j++) begin
      load[j] = |gnt_m[j];
      for (int i = 0; i < int'(NPORTS); i++) begin
        if (gnt_m[j][i]) begin
          pop[i] = 1'b1;
          sel[j] = 3'(i);
        end
      end
    end
  end

endmodule
