// fixed_prio_arb -- combinational fixed-priority arbiter.
//
// Grants the lowest-numbered requester: gnt is one-hot, or all zero when
// nothing is requested. Used for the per-port arbiters of the SCAC-Net
// routers. The routers are given a priority scheme but no detail of it; a
// fixed priority is this design's choice. Because every node uses the same
// direction, each arbiter sees at most one request in normal operation.
module fixed_prio_arb #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  always_comb begin
    gnt = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (req[i] && gnt == '0) gnt[i] = 1'b1;
    end
  end
endmodule
