// fp_arbiter: fixed-priority arbiter.
//
// Each requester has a fixed priority level given by its index: request 0
// has the highest priority, request N-1 the lowest. The grant is one-hot and
// goes to the active request of highest priority; with no request the grant
// is zero. Combinational, no state. Fixed priority is the arbitration scheme
// of the router; which index is highest is this design's choice.
module fp_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]         req,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_valid
);
  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        gnt       = '0;
        gnt[i]    = 1'b1;
        gnt_idx   = $clog2(N)'(i);
        gnt_valid = 1'b1;
      end
    end
  end
endmodule
