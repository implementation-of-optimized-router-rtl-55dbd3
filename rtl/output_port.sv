// output_port: switch arbitration and flow-control state of one output.
//
// The five inputs that want this output in a cycle are arbitrated by a
// fixed-priority arbiter (input 0, the local port, highest). The port
// keeps, for each of the four VCs of the downstream buffer, a credit counter
// (how many of the four flit slots downstream are free) and an ownership
// record: a multi-flit packet takes the output VC with its head flit and
// gives it up with its tail, so flits of two packets never mix in one
// downstream VC buffer. The inputs see the credit and ownership state and
// only request when they may send, so a grant always sends. Credits count
// down when a flit is granted and up on a credit pulse from downstream.
// Fixed-priority arbitration is the router's; credits and VC ownership
// are this design's choice of flow control, which the router description
// does not give.
//
// Timing: the grant is combinational from the requests. Credit and
// ownership change at the clock edge that ends the grant cycle. A credit
// pulse counts as available in the cycle it arrives.
module output_port
  import noc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NPORTS-1:0]             req,       // input i wants this output
  input  logic [NPORTS-1:0][VC_W-1:0]   req_vc,
  input  logic [NPORTS-1:0]             req_head,
  input  logic [NPORTS-1:0]             req_tail,
  output logic [NPORTS-1:0]             gnt,
  output logic [PORT_W-1:0]             gnt_idx,
  output logic                          gnt_valid,
  input  logic [NVC-1:0]                credit_in,  // from the downstream buffer
  output logic [NVC-1:0]                credit_ok,
  output logic [NVC-1:0]                locked,
  output logic [NVC-1:0][PORT_W-1:0]    owner
);
  localparam int unsigned CW = $clog2(VC_DEPTH + 1);
  logic [NVC-1:0][CW-1:0] credits;
  logic [VC_W-1:0] g_vc;
  logic g_head, g_tail;

  fp_arbiter #(.N(NPORTS)) u_arb (
    .req(req), .gnt(gnt), .gnt_idx(gnt_idx), .gnt_valid(gnt_valid)
  );

  assign g_vc   = req_vc[gnt_idx];
  assign g_head = req_head[gnt_idx];
  assign g_tail = req_tail[gnt_idx];

  for (genvar v = 0; v < NVC; v++) begin : g_vc_state
    logic take;
    assign take = gnt_valid && g_vc == VC_W'(v);
    // A credit arriving this cycle can be spent this cycle: this keeps the
    // credit round trip at four cycles, so one VC can stream at full rate.
    assign credit_ok[v] = credits[v] != '0 || credit_in[v];

    always_ff @(posedge clk) begin
      if (rst) begin
        credits[v] <= CW'(VC_DEPTH);
        locked[v]  <= 1'b0;
        owner[v]   <= '0;
      end else begin
        credits[v] <= credits[v] - CW'(take) + CW'(credit_in[v]);
        if (take && g_head && !g_tail) begin
          locked[v] <= 1'b1;
          owner[v]  <= gnt_idx;
        end else if (take && g_tail) begin
          locked[v] <= 1'b0;
        end
      end
    end

    a_credit_range: assert property (@(posedge clk) disable iff (rst)
      credits[v] <= CW'(VC_DEPTH));
    a_send_with_credit: assert property (@(posedge clk) disable iff (rst)
      take |-> credit_ok[v]);
  end
endmodule
