// input_port: one of the router's five inputs.
//
// Flits arriving on the link are written into the buffer of the virtual
// channel named by the link's VC field: four VCs, each a four-flit vc_fifo
// with its own vc_ctrl routing FSM. Each cycle the port offers at most one
// flit to the switch: among the VCs whose FSM requests, whose output VC has
// a free credit and whose output VC is either free (for a head flit) or
// already held by this port, the lowest-numbered VC wins. That VC choice is
// fixed priority, like the switch arbiters; the router description does not
// say how an input chooses among its VCs. When the switch grants the offer
// the flit is read out of its buffer, and one clock later a credit pulse
// for that VC is sent upstream. All of the choices in this paragraph are
// this design's own, except four VCs of four flits each.
//
// Timing: a flit on in_link in cycle t is in its buffer from cycle t+1.
// out_credit pulses for one cycle, the cycle after the flit left.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned PORT_ID = 0   // this input's number, used for VC ownership
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  // link from the upstream router or the local PE
  input  link_t              in_link,
  output logic [NVC-1:0]     out_credit,
  // state of every output VC, from the output ports
  input  logic [NPORTS-1:0][NVC-1:0]            ovc_credit_ok,
  input  logic [NPORTS-1:0][NVC-1:0]            ovc_locked,
  input  logic [NPORTS-1:0][NVC-1:0][PORT_W-1:0] ovc_owner,
  // request to the switch allocator
  output logic               req,
  output port_e              req_port,
  output logic [VC_W-1:0]    req_vc,
  output flit_t              req_flit,
  input  logic               gnt
);
  flit_t             front [NVC];
  logic [NVC-1:0]    empty, full, vc_req, eligible, sent;
  port_e             route [NVC];

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    logic [FLIT_W-1:0] dout;
    vc_fifo #(.DATA_W(FLIT_W), .DEPTH(VC_DEPTH)) u_buf (
      .clk, .rst,
      .wr   (in_link.valid && in_link.vc == VC_W'(v)),
      .din  (in_link.flit),
      .rd   (sent[v]),
      .dout (dout),
      .empty(empty[v]),
      .full (full[v])
    );
    assign front[v] = flit_t'(dout);

    vc_ctrl u_ctrl (
      .clk, .rst, .cur_x, .cur_y,
      .buf_empty(empty[v]),
      .front    (front[v]),
      .sent     (sent[v]),
      .req      (vc_req[v]),
      .route    (route[v])
    );

    // A head may take a free output VC; a body or tail flit continues on the
    // output VC its head took.
    assign eligible[v] = vc_req[v] && ovc_credit_ok[route[v]][v] &&
                         (is_head(front[v].ftype) ? !ovc_locked[route[v]][v]
                                            : (ovc_locked[route[v]][v] &&
                                               ovc_owner[route[v]][v] == PORT_W'(PORT_ID)));
  end

  logic [NVC-1:0]  vc_gnt;
  logic [VC_W-1:0] vc_sel;
  fp_arbiter #(.N(NVC)) u_vc_sel (
    .req(eligible), .gnt(vc_gnt), .gnt_idx(vc_sel), .gnt_valid(req)
  );

  assign req_vc   = vc_sel;
  assign req_port = route[vc_sel];
  assign req_flit = front[vc_sel];
  assign sent     = gnt ? vc_gnt : '0;

  always_ff @(posedge clk) begin
    if (rst) out_credit <= '0;
    else     out_credit <= sent;
  end

  // The upstream credit counters keep a full VC buffer from being written.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    in_link.valid |-> !full[in_link.vc]);
  a_gnt_req: assert property (@(posedge clk) disable iff (rst) gnt |-> req);
endmodule
