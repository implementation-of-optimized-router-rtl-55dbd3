// router: five-port pipelined virtual-channel router with XY routing.
//
// Five input ports (local, north, east, south, west), each with four virtual
// channels of four flit buffers, five fixed-priority output arbiters and a
// 5x5 crossbar. Pipeline registers split the flit path into stages:
//
//   BW  buffer write: the flit on the input link is written into its VC
//       buffer (clock edge 1);
//   RC  route computation, head flits only: the VC's FSM computes the XY
//       route and stores it (edge 2);
//   SA  switch arbitration: each input offers one flit, each output's
//       arbiter grants one input; the granted flit is read from its buffer
//       into the switch register together with the output's select (edge 3,
//       or edge 2 for a body or tail flit);
//   ST  switch traversal: the crossbar passes the registered flits to the
//       output register, which drives the link (edge 4, or edge 3).
//
// A head flit therefore appears on the output link 4 cycles after it was on
// the input link, the flits behind it 3 cycles after, and a packet streams at
// one flit per cycle when credits allow. The division into exactly these
// stages, the credit flow control and the link format are this design's
// choices; the router description says only that registers were added to
// the circuit-switched router to pipeline it.
//
// Interface: in_link/out_link carry valid, VC number and flit. up_credit
// pulses for each flit that leaves an input VC buffer; dn_credit carries the
// same pulses from the downstream router (or the local PE) into the
// output's credit counters. A port with nothing attached has its in_link
// tied inactive and its dn_credit tied low; XY routing never sends to it.
module router
  import noc_pkg::*;
#(
  parameter int unsigned MY_X = 0,   // column of this router in the mesh
  parameter int unsigned MY_Y = 0    // row of this router in the mesh
) (
  input  logic                        clk,
  input  logic                        rst,
  input  link_t [NPORTS-1:0]          in_link,
  output logic  [NPORTS-1:0][NVC-1:0] up_credit,
  output link_t [NPORTS-1:0]          out_link,
  input  logic  [NPORTS-1:0][NVC-1:0] dn_credit
);
  localparam logic [COORD_W-1:0] CX = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(MY_Y);
  localparam int unsigned XW = FLIT_W + VC_W;   // what crosses the switch

  // input side
  logic  [NPORTS-1:0]             in_req, in_gnt;
  port_e                          in_req_port [NPORTS];
  logic  [NPORTS-1:0][VC_W-1:0]   in_req_vc;
  flit_t [NPORTS-1:0]             in_req_flit;
  logic  [NPORTS-1:0]             in_req_head, in_req_tail;

  // output side
  logic [NPORTS-1:0][NPORTS-1:0]            o_req, o_gnt;
  logic [NPORTS-1:0][PORT_W-1:0]            o_gnt_idx;
  logic [NPORTS-1:0]                        o_gnt_valid;
  logic [NPORTS-1:0][NVC-1:0]               ovc_credit_ok, ovc_locked;
  logic [NPORTS-1:0][NVC-1:0][PORT_W-1:0]   ovc_owner;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    input_port #(.PORT_ID(i)) u_in (
      .clk, .rst, .cur_x(CX), .cur_y(CY),
      .in_link   (in_link[i]),
      .out_credit(up_credit[i]),
      .ovc_credit_ok, .ovc_locked, .ovc_owner,
      .req       (in_req[i]),
      .req_port  (in_req_port[i]),
      .req_vc    (in_req_vc[i]),
      .req_flit  (in_req_flit[i]),
      .gnt       (in_gnt[i])
    );
    assign in_req_head[i] = is_head(in_req_flit[i].ftype);
    assign in_req_tail[i] = is_tail(in_req_flit[i].ftype);

    // input i is granted if the output it asked for granted it
    always_comb begin
      in_gnt[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++) in_gnt[i] |= o_gnt[o][i];
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    for (genvar i = 0; i < NPORTS; i++) begin : g_req
      assign o_req[o][i] = in_req[i] && in_req_port[i] == port_e'(o);
    end
    output_port u_out (
      .clk, .rst,
      .req      (o_req[o]),
      .req_vc   (in_req_vc),
      .req_head (in_req_head),
      .req_tail (in_req_tail),
      .gnt      (o_gnt[o]),
      .gnt_idx  (o_gnt_idx[o]),
      .gnt_valid(o_gnt_valid[o]),
      .credit_in(dn_credit[o]),
      .credit_ok(ovc_credit_ok[o]),
      .locked   (ovc_locked[o]),
      .owner    (ovc_owner[o])
    );
  end

  // SA/ST pipeline register: the granted flit of each input and the select
  // of each output.
  logic [NPORTS-1:0][XW-1:0]     st_data;
  logic [NPORTS-1:0][PORT_W-1:0] st_sel;
  logic [NPORTS-1:0]             st_valid;

  always_ff @(posedge clk) begin
    for (int i = 0; i < NPORTS; i++)
      if (in_gnt[i]) st_data[i] <= {in_req_vc[i], in_req_flit[i]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st_valid <= '0;
      st_sel   <= '0;
    end else begin
      st_valid <= o_gnt_valid;
      st_sel   <= o_gnt_idx;
    end
  end

  logic [NPORTS-1:0][XW-1:0] xb_out;
  crossbar #(.DATA_W(XW)) u_xbar (.in(st_data), .sel(st_sel), .out(xb_out));

  // ST/link register: the output link is driven from a flip-flop.
  always_ff @(posedge clk) begin
    if (rst) begin
      out_link <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        out_link[o].valid <= st_valid[o];
        out_link[o].vc    <= xb_out[o][XW-1 -: VC_W];
        out_link[o].flit  <= flit_t'(xb_out[o][FLIT_W-1:0]);
      end
    end
  end

  // An input requests one output, so it is granted at most once per cycle.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    a_one_grant: assert property (@(posedge clk) disable iff (rst)
      $onehot0({o_gnt[4][i], o_gnt[3][i], o_gnt[2][i], o_gnt[1][i], o_gnt[0][i]}));
  end
endmodule
