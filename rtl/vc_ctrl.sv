// vc_ctrl: routing control FSM of one virtual channel.
//
// The router's routing control is a finite state machine that processes the
// packet header, computes an output channel and then requests it. This
// module is that machine for one VC. In IDLE it waits for a head flit at
// the front of the VC buffer. When one appears it computes the XY route from
// the head's destination, stores the output port in a register and moves to
// ACTIVE; this takes one clock (the route-computation pipeline stage). In
// ACTIVE it requests the stored output whenever the buffer holds a flit, and
// it returns to IDLE on the clock edge at which the tail flit (or a one-flit
// packet) is sent. The two states and the one-cycle route stage are this
// design's reading of the router description.
//
// Timing: a head flit that reaches the buffer front in cycle t is routed at
// the end of t and can be requested from cycle t+1 on.
module vc_ctrl
  import noc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,         // synchronous, active high
  input  logic [COORD_W-1:0] cur_x,       // this router's column
  input  logic [COORD_W-1:0] cur_y,       // this router's row
  input  logic               buf_empty,   // VC buffer has no flit
  input  flit_t              front,       // flit at the buffer front
  input  logic               sent,        // the front flit leaves this cycle
  output logic               req,         // front flit is ready for arbitration
  output port_e              route        // output port of the current packet
);
  typedef enum logic {S_IDLE, S_ACTIVE} state_e;
  state_e state;
  port_e  rc_port;

  xy_route u_rc (
    .cur_x(cur_x), .cur_y(cur_y),
    .dst_x(front.dst_x), .dst_y(front.dst_y),
    .out_port(rc_port)
  );

  assign req  = (state == S_ACTIVE) && !buf_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      route <= PORT_LOCAL;
    end else begin
      unique case (state)
        S_IDLE:
          if (!buf_empty && is_head(front.ftype)) begin
            route <= rc_port;
            state <= S_ACTIVE;
          end
        S_ACTIVE:
          if (sent && is_tail(front.ftype)) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Packets arrive whole and in order on a VC: an idle VC sees a head first,
  // and nothing is sent unless it was requested.
  a_head_first: assert property (@(posedge clk) disable iff (rst)
    (state == S_IDLE && !buf_empty) |-> is_head(front.ftype));
  a_sent_req: assert property (@(posedge clk) disable iff (rst) sent |-> req);
endmodule
