// vc_fifo: the flit queue of one virtual channel.
//
// A first-in first-out buffer of DEPTH words (four flit buffers per VC, as
// the router specifies) of DATA_W bits (16, the bus width of the FIFO view).
// The word at the head is visible on dout without a read strobe
// (first-word fall-through), so the control logic can look at a head flit
// before it takes it. A write and a read in the same cycle are both
// honoured. Writing when full or reading when empty is a protocol error that
// the assertions flag; the queue ignores such an access. The storage is a
// register array with read and write pointers one bit wider than the
// address, so full and empty are told apart by that extra bit. Reset empties
// the queue. The fall-through read and the pointer scheme are this
// design's choices.
module vc_fifo #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 4
) (
  input  logic              clk,
  input  logic              rst,     // synchronous, active high
  input  logic              wr,
  input  logic [DATA_W-1:0] din,
  input  logic              rd,
  output logic [DATA_W-1:0] dout,
  output logic              empty,
  output logic              full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  logic do_wr, do_rd;

  assign empty = (wp == rp);
  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= din;
  end

  // A credit-based sender never writes a full queue, and the controller
  // never reads an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd && empty));
endmodule
