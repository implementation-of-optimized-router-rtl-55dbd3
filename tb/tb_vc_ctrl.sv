// tb_vc_ctrl: self-checking test of the per-VC routing FSM.
// The router sits at (1,1). The test presents packets at the buffer front
// one flit at a time and checks that the FSM raises its request exactly one
// cycle after a head flit appears, with the XY output port of the head's
// destination, keeps that port for the body flits, and drops back to idle
// after the tail (or a one-flit packet) is sent.
module tb_vc_ctrl;
  import noc_pkg::*;
  logic clk = 0, rst = 1;
  logic [COORD_W-1:0] cur_x = 3'd1, cur_y = 3'd1;
  logic buf_empty = 1;
  flit_t front = '0;
  logic sent = 0;
  logic req;
  port_e route;
  int checks = 0, failures = 0;

  vc_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (req=%0b route=%0d)", what, req, route); end
  endtask

  function automatic port_e expect_port(int dx, int dy);
    if (dx != 1) return dx > 1 ? PORT_EAST : PORT_WEST;
    if (dy != 1) return dy > 1 ? PORT_NORTH : PORT_SOUTH;
    return PORT_LOCAL;
  endfunction

  // send one packet of nflits (1 = single-flit) to (dx,dy), with gap idle
  // cycles between the flits
  task automatic packet(int dx, int dy, int nflits, int gap);
    for (int k = 0; k < nflits; k++) begin
      @(negedge clk);
      buf_empty = 0;
      front = '0;
      front.ftype = (nflits == 1) ? FLIT_SINGLE : (k == 0) ? FLIT_HEAD :
                    (k == nflits - 1) ? FLIT_TAIL : FLIT_BODY;
      front.dst_x = (k == 0) ? 3'(dx) : 3'($urandom);
      front.dst_y = (k == 0) ? 3'(dy) : 3'($urandom);
      front.payload = 8'($urandom);
      sent = 0;
      #1;
      if (k == 0) check(!req, "no request in the route-computation cycle");
      if (k == 0) begin
        @(negedge clk);
        #1;
      end
      check(req, "request with a flit at the front");
      check(route == expect_port(dx, dy), $sformatf("route to (%0d,%0d)", dx, dy));
      sent = 1;
      @(negedge clk);
      sent = 0;
      buf_empty = 1;
      #1;
      check(!req, "no request with an empty buffer");
      repeat (gap) @(negedge clk);
    end
    @(negedge clk);
    buf_empty = 0;
    front.ftype = FLIT_BODY;   // a non-head flit must not start a packet
    buf_empty = 1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    packet(1, 1, 1, 0);
    packet(2, 0, 4, 0);
    packet(0, 2, 3, 1);
    packet(1, 2, 2, 0);
    packet(1, 0, 5, 2);
    for (int t = 0; t < 60; t++) packet($urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(1, 6), $urandom_range(0, 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
