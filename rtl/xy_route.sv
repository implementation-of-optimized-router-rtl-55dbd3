// xy_route: XY dimension-order route computation.
//
// Given the router's own column and row and a packet's destination, the
// packet first moves along X (east or west) until the column matches, then
// along Y (north or south), and leaves through the local port once both
// match. Purely combinational. The router uses XY routing; the port numbers
// and the choice that north means a higher row follow this design's
// package.
module xy_route
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port
);
  always_comb begin
    if (dst_x > cur_x)      out_port = PORT_EAST;
    else if (dst_x < cur_x) out_port = PORT_WEST;
    else if (dst_y > cur_y) out_port = PORT_NORTH;
    else if (dst_y < cur_y) out_port = PORT_SOUTH;
    else                    out_port = PORT_LOCAL;
  end
endmodule
