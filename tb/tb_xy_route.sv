// tb_xy_route: exhaustive test of XY route computation.
// Every current and destination coordinate pair is compared with a reference
// written as a difference of coordinates: move in X while the columns differ,
// then in Y, then deliver locally.
module tb_xy_route;
  import noc_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e out_port;
  int checks = 0, failures = 0;

  xy_route dut (.*);

  function automatic port_e ref_route(int cx, int cy, int dx, int dy);
    int ddx = dx - cx, ddy = dy - cy;
    if (ddx != 0) return ddx > 0 ? PORT_EAST : PORT_WEST;
    if (ddy != 0) return ddy > 0 ? PORT_NORTH : PORT_SOUTH;
    return PORT_LOCAL;
  endfunction

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        for (int c = 0; c < 8; c++)
          for (int d = 0; d < 8; d++) begin
            cur_x = 3'(a); cur_y = 3'(b); dst_x = 3'(c); dst_y = 3'(d);
            #1;
            checks++;
            if (out_port != ref_route(a, b, c, d)) begin
              failures++;
              if (failures < 10) $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) got %0d", a, b, c, d, out_port);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
