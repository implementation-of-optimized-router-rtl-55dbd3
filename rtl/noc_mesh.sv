// noc_mesh: a mesh of routers, 3x3 by default.
//
// Router (x, y) sits in column x and row y; its north port connects to the
// south port of router (x, y+1) and its east port to the west port of
// router (x+1, y), with links and credit wires in both directions. The
// local port of each router is brought out for the processing element (PE)
// attached through its network interface: pe_in/pe_up_credit inject flits
// into the router, pe_out/pe_dn_credit deliver them, and the PE returns one
// credit pulse per flit it has taken. Ports on the edge of the mesh are
// tied off. The 3x3 size and the (row.column) labelling follow the mesh
// drawing of the router network; numbering node (x, y) as index y*COLS+x
// is this design's choice.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned COLS = 3,
  parameter int unsigned ROWS = 3
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  link_t [ROWS*COLS-1:0]                pe_in,         // PE to router
  output logic  [ROWS*COLS-1:0][NVC-1:0]       pe_up_credit,  // router to PE
  output link_t [ROWS*COLS-1:0]                pe_out,        // router to PE
  input  logic  [ROWS*COLS-1:0][NVC-1:0]       pe_dn_credit   // PE to router
);
  localparam int unsigned N = ROWS * COLS;

  link_t [N-1:0][NPORTS-1:0]          r_in, r_out;
  logic  [N-1:0][NPORTS-1:0][NVC-1:0] r_up_cr, r_dn_cr;

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int unsigned K = y * COLS + x;

      router #(.MY_X(x), .MY_Y(y)) u_router (
        .clk, .rst,
        .in_link  (r_in[K]),
        .up_credit(r_up_cr[K]),
        .out_link (r_out[K]),
        .dn_credit(r_dn_cr[K])
      );

      // local port
      assign r_in[K][PORT_LOCAL]    = pe_in[K];
      assign pe_up_credit[K]        = r_up_cr[K][PORT_LOCAL];
      assign pe_out[K]              = r_out[K][PORT_LOCAL];
      assign r_dn_cr[K][PORT_LOCAL] = pe_dn_credit[K];

      // north neighbour
      if (y + 1 < ROWS) begin : g_n
        assign r_in[K][PORT_NORTH]    = r_out[K+COLS][PORT_SOUTH];
        assign r_dn_cr[K][PORT_NORTH] = r_up_cr[K+COLS][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_in[K][PORT_NORTH]    = '0;
        assign r_dn_cr[K][PORT_NORTH] = '0;
      end
      // south neighbour
      if (y > 0) begin : g_s
        assign r_in[K][PORT_SOUTH]    = r_out[K-COLS][PORT_NORTH];
        assign r_dn_cr[K][PORT_SOUTH] = r_up_cr[K-COLS][PORT_NORTH];
      end else begin : g_s_edge
        assign r_in[K][PORT_SOUTH]    = '0;
        assign r_dn_cr[K][PORT_SOUTH] = '0;
      end
      // east neighbour
      if (x + 1 < COLS) begin : g_e
        assign r_in[K][PORT_EAST]    = r_out[K+1][PORT_WEST];
        assign r_dn_cr[K][PORT_EAST] = r_up_cr[K+1][PORT_WEST];
      end else begin : g_e_edge
        assign r_in[K][PORT_EAST]    = '0;
        assign r_dn_cr[K][PORT_EAST] = '0;
      end
      // west neighbour
      if (x > 0) begin : g_w
        assign r_in[K][PORT_WEST]    = r_out[K-1][PORT_EAST];
        assign r_dn_cr[K][PORT_WEST] = r_up_cr[K-1][PORT_EAST];
      end else begin : g_w_edge
        assign r_in[K][PORT_WEST]    = '0;
        assign r_dn_cr[K][PORT_WEST] = '0;
      end
    end
  end
endmodule
