// noc_pkg: types and constants shared by the router and mesh.
//
// A flit is 16 bits wide, the bus width printed on the FIFO and crossbar
// views of the router. The two top bits give the flit type. A head flit
// carries the destination column (X) and row (Y) followed by 8 payload
// bits. Body and tail flits carry 14 payload bits. This flit layout is a
// choice of this design; the router only needs the type and the
// destination. On a link, a flit travels with a valid bit and the number of
// the virtual channel (VC) it belongs to. A packet keeps the VC it was
// injected on for its whole path. Each VC has a credit wire that runs back
// upstream and pulses once for every flit the VC buffer releases.
package noc_pkg;

  localparam int unsigned FLIT_W  = 16;  // flit width, from the 16-bit buses
  localparam int unsigned NPORTS  = 5;   // five input and five output ports
  localparam int unsigned NVC     = 4;   // four virtual channels per input port
  localparam int unsigned VC_DEPTH = 4;  // four flit buffers per VC
  localparam int unsigned VC_W    = $clog2(NVC);
  localparam int unsigned PORT_W  = 3;   // crossbar select width, printed as (2:0)
  localparam int unsigned COORD_W = 3;   // mesh coordinate width, up to 8x8

  // Port numbering, used for arbitration priority too: a lower number wins.
  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,   // towards a higher row (Y+1)
    PORT_EAST  = 3'd2,   // towards a higher column (X+1)
    PORT_SOUTH = 3'd3,   // towards a lower row (Y-1)
    PORT_WEST  = 3'd4    // towards a lower column (X-1)
  } port_e;

  typedef enum logic [1:0] {
    FLIT_BODY   = 2'b00,
    FLIT_HEAD   = 2'b01,
    FLIT_TAIL   = 2'b10,
    FLIT_SINGLE = 2'b11   // head and tail at once: a one-flit packet
  } flit_type_e;

  typedef struct packed {
    flit_type_e          ftype;    // [15:14]
    logic [COORD_W-1:0]  dst_x;    // [13:11] meaningful in head flits
    logic [COORD_W-1:0]  dst_y;    // [10:8]  meaningful in head flits
    logic [7:0]          payload;  // [7:0]
  } flit_t;

  // Forward half of a link: what one output port drives to the next input.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
    flit_t           flit;
  } link_t;

  function automatic logic is_head(flit_type_e t);
    return t == FLIT_HEAD || t == FLIT_SINGLE;
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return t == FLIT_TAIL || t == FLIT_SINGLE;
  endfunction

endpackage
