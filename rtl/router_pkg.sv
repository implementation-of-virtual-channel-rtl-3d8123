// Shared types and default sizes of the virtual-channel router.
//
// A flit travels on a link as three fields: a 2-bit type, a VC identifier
// and DATA_W data bits. The type field (head, body, tail, or a single-flit
// packet that is both head and tail) is this design's addition: the
// wormhole scheme needs to know where a packet starts and ends, and the
// routing rule only says that the low three data bits of a header select
// the output port. Port count (5) and data width (8) follow the reference
// router; V and K (VCs per port, flits per VC) are chosen here.
package router_pkg;

  typedef enum logic [1:0] {
    FLIT_HEAD      = 2'b00,
    FLIT_BODY      = 2'b01,
    FLIT_TAIL      = 2'b10,
    FLIT_HEAD_TAIL = 2'b11
  } flit_type_e;

  // Port order: four mesh directions, then the local processing element.
  localparam int unsigned PORT_NORTH = 0;
  localparam int unsigned PORT_SOUTH = 1;
  localparam int unsigned PORT_WEST  = 2;
  localparam int unsigned PORT_EAST  = 3;
  localparam int unsigned PORT_LOCAL = 4;

  localparam int unsigned NUM_PORTS    = 5;  // P
  localparam int unsigned NUM_VCS      = 4;  // v
  localparam int unsigned VC_DEPTH     = 4;  // k, flits per VC buffer
  localparam int unsigned FLIT_DATA_W  = 8;  // data1..data5 are 8 bits
  localparam int unsigned ROUTE_BITS   = 3;  // header bits that select the output

  function automatic logic is_head(input logic [1:0] t);
    return t == FLIT_HEAD || t == FLIT_HEAD_TAIL;
  endfunction

  function automatic logic is_tail(input logic [1:0] t);
    return t == FLIT_TAIL || t == FLIT_HEAD_TAIL;
  endfunction

endpackage
