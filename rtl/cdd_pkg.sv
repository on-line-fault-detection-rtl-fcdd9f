// cdd_pkg: types and constants shared by the code-disjoint NoC.
//
// The network is a 4x4 mesh of five-port switches carrying 64-bit flits, each
// protected on every link by one even-parity bit. A flit travels with two
// sideband control bits (head, tail) that delimit a message for wormhole
// switching; as in the scheme this design follows, only the data path (the
// 64 data bits) is parity-encoded, the small control part is not.
//
// Mesh size, flit width and message length (4 flits) are the configuration
// the scheme was evaluated with. The port numbering, the header layout (the
// destination coordinates in the low data bits of the head flit) and the
// sideband bits are choices of this design.
package cdd_pkg;

  // Mesh geometry: 4 x 4 switches, one IP core per switch.
  localparam int unsigned MESH_X  = 4;
  localparam int unsigned MESH_Y  = 4;
  localparam int unsigned NODES   = MESH_X * MESH_Y;
  localparam int unsigned XW      = $clog2(MESH_X);
  localparam int unsigned YW      = $clog2(MESH_Y);

  // Flit and message size.
  localparam int unsigned FLIT_W    = 64;
  localparam int unsigned MSG_FLITS = 4;

  // Switch ports: four mesh neighbours and the local IP core.
  localparam int unsigned NPORTS = 5;
  localparam int unsigned PORT_BITS = 3;
  typedef enum logic [PORT_BITS-1:0] {
    PORT_N = 3'd0,   // towards y+1
    PORT_E = 3'd1,   // towards x+1
    PORT_S = 3'd2,   // towards y-1
    PORT_W = 3'd3,   // towards x-1
    PORT_L = 3'd4    // local IP core
  } port_e;

  // A flit as it travels on a link and sits in a buffer.
  typedef struct packed {
    logic              head;   // first flit of a message, carries the route
    logic              tail;   // last flit of a message, releases the path
    logic [FLIT_W-1:0] data;   // payload, parity-protected
    logic              par;    // even parity of data (the X_p bit)
  } flit_t;

  localparam int unsigned FLIT_BITS = $bits(flit_t);

  // A flit as an IP core sends and receives it, before parity encoding.
  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } ip_flit_t;

  // Node number of the switch at column x, row y.
  function automatic int unsigned node_id(input int unsigned x, input int unsigned y);
    return y * MESH_X + x;
  endfunction

  // Destination coordinates sit in the low bits of a head flit's data.
  function automatic logic [XW-1:0] hdr_dst_x(input logic [FLIT_W-1:0] d);
    return d[XW-1:0];
  endfunction

  function automatic logic [YW-1:0] hdr_dst_y(input logic [FLIT_W-1:0] d);
    return d[XW+YW-1:XW];
  endfunction

endpackage
