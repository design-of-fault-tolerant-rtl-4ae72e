// noc_pkg: types and constants shared by the fault-tolerant 4x4 mesh NoC.
//
// A packet is 24 bits: a 4-bit source node address, a 4-bit destination
// node address and 16 bits of payload. A node address is {x, y}: the two
// upper bits ("x") select the mesh row, 00 at the north edge and 11 at the
// south edge; the two lower bits ("y") select the column, 00 at the west edge
// and 11 at the east edge. Node 1110 is therefore row 3, column 2. The packet
// widths and the address split follow the source description; the order of
// the three fields inside the 24-bit word is this design's choice.
//
// On the links between routers the packet travels with one sideband bit,
// `rerouted`, which is set once a packet has been sent around a faulty node
// and makes the following routers route it Y-first (YX). This bit is this
// design's own addition: the packet format has no spare bit for it.
package noc_pkg;

  localparam int unsigned ADDR_W  = 4;   // node address width
  localparam int unsigned COORD_W = 2;   // row / column index width
  localparam int unsigned DATA_W  = 16;  // payload width
  localparam int unsigned PKT_W   = 2 * ADDR_W + DATA_W;  // 24
  localparam int unsigned MESH_DIM = 4;  // 4x4 mesh
  localparam int unsigned NUM_NODES = MESH_DIM * MESH_DIM;

  // Router ports. PORT_LOCAL is the core port.
  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned PORT_W    = 3;

  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  typedef struct packed {
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
    logic [DATA_W-1:0] data;
  } packet_t;

  // What travels on a link: the packet plus the detour-mode sideband bit.
  typedef struct packed {
    logic    rerouted;
    packet_t pkt;
  } flit_t;

  function automatic logic [COORD_W-1:0] addr_x(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: COORD_W];
  endfunction

  function automatic logic [COORD_W-1:0] addr_y(input logic [ADDR_W-1:0] a);
    return a[COORD_W-1:0];
  endfunction

endpackage
