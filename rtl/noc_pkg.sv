// noc_pkg: types and constants shared by the mesh network-on-chip.
//
// A packet travels as a single flit: a destination coordinate pair followed
// by a payload word. The five switch ports of a 2D mesh router are numbered
// by port_e (local resource, north, east, south, west). Widths here are this
// design's own choice; the source description fixes no packet format.
package noc_pkg;

  // Payload width of one packet.
  localparam int unsigned DATA_W  = 32;
  // Width of one mesh coordinate: meshes up to 16 x 16.
  localparam int unsigned COORD_W = 4;
  // Number of ports of a mesh switch: four neighbours and the local resource.
  localparam int unsigned NUM_PORTS = 5;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;   // destination column
    logic [COORD_W-1:0] dst_y;   // destination row (row 0 is the north edge)
    logic [DATA_W-1:0]  payload;
  } packet_t;

  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

endpackage
