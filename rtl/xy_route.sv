// xy_route: dimension-order (XY) route computation for a 2D mesh switch.
//
// Compares a packet's destination with the switch's own coordinates and names
// the output port: first move along X (east if the destination column is
// larger, west if smaller), then along Y (south if the destination row is
// larger, north if smaller; row 0 is the north edge), and eject to the local
// resource when both match. XY routing is deadlock-free on a mesh and never
// sends a packet back the way it came. The source names routing as a task of
// the switch but gives no routing function; XY is this design's choice.
// Purely combinational.
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
    if      (dst_x > cur_x) out_port = PORT_EAST;
    else if (dst_x < cur_x) out_port = PORT_WEST;
    else if (dst_y > cur_y) out_port = PORT_SOUTH;
    else if (dst_y < cur_y) out_port = PORT_NORTH;
    else                    out_port = PORT_LOCAL;
  end

endmodule
