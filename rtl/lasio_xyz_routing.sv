// lasio_xyz_routing: XYZ dimension-order routing of the Lasio router.
//
// Given the router's own coordinates and the target address carried by a
// header flit, returns the output port the packet must take: it first
// corrects X (East/West), then Y (North/South), then Z (Top/Bottom), and
// goes to Local when all three match. Dimension-order routing on a mesh has
// no cyclic channel dependencies, so it is deadlock free.
//
// Purely combinational. The target address is the {x, y, z} field of the
// header flit (bits [11:8], [7:4], [3:0]); which neighbour is "East",
// "North" or "Top" (the +1 direction) is this design's choice.
module lasio_xyz_routing
  import lasio_pkg::*;
#(
  parameter int unsigned FLIT_W = 16,
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0,
  parameter int unsigned MY_Z   = 0
) (
  input  logic [FLIT_W-1:0] header,
  output port_e             out_port
);

  addr_t target;
  assign target = addr_t'(header[3*COORD_W-1:0]);

  localparam coord_t MX = coord_t'(MY_X);
  localparam coord_t MY = coord_t'(MY_Y);
  localparam coord_t MZ = coord_t'(MY_Z);

  always_comb begin
    if      (target.x > MX) out_port = P_EAST;
    else if (target.x < MX) out_port = P_WEST;
    else if (target.y > MY) out_port = P_NORTH;
    else if (target.y < MY) out_port = P_SOUTH;
    else if (target.z > MZ) out_port = P_TOP;
    else if (target.z < MZ) out_port = P_BOTTOM;
    else                    out_port = P_LOCAL;
  end

endmodule
