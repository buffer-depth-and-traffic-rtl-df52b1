// lasio_pkg: types and constants shared by the Lasio 3D mesh router.
//
// The router has seven ports. Their order here (East, West, North, South,
// Local, Bottom, Top) is the column order of the router's switching table.
// A packet is a header flit holding the target router address, a size flit
// holding the number of payload flits, then the payload.
//
// Address encoding (this design's choice): the target flit carries the
// router coordinates as three 4-bit fields, {x, y, z} in bits [11:8], [7:4]
// and [3:0], so a router printed as "121" has address 16'h0121. The upper
// bits are ignored. Axes: X picks East (+1) / West (-1), Y picks North (+1)
// / South (-1), Z picks Top (+1) / Bottom (-1).
package lasio_pkg;

  localparam int unsigned NPORTS  = 7;
  localparam int unsigned PORT_W  = 3;
  localparam int unsigned COORD_W = 4;

  typedef enum logic [PORT_W-1:0] {
    P_EAST   = 3'd0,
    P_WEST   = 3'd1,
    P_NORTH  = 3'd2,
    P_SOUTH  = 3'd3,
    P_LOCAL  = 3'd4,
    P_BOTTOM = 3'd5,
    P_TOP    = 3'd6
  } port_e;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
    coord_t z;
  } addr_t;

endpackage
