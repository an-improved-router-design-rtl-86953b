// xy_rc_unit: one dimension-order (XY) routing computation unit.
//
// It compares the destination's X coordinate with the router's own, then the Y
// coordinate, with one magnitude comparator per dimension, and names the output
// port: east or west until X matches, then north or south until Y matches, then
// the local port. XY routing needs no table. 'en' models the unit being switched
// on: a unit that is off gives no valid result. Purely combinational.
// The direction names (+x east, +y north) are this design's convention.
module xy_rc_unit
  import noc_pkg::*;
(
  input  logic                  en,
  input  logic [NODE_W-1:0]     dest,      // {y, x}
  input  logic [COORD_W-1:0]    cur_x,
  input  logic [COORD_W-1:0]    cur_y,
  output logic                  valid,
  output port_t                 out_port
);

  logic [COORD_W-1:0] dx, dy;
  logic x_gt, x_lt, y_gt, y_lt;

  assign dx = dest[COORD_W-1:0];
  assign dy = dest[NODE_W-1:COORD_W];

  // The two comparators.
  assign x_gt = dx > cur_x;
  assign x_lt = dx < cur_x;
  assign y_gt = dy > cur_y;
  assign y_lt = dy < cur_y;

  always_comb begin
    valid = en;
    if (x_gt)      out_port = PORT_EAST;
    else if (x_lt) out_port = PORT_WEST;
    else if (y_gt) out_port = PORT_NORTH;
    else if (y_lt) out_port = PORT_SOUTH;
    else           out_port = PORT_LOCAL;
  end

endmodule
