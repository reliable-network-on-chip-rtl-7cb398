// uep_xy_route: route computation for a router at mesh position (X, Y).
//
// The destination address is read from the decoded header as {y, x}, AW bits
// each. Dimension-ordered (XY) routing: first along x (EAST when the
// destination column is larger, WEST when smaller), then along y (SOUTH when
// the destination row is larger, NORTH when smaller), LOCAL when both match.
// The routing function and the address format are this design's choice.
// Combinational.
module uep_xy_route
  import uep_pkg::*;
#(
  parameter int unsigned AW = 2,
  parameter int unsigned X  = 1,
  parameter int unsigned Y  = 1
) (
  input  logic [2*AW-1:0] dst,
  output port_e           port
);

  logic [AW-1:0] dx, dy;
  assign dx = dst[AW-1:0];
  assign dy = dst[2*AW-1:AW];

  always_comb begin
    if (dx > AW'(X))      port = PORT_EAST;
    else if (dx < AW'(X)) port = PORT_WEST;
    else if (dy > AW'(Y)) port = PORT_SOUTH;
    else if (dy < AW'(Y)) port = PORT_NORTH;
    else                  port = PORT_LOCAL;
  end

endmodule
