// re_route: routing decision of the routing-element control unit (CU_RE).
//
// Message stopping makes the traffic unpredictable, so routes are computed at
// run time from the packet's destination node identifier (DNI) with O1Turn
// routing on the torus: each packet travels either X-first or Y-first, and
// keeps that order at every hop. The order is not a packet field of its own:
// it is taken from bit 0 of the RO field (0 = X first, 1 = Y first), which
// splits the traffic between the two orders without widening the packet; that
// choice is this design's. Along a dimension the packet takes the shorter way
// round the ring (ties go to the increasing direction, E or S). A packet whose
// DNI equals this node leaves through the local port. Purely combinational.
module re_route
  import ldpc_pkg::*;
#(
  parameter int NX = 3,
  parameter int NY = 3
) (
  input  logic [CW-1:0] my_x,
  input  logic [CW-1:0] my_y,
  input  dni_t          dni,
  input  logic          yx_first,
  output port_e         port
);
  logic          need_x, need_y;
  logic [CW-1:0] dx, dy;   // forward distance modulo the ring length
  port_e         px, py;

  always_comb begin
    need_x = (dni.x != my_x);
    need_y = (dni.y != my_y);
    dx = (dni.x >= my_x) ? CW'(dni.x - my_x) : CW'(NX + dni.x - my_x);
    dy = (dni.y >= my_y) ? CW'(dni.y - my_y) : CW'(NY + dni.y - my_y);
    px = (2 * int'(dx) <= NX) ? PORT_E : PORT_W;
    py = (2 * int'(dy) <= NY) ? PORT_S : PORT_N;
    if (!need_x && !need_y) port = PORT_L;
    else if (yx_first)      port = need_y ? py : px;
    else                    port = need_x ? px : py;
  end
endmodule
