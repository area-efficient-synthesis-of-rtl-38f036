// xy_route: dimension-ordered (XY) routing function of the switch.
//
// From the destination carried by a head flit and the position of this switch
// it selects one output port, one-hot: first along x (east when the
// destination lies at a larger x, west at a smaller x), and only when x
// matches along y (north at a larger y, south at a smaller y); when both match
// the packet leaves through the local port. Purely combinational. XY routing
// follows the evaluated switch; the orientation of the axes is a choice of
// this design.
module xy_route
  import fs_noc_pkg::*;
(
  input  coord_t    my_x,
  input  coord_t    my_y,
  input  coord_t    dx,
  input  coord_t    dy,
  output port_vec_t route
);
  always_comb begin
    route = '0;
    if (dx > my_x)      route[P_EAST]  = 1'b1;
    else if (dx < my_x) route[P_WEST]  = 1'b1;
    else if (dy > my_y) route[P_NORTH] = 1'b1;
    else if (dy < my_y) route[P_SOUTH] = 1'b1;
    else                route[P_LOCAL] = 1'b1;
  end
endmodule
