// routing_state_machine: the routing function f_RSM of a routing engine.
//
// For a header or response flit, the routing direction is computed from the
// target address in the flit and the router's own mesh coordinates. The
// routing algorithm is static X-first (XY) routing: move East/West until the
// column matches, then North/South until the row matches, then deliver to
// the Local port. North is the direction of increasing y and East that of
// increasing x. The result is a one-hot direction vector over the ports
// E, N, W, S, L.
//
// The document leaves the routing algorithm open (any algorithm without
// cyclic channel dependencies); X-first is the static one it names and
// the one chosen here. Purely combinational.
module routing_state_machine
  import noc_pkg::*;
(
  input  coord_t   my_x,
  input  coord_t   my_y,
  input  coord_t   dst_x,
  input  coord_t   dst_y,
  output portvec_t r_dir
);

  always_comb begin
    r_dir = '0;
    if (dst_x > my_x)      r_dir[P_EAST]  = 1'b1;
    else if (dst_x < my_x) r_dir[P_WEST]  = 1'b1;
    else if (dst_y > my_y) r_dir[P_NORTH] = 1'b1;
    else if (dst_y < my_y) r_dir[P_SOUTH] = 1'b1;
    else                   r_dir[P_LOCAL] = 1'b1;
  end

endmodule
