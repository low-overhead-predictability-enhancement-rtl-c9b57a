// pfs_xy_route: dimension-ordered (XY) routing function of a router at column X, row Y.
//
// The header's destination is compared with the router's own coordinates: the packet first
// travels along X (East for a larger column, West for a smaller one) and, once in the right
// column, along Y. Rows grow southwards, so a larger row number leads South. A packet already
// at its destination leaves through the Local port. The result is a one-hot port vector in
// the order East, West, North, South, Local. Purely combinational. XY routing is the
// reference router's; the direction convention and port order are this design's choice.
module pfs_xy_route
  import pfs_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0
) (
  input  coord_t    dst_x,
  input  coord_t    dst_y,
  output port_vec_t port_req
);
  always_comb begin
    port_req = '0;
    if (int'(dst_x) > X)      port_req[P_E] = 1'b1;
    else if (int'(dst_x) < X) port_req[P_W] = 1'b1;
    else if (int'(dst_y) > Y) port_req[P_S] = 1'b1;
    else if (int'(dst_y) < Y) port_req[P_N] = 1'b1;
    else                          port_req[P_L] = 1'b1;
  end
endmodule
