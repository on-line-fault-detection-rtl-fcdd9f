// xy_route: e-cube (dimension-order) route computation of a switch.
//
// Given the switch's own coordinates (parameters X, Y) and the destination
// coordinates carried by a head flit, selects the output port: first the
// message is moved along x until the column matches, then along y, and it
// leaves on the local port at its destination. Combinational.
//
// Dimension-order routing is the routing the scheme was evaluated with; the
// direction names (east = x+1, north = y+1) are this design's convention.
module xy_route
  import cdd_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0
) (
  input  logic [XW-1:0] dst_x,
  input  logic [YW-1:0] dst_y,
  output port_e         out_port
);

  always_comb begin
    if      (dst_x > XW'(X)) out_port = PORT_E;
    else if (dst_x < XW'(X)) out_port = PORT_W;
    else if (dst_y > YW'(Y)) out_port = PORT_N;
    else if (dst_y < YW'(Y)) out_port = PORT_S;
    else                     out_port = PORT_L;
  end

endmodule
