// route_compute: route computation (RC) of one router.
//
// Dimension-ordered XY routing on the mesh: a packet first travels along x
// until its column matches, then along y, then leaves through the local port.
// The destination is the 6-bit router address carried by the lookahead (and by
// the head flit), {y, x}. Purely combinational.
// The design names the RC stage without giving its algorithm; XY routing,
// which is deadlock-free on a mesh, is this design's choice.
module route_compute
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [ADDR_W-1:0]  dest,
  output logic [PORT_W-1:0]  port
);
  logic [COORD_W-1:0] dx, dy;
  always_comb begin
    dx = dest[COORD_W-1:0];
    dy = dest[ADDR_W-1:COORD_W];
    if      (dx > cur_x) port = P_XP;
    else if (dx < cur_x) port = P_XM;
    else if (dy > cur_y) port = P_YP;
    else if (dy < cur_y) port = P_YM;
    else                 port = P_LOCAL;
  end
endmodule
