// xy_route: dimension-order (e-cube) routing for the mesh. A packet first
// travels along x until its column matches, then along y, then leaves on
// the local port. Node address = y * MESH_X + x; x grows towards East and
// y towards South. Combinational; used on the decoded header at the head of
// an input buffer. Port numbering and address split are this design's
// choice. MESH_Y does not enter the decision (a destination is assumed
// to lie inside the mesh; cac_switch asserts it) and is kept for symmetry.
module xy_route
  import noc_pkg::*;
#(
  parameter int MESH_X = 8,
  parameter int MESH_Y = 8
) (
  input  logic [ADDR_W-1:0] cur,  // address of this switch
  input  logic [ADDR_W-1:0] dst,  // destination address from the header
  output port_e             port
);
  logic [ADDR_W-1:0] cx, cy, dx, dy;

  always_comb begin
    cx = cur % ADDR_W'(MESH_X);
    cy = cur / ADDR_W'(MESH_X);
    dx = dst % ADDR_W'(MESH_X);
    dy = dst / ADDR_W'(MESH_X);
    if      (dx > cx) port = P_EAST;
    else if (dx < cx) port = P_WEST;
    else if (dy > cy) port = P_SOUTH;
    else if (dy < cy) port = P_NORTH;
    else              port = P_LOCAL;
  end
endmodule
