// route_mesh: X-Y route computation for a 2-D mesh.
//
// A head flit first travels along x until its column matches, then along y:
// EAST if the destination lies at larger x, WEST if at smaller x, otherwise
// SOUTH for larger y, NORTH for smaller y, and LOCAL when it has arrived.
// y grows southward (router 0 is the north-west corner). The result is a
// one-hot 5-bit port vector, all zero when no head flit is present.
// Purely combinational; one instance sits at every input VC of a router.
module route_mesh
  import noc_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4
) (
  input  logic               valid,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dest_x,
  input  logic [COORD_W-1:0] dest_y,
  output logic [NPORT-1:0]   destport
);

  port_e p;

  always_comb begin
    if (dest_x > cur_x)      p = P_EAST;
    else if (dest_x < cur_x) p = P_WEST;
    else if (dest_y > cur_y) p = P_SOUTH;
    else if (dest_y < cur_y) p = P_NORTH;
    else                     p = P_LOCAL;
    destport = valid ? port_onehot(p) : '0;
  end

  initial begin
    assert (NX <= (1 << COORD_W) && NY <= (1 << COORD_W))
      else $error("route_mesh: mesh larger than the coordinate width");
  end

endmodule
