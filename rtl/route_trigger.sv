// route_trigger: synthesized security checkers T7-T9 for one route unit.
//
//   T7  the destination port vector has at most one bit set;
//   T8  a present head flit names a destination inside the NX x NY mesh, gets
//       exactly one port, and that port does not lead off the mesh edge;
//   T9  the chosen port is consistent with X-Y routing: EAST only towards
//       larger x, WEST towards smaller x, SOUTH towards larger y, NORTH
//       towards smaller y, or LOCAL.
// All three are combinational and fire in the cycle the route is wrong. The
// trace word holds the router and destination coordinates and the port.
// T9 is the routing assertion as published (it accepts LOCAL and a Y move
// whose direction is right); the range form of T8 stands for the published
// "dest_x*dest_y <= NoC size", and the off-edge and no-port checks come from
// the rule that a valid flit always gets a route; both are this design's reading.
module route_trigger
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
  input  logic [NPORT-1:0]   destport,
  output logic [2:0]         trig,
  output logic [SIG_W-1:0]   payload [3]
);

  logic in_mesh, off_edge, xy_ok, onehot0;

  always_comb begin
    onehot0  = ((destport & (destport - 1'b1)) == '0);
    in_mesh  = (int'(dest_x) < int'(NX)) && (int'(dest_y) < int'(NY));
    off_edge = (destport[P_EAST]  && int'(cur_x) == int'(NX) - 1) ||
               (destport[P_WEST]  && cur_x == '0) ||
               (destport[P_SOUTH] && int'(cur_y) == int'(NY) - 1) ||
               (destport[P_NORTH] && cur_y == '0);
    xy_ok    = (dest_x > cur_x && destport == port_onehot(P_EAST))  ||
               (dest_x < cur_x && destport == port_onehot(P_WEST))  ||
               (dest_y > cur_y && destport == port_onehot(P_SOUTH)) ||
               (dest_y < cur_y && destport == port_onehot(P_NORTH)) ||
               (destport == port_onehot(P_LOCAL));
    trig[0] = !onehot0;
    trig[1] = valid && (!in_mesh || destport == '0 || off_edge);
    trig[2] = valid && !xy_ok;
    for (int k = 0; k < 3; k++)
      payload[k] = SIG_W'({cur_x, cur_y, dest_x, dest_y, destport, valid});
  end

endmodule
