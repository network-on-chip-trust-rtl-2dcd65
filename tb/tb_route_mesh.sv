// tb_route_mesh: every (router, destination) pair of a 4x4 mesh and a 3x3
// mesh checked against X-Y routing written out independently: the port is
// the first of EAST/WEST (x differs) then SOUTH/NORTH (y differs), LOCAL on
// arrival; no port without a valid head flit. Also walks each packet hop by
// hop and checks it arrives in |dx|+|dy| hops.
`include "tb_check.svh"
module tb_route_mesh;
  import noc_pkg::*;
  logic valid;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  logic [NPORT-1:0] dp4, dp3;
  int checks = 0, failures = 0;

  route_mesh #(.NX(4), .NY(4)) dut4 (.valid, .cur_x (cx), .cur_y (cy), .dest_x (dx), .dest_y (dy), .destport (dp4));
  route_mesh #(.NX(3), .NY(3)) dut3 (.valid, .cur_x (cx), .cur_y (cy), .dest_x (dx), .dest_y (dy), .destport (dp3));

  function automatic logic [4:0] ref_port(int x, int y, int tx, int ty);
    // bit 0 LOCAL, 1 EAST, 2 NORTH, 3 WEST, 4 SOUTH
    if (tx > x) return 5'b00010;
    if (tx < x) return 5'b01000;
    if (ty > y) return 5'b10000;
    if (ty < y) return 5'b00100;
    return 5'b00001;
  endfunction

  initial begin
    valid = 1;
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int tx = 0; tx < 4; tx++)
          for (int ty = 0; ty < 4; ty++) begin
            cx = COORD_W'(x); cy = COORD_W'(y); dx = COORD_W'(tx); dy = COORD_W'(ty);
            #1;
            `CHECK(dp4 == ref_port(x, y, tx, ty), $sformatf("route %0d,%0d -> %0d,%0d", x, y, tx, ty))
            if (x < 3 && y < 3 && tx < 3 && ty < 3)
              `CHECK(dp3 == ref_port(x, y, tx, ty), "3x3 route")
          end
    // hop walk from every source to every destination
    for (int s = 0; s < 16; s++)
      for (int d = 0; d < 16; d++) begin
        int x, y, hops;
        x = s % 4; y = s / 4; hops = 0;
        forever begin
          cx = COORD_W'(x); cy = COORD_W'(y); dx = COORD_W'(d % 4); dy = COORD_W'(d / 4);
          #1;
          if (dp4[P_LOCAL]) break;
          if (dp4[P_EAST]) x++;
          if (dp4[P_WEST]) x--;
          if (dp4[P_SOUTH]) y++;
          if (dp4[P_NORTH]) y--;
          hops++;
          if (hops > 10) break;
        end
        `CHECK(hops == ((d % 4 > s % 4) ? d % 4 - s % 4 : s % 4 - d % 4) +
                       ((d / 4 > s / 4) ? d / 4 - s / 4 : s / 4 - d / 4), "hop count")
      end
    valid = 0;
    #1;
    `CHECK(dp4 == '0, "no port without a head flit")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
