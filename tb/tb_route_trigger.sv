// tb_route_trigger: the T7-T9 checkers. Correct X-Y routes for every pair of
// a 4x4 mesh raise nothing; then a two-hot port (T7), an out-of-mesh
// destination, a missing port and a port leading off the edge (T8), and a
// port against the X-Y direction (T9) each fire the expected trigger.
`include "tb_check.svh"
module tb_route_trigger;
  import noc_pkg::*;
  logic valid;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  logic [NPORT-1:0] dp, rp;
  logic [2:0] trig;
  logic [SIG_W-1:0] payload [3];
  int checks = 0, failures = 0;

  route_mesh #(.NX(4), .NY(4)) u_rt (.valid, .cur_x (cx), .cur_y (cy), .dest_x (dx), .dest_y (dy), .destport (rp));
  route_trigger #(.NX(4), .NY(4)) dut (.valid, .cur_x (cx), .cur_y (cy), .dest_x (dx), .dest_y (dy),
                                       .destport (dp), .trig, .payload);

  task automatic set(int x, int y, int tx, int ty, logic [4:0] port);
    cx = COORD_W'(x); cy = COORD_W'(y); dx = COORD_W'(tx); dy = COORD_W'(ty); dp = port;
    #1;
  endtask

  initial begin
    valid = 1;
    for (int s = 0; s < 16; s++)
      for (int d = 0; d < 16; d++) begin
        cx = COORD_W'(s % 4); cy = COORD_W'(s / 4); dx = COORD_W'(d % 4); dy = COORD_W'(d / 4);
        #1; dp = rp; #1;
        `CHECK(trig == 3'b000, "clean route raises nothing")
      end
    // T7: two ports at once (EAST and SOUTH), towards a destination south-east
    set(1, 1, 3, 3, 5'b10010);
    `CHECK(trig[0] == 1'b1, "T7 on two-hot port")
    // T8: destination outside the 4x4 mesh
    set(1, 1, 5, 1, 5'b00010);
    `CHECK(trig == 3'b010, "T8 on destination x=5")
    // T8: valid head, no port
    set(1, 1, 2, 1, 5'b00000);
    `CHECK(trig[1] == 1'b1, "T8 on no port")
    // T8: EAST out of the east edge (and T9 since the destination is west)
    set(3, 0, 0, 0, 5'b00010);
    `CHECK(trig == 3'b110, "T8+T9 on off-edge port")
    // T9: WEST although the destination is east
    set(1, 2, 3, 2, 5'b01000);
    `CHECK(trig == 3'b100, "T9 on wrong direction")
    `CHECK(payload[2][5:1] == 5'b01000, "T9 trace holds the port")
    `CHECK(payload[2][SIG_W-1:18] == '0 && payload[2][17:15] == 3'd1, "T9 trace holds cur_x")
    // as published, LOCAL and a correct Y move are accepted
    set(1, 2, 3, 3, 5'b10000);
    `CHECK(trig == 3'b000, "Y move towards the destination accepted")
    // nothing without a valid head except a multi-hot vector
    valid = 0;
    set(1, 2, 3, 2, 5'b01000);
    `CHECK(trig == 3'b000, "no T8/T9 without a head flit")
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
