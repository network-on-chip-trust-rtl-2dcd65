// tb_fb_trigger: drives the T1-T6 checkers from a behavioural buffer model.
// Clean random traffic (no write to a full VC, no read of an empty one, no
// VC used on two cycles running) must never fire a trigger; then each
// checker is shown one violation and must fire in exactly the expected
// cycle, with the VC named in its trace word. T5's age bound is checked to
// the cycle.
`include "tb_check.svh"
module tb_fb_trigger;
  import noc_pkg::*;
  localparam int V = 2, B = 4, LB = 20;
  localparam int PW = $clog2(B), DW = $clog2(B + 1), AW = $clog2(V * B);

  logic clk = 0, rst_n = 0;
  logic [V-1:0] wr, rd;
  logic [PW-1:0] wr_ptr [V];
  logic [PW-1:0] rd_ptr [V];
  logic [DW-1:0] depth [V];
  logic [AW-1:0] wr_addr, rd_addr;
  logic parity_data;
  flit_t dout;
  logic [5:0] trig;
  logic [SIG_W-1:0] payload [6];
  int checks = 0, failures = 0;

  // model state
  int wp [V], rp [V], dep [V];
  // fault knobs, applied to the cycle being driven
  bit no_wr_inc, inc_full, bad_rd_addr, bad_parity, bad_depth;

  fb_trigger #(.V(V), .B(B), .LIVE_BOUND(LB)) dut (
    .clk, .rst_n, .wr, .rd, .wr_ptr, .rd_ptr, .depth, .wr_addr, .rd_addr,
    .parity_data, .dout, .trig, .payload
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one cycle: wv/rv = VC or -1; returns after the clock edge
  task automatic drive(int wv, int rv, logic [5:0] expect_now);
    @(negedge clk);
    wr = '0; rd = '0;
    if (wv >= 0) wr[wv] = 1'b1;
    if (rv >= 0) rd[rv] = 1'b1;
    wr_addr = AW'((wv >= 0 ? wv : 0) * B + wp[wv >= 0 ? wv : 0]);
    rd_addr = AW'((rv >= 0 ? rv : 0) * B + rp[rv >= 0 ? rv : 0]);
    if (bad_rd_addr) rd_addr = AW'(((rv + 1) % V) * B + rp[rv]);
    dout = flit_t'({$urandom, $urandom});
    parity_data = bad_parity ? ~(^dout) : ^dout;
    for (int v = 0; v < V; v++) begin
      wr_ptr[v] = PW'(wp[v]); rd_ptr[v] = PW'(rp[v]);
      depth[v] = DW'(dep[v] + ((bad_depth && v == 0) ? 1 : 0));
    end
    #1;
    `CHECK(trig == expect_now, $sformatf("trig %b expected %b", trig, expect_now))
    @(posedge clk);
    // model update
    for (int v = 0; v < V; v++) begin
      bit w, r, full, empty;
      w = (wv == v); r = (rv == v);
      full = (dep[v] == B); empty = (dep[v] == 0);
      if (w && (!full || inc_full) && !no_wr_inc) wp[v] = (wp[v] + 1) % B;
      if (r && !empty) rp[v] = (rp[v] + 1) % B;
      if (w && !full && !no_wr_inc && !(r && !empty)) dep[v]++;
      else if (r && !empty && !(w && !full && !no_wr_inc)) dep[v]--;
    end
    no_wr_inc = 0; inc_full = 0; bad_rd_addr = 0; bad_parity = 0; bad_depth = 0;
  endtask

  int lastw, lastr;

  initial begin
    wr = '0; rd = '0; wr_addr = '0; rd_addr = '0; parity_data = 0; dout = '0;
    for (int v = 0; v < V; v++) begin
      wp[v] = 0; rp[v] = 0; dep[v] = 0; wr_ptr[v] = '0; rd_ptr[v] = '0; depth[v] = '0;
    end
    {no_wr_inc, inc_full, bad_rd_addr, bad_parity, bad_depth} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // clean random traffic
    lastw = -1; lastr = -1;
    for (int it = 0; it < 3000; it++) begin
      int wv, rv;
      wv = $urandom_range(0, V - 1); rv = $urandom_range(0, V - 1);
      if ($urandom_range(0, 3) == 0 || wv == lastw || dep[wv] == B) wv = -1;
      if ($urandom_range(0, 3) == 0 || rv == lastr || dep[rv] == 0) rv = -1;
      drive(wv, rv, '0);
      lastw = wv; lastr = rv;
    end
    // drain
    drive(-1, -1, '0);
    while (dep[0] != 0 || dep[1] != 0) begin
      drive(-1, (dep[0] != 0) ? 0 : 1, '0);
      drive(-1, -1, '0);
    end
    drive(-1, -1, '0);

    // T1: a write that does not move the write pointer (seen next cycle);
    // the count balance (T6) also breaks as the write was counted
    no_wr_inc = 1;
    drive(1, -1, 6'b000000);
    drive(-1, -1, 6'b100001);
    `CHECK(payload[0][20:19] == 2'd1, "T1 trace names VC 1")
    // restart the checkers
    @(negedge clk) rst_n = 0;
    for (int v = 0; v < V; v++) begin wp[v] = 0; rp[v] = 0; dep[v] = 0; end
    @(negedge clk) rst_n = 1;

    // fill VC 0, then T2: a write to the full VC moves the pointer
    for (int k = 0; k < B; k++) begin drive(0, -1, '0); drive(-1, -1, '0); end
    inc_full = 1;
    drive(0, -1, 6'b000000);
    drive(-1, -1, 6'b100010);      // T2, and T6 (write counted, depth full)
    @(negedge clk) rst_n = 0;
    for (int v = 0; v < V; v++) begin wp[v] = 0; rp[v] = 0; dep[v] = 0; end
    @(negedge clk) rst_n = 1;

    // T4: the same VC written on two cycles running
    drive(1, -1, '0);
    drive(1, -1, 6'b001000);
    drive(-1, -1, '0);
    // T3: a read from an address outside the VC's written range
    bad_rd_addr = 1;
    drive(-1, 1, 6'b000100);
    drive(-1, -1, '0);
    // T5: parity mismatch on a read
    drive(-1, -1, '0);
    bad_parity = 1;
    drive(-1, 1, 6'b010000);
    `CHECK(payload[4][SIG_W-1:0] != '0, "T5 trace word filled")
    // T6: depth disagrees with the counts
    bad_depth = 1;
    drive(-1, -1, 6'b100000);
    drive(-1, -1, '0);
    // T5 age: a flit left in VC 0 fires after exactly LB cycles without a read
    drive(0, -1, '0);
    for (int k = 0; k < LB; k++) drive(-1, -1, '0);
    drive(-1, -1, 6'b010000);
    drive(-1, 0, 6'b010000);        // still at the bound in the read cycle
    drive(-1, -1, '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
