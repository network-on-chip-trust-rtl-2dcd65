// tb_trace_packer: every trigger alone produces, two cycles later, a packet
// with R/IP = 0, the router id, the trigger number as trace id and the low
// bits of its trace word; triggers firing together are all sent, in
// round-robin order; a packet is held until taken, and only a kind firing again
// while still pending is reported lost.
`include "tb_check.svh"
module tb_trace_packer;
  import noc_pkg::*;
  localparam int TW = 48, RW = 4, RIDV = 10, SW = TW - 1 - RW - 4;
  logic clk = 0, rst_n = 0;
  logic [NTRIG-1:0] trig;
  logic [SIG_W-1:0] payload [NTRIG];
  logic tv, tr, lost;
  logic [TW-1:0] pkt;
  int checks = 0, failures = 0;

  trace_packer #(.TRACE_W(TW), .RID(RIDV), .RID_W(RW)) dut (
    .clk, .rst_n, .trig, .payload, .trace_valid (tv), .trace_pkt (pkt), .trace_ready (tr), .lost);

  always #5 clk = ~clk;

  function automatic logic [TW-1:0] expect_pkt(int k);
    return {1'b0, RW'(RIDV), 4'(k + 1), payload[k][SW-1:0]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trig = '0; tr = 1;
    for (int k = 0; k < NTRIG; k++) payload[k] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1 `CHECK(!tv, "idle after reset")
    for (int k = 0; k < NTRIG; k++) begin
      @(negedge clk);
      trig = NTRIG'(1) << k;
      @(negedge clk);
      trig = '0; #1;
      `CHECK(!tv, "captured first, sent one cycle later")
      @(negedge clk); #1;
      `CHECK(tv && pkt == expect_pkt(k), $sformatf("packet for T%0d", k + 1))
      `CHECK(pkt[TW-1] == 1'b0 && pkt[TW-2 -: RW] == RW'(RIDV) && pkt[TW-2-RW -: 4] == 4'(k + 1),
             "header fields")
    end
    @(negedge clk); #1;
    `CHECK(!tv, "idle again")
    // T3, T7 and T12 together: all three sent; the round-robin pointer
    // has wrapped past T12, so the order is T3, T7, T12
    @(negedge clk);
    trig = 12'b1000_0100_0100;
    @(negedge clk);
    trig = '0;
    @(negedge clk); #1;
    `CHECK(tv && pkt == expect_pkt(2), "T3 first")
    @(negedge clk); #1;
    `CHECK(tv && pkt == expect_pkt(6), "then T7")
    @(negedge clk); #1;
    `CHECK(tv && pkt == expect_pkt(11), "then T12")
    @(negedge clk); #1;
    `CHECK(!tv, "all sent")
    // buffer not ready: the packet is held, other kinds wait, a repeat is lost
    tr = 0;
    @(negedge clk);
    trig = 12'b0000_0000_0001;
    @(negedge clk);
    trig = 12'b0000_0001_0000; #1;
    `CHECK(lost == 0, "a different kind is not lost")
    @(negedge clk);
    trig = 12'b0000_0001_0000; #1;
    `CHECK(lost == 1, "the same kind again while pending is lost")
    @(negedge clk);
    trig = '0; #1;
    `CHECK(tv && pkt == expect_pkt(0), "first packet held")
    repeat (3) @(negedge clk);
    #1 `CHECK(tv && pkt == expect_pkt(0), "still held while not ready")
    tr = 1;
    @(negedge clk); #1;
    `CHECK(tv && pkt == expect_pkt(4), "waiting kind follows")
    @(negedge clk); #1;
    `CHECK(!tv, "released after being taken")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
