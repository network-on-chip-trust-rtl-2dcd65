// tb_trace_buffer: 16 sources with random packet arrivals, each source
// holding its packet until acknowledged. Checks one acknowledge per cycle,
// acknowledge only of waiting sources, that read-out returns the
// acknowledged packets in order, keep-earliest behaviour when full with the
// drop count, and the fill count.
`include "tb_check.svh"
module tb_trace_buffer;
  localparam int N = 16, TW = 48, D = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] sv, sr;
  logic [TW-1:0] sp [N];
  logic rd_en;
  logic [TW-1:0] rd_data;
  logic [$clog2(D+1)-1:0] count;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  logic [TW-1:0] q [$];
  int drops = 0;

  trace_buffer #(.N(N), .TRACE_W(TW), .DEPTH(D)) dut (
    .clk, .rst_n, .src_valid (sv), .src_pkt (sp), .src_ready (sr),
    .rd_en, .rd_data, .count, .dropped);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] acked;
  bit popped;

  initial begin
    sv = '0; rd_en = 0; acked = '0; popped = 0;
    for (int i = 0; i < N; i++) sp[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (popped) void'(q.pop_front());
      for (int i = 0; i < N; i++) begin
        if (acked[i]) sv[i] = 0;
        if (!sv[i] && it < 2500 && $urandom_range(0, 7) == 0) begin
          sv[i] = 1;
          sp[i] = {16'(it), 8'(i), 24'($urandom)};
        end
      end
      // read out in bursts so the buffer both fills up and drains; sources
      // stop after 2500 cycles so it also drains to empty
      rd_en = ((it / 200) % 2 == 1) && ($urandom_range(0, 1) == 0);
      #1;
      `CHECK($countones(sr) == ((sv != '0) ? 1 : 0), "one acknowledge when anything waits")
      `CHECK((sr & ~sv) == '0, "acknowledge only a waiting source")
      `CHECK(int'(count) == q.size(), "fill count")
      if (q.size() != 0) `CHECK(rd_data == q[0], "read-out order")
      popped = rd_en && q.size() != 0;
      for (int i = 0; i < N; i++)
        if (sr[i]) begin
          if (q.size() - (popped ? 1 : 0) < D) q.push_back(sp[i]);
          else drops++;
        end
      acked = sr;
      @(posedge clk);
      #1 `CHECK(int'(dropped) == drops, "drop count")
    end
    `CHECK(drops > 0, "overflow exercised")
    $display("drops %0d", drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
