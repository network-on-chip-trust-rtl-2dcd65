// tb_arb_trigger: T10 fires on any multi-hot grant and never on a zero or
// one-hot grant; T11 fires exactly when a request has been held ARB_BOUND
// cycles without a grant, names the requester, and clears when granted.
`include "tb_check.svh"
module tb_arb_trigger;
  import noc_pkg::*;
  localparam int N = 5, AB = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [1:0] trig;
  logic [SIG_W-1:0] payload [2];
  int checks = 0, failures = 0;

  arb_trigger #(.N(N), .ARB_BOUND(AB)) dut (.clk, .rst_n, .req, .gnt, .trig, .payload);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; gnt = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // T10 over all grant patterns
    for (int g = 0; g < (1 << N); g++) begin
      @(negedge clk);
      req = '0; gnt = N'(g); #1;
      `CHECK(trig[0] == ($countones(N'(g)) > 1), $sformatf("T10 for grant %b", N'(g)))
    end
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    // T11: requester 3 held without a grant
    for (int c = 0; c <= AB + 2; c++) begin
      @(negedge clk);
      req = 5'b01000; gnt = '0; #1;
      `CHECK(trig[1] == (c >= AB), $sformatf("T11 after %0d cycles", c))
      if (c >= AB) `CHECK(payload[1][17:10] == 8'd3, "T11 names requester 3")
    end
    @(negedge clk);
    gnt = 5'b01000; #1;
    `CHECK(trig[1] == 1'b1, "still flagged in the grant cycle")
    @(negedge clk);
    req = 5'b01000; gnt = '0; #1;
    `CHECK(trig[1] == 1'b0, "cleared after the grant")
    // a request that drops restarts its count
    for (int c = 0; c < AB - 1; c++) @(negedge clk);
    req = '0;
    @(negedge clk);
    req = 5'b01000; #1;
    `CHECK(trig[1] == 1'b0, "count restarted")
    // granted requests rotating within the bound never fire
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      req = '1; gnt = N'(1) << (c % N); #1;
      `CHECK(trig == 2'b00, "fair rotation raises nothing")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
