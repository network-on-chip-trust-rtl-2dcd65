// tb_arbiter: a 5-input round-robin arbiter against a reference model that
// keeps its own priority pointer: random request patterns must give the same
// one-hot grant, every held request must be granted within N cycles, and
// with all inputs requesting the grants rotate 0,1,2,3,4,0...
`include "tb_check.svh"
module tb_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  int checks = 0, failures = 0;
  int prio = 0;
  int waitc [N];
  logic [N-1:0] g;

  arbiter #(.N(N)) dut (.clk, .rst_n, .req, .gnt);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_gnt(logic [N-1:0] r, int pr);
    for (int k = 0; k < N; k++)
      if (r[(pr + k) % N]) return N'(1) << ((pr + k) % N);
    return '0;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    for (int j = 0; j < N; j++) waitc[j] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // full load: strict rotation
    for (int it = 0; it < 12; it++) begin
      @(negedge clk);
      req = '1; #1;
      `CHECK(gnt == N'(1) << (it % N), "rotation under full load")
      @(posedge clk);
      prio = (it % N + 1) % N;
    end
    // random
    g = '1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      req = req & ~g;    // granted requests are withdrawn
      for (int j = 0; j < N; j++)
        if (waitc[j] == 0) req[j] = ($urandom_range(0, 2) == 0);  // hold until granted
      #1;
      `CHECK(gnt == ref_gnt(req, prio), "grant matches the model")
      for (int j = 0; j < N; j++) begin
        if (req[j] && !gnt[j]) waitc[j]++;
        else waitc[j] = 0;
        `CHECK(waitc[j] < N, "held request granted within N cycles")
      end
      g = gnt;
      @(posedge clk);
      for (int j = 0; j < N; j++)
        if (g[j]) prio = (j + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
