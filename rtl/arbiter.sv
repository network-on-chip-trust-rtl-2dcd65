// arbiter: N-input round-robin arbiter.
//
// Grants at most one of the requests, searching from the requester after the
// one granted last, so that a request held high is granted within N cycles.
// The grant is combinational from req and the priority pointer; the pointer
// moves at the clock edge after every cycle with a grant. Reset gives
// requester 0 the highest priority. Used for the VC stage and the output
// stage of the router's allocator and for the trace buffer's input.
module arbiter #(
  parameter int unsigned N = 5,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  logic [IW-1:0] prio;     // highest-priority requester
  logic [IW-1:0] win;
  logic [IW:0]   idx;      // candidate requester, prio + k wrapped at N

  always_comb begin
    gnt = '0;
    win = '0;
    idx = '0;
    for (int k = N - 1; k >= 0; k--) begin
      idx = (IW+1)'(prio) + (IW+1)'(k);
      if (idx >= (IW+1)'(N)) idx = idx - (IW+1)'(N);
      if (req[idx[IW-1:0]]) begin
        gnt = N'(1) << idx[IW-1:0];
        win = idx[IW-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      prio <= '0;
    else if (req != '0)
      prio <= (int'(win) == int'(N) - 1) ? '0 : win + IW'(1);
  end

endmodule
