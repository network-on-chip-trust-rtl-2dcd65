// arb_trigger: synthesized security checkers T10-T11 for one arbiter.
//
//   T10 at most one grant is given in a cycle (combinational);
//   T11 a request that stays high is granted within ARB_BOUND cycles: a
//       counter per requester runs while it requests without a grant and
//       the trigger fires when it reaches the bound. A request that drops
//       restarts its count.
// The bound stands for the unbounded "eventually" of the liveness assertion;
// its value is this design's choice. The trace word holds req, gnt and the
// number of the starving requester.
module arb_trigger
  import noc_pkg::*;
#(
  parameter int unsigned N         = 5,
  parameter int unsigned ARB_BOUND = 32,
  localparam int unsigned CW = $clog2(ARB_BOUND + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     req,
  input  logic [N-1:0]     gnt,
  output logic [1:0]       trig,
  output logic [SIG_W-1:0] payload [2]
);

  logic [CW-1:0] wait_cnt [N];
  logic [N-1:0]  starve;
  logic [7:0]    who;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) wait_cnt[j] <= '0;
    end else begin
      for (int j = 0; j < N; j++) begin
        if (req[j] && !gnt[j]) begin
          if (wait_cnt[j] != CW'(ARB_BOUND)) wait_cnt[j] <= wait_cnt[j] + CW'(1);
        end else begin
          wait_cnt[j] <= '0;
        end
      end
    end
  end

  always_comb begin
    who = '0;
    for (int j = N - 1; j >= 0; j--) begin
      starve[j] = (wait_cnt[j] == CW'(ARB_BOUND));
      if (starve[j]) who = 8'(j);
    end
    trig[0]    = ((gnt & (gnt - 1'b1)) != '0);
    trig[1]    = |starve;
    payload[0] = SIG_W'({req, gnt});
    payload[1] = SIG_W'({who, req, gnt});
  end

endmodule
