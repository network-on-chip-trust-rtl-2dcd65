// trace_packer: per-router Design-for-Debug trace formatter.
//
// Watches the router's twelve trigger lines (T1..T12). Each trigger kind has
// a pending flag and a capture register: when a kind fires and is not
// already pending, its trace word is captured and the kind becomes pending.
// Whenever the output register is free (or being emptied), one pending kind,
// chosen round robin starting from T1 after reset, is packed into a trace
// packet
//   [TRACE_W-1]            R/IP   0 = produced by a router
//   next RID_W bits        router id
//   next 4 bits            trace id = trigger number 1..12
//   remaining low bits     that trigger's traced signals (low bits kept)
// and held with trace_valid high until the central trace buffer takes it
// (trace_ready). So triggers that fire together all reach the trace buffer,
// one per cycle, and a kind that fires every cycle cannot hide the others.
// A kind that fires again while still pending is not recorded a second
// time and pulses lost. The packet field order is the published one; the
// pending registers, the round-robin order and the one-packet output
// register are this design's choices.
module trace_packer
  import noc_pkg::*;
#(
  parameter int unsigned TRACE_W = 48,
  parameter int unsigned RID     = 0,
  parameter int unsigned RID_W   = 4,
  localparam int unsigned SW = TRACE_W - 1 - RID_W - TID_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NTRIG-1:0]   trig,
  input  logic [SIG_W-1:0]   payload [NTRIG],
  output logic               trace_valid,
  output logic [TRACE_W-1:0] trace_pkt,
  input  logic               trace_ready,
  output logic               lost
);

  logic [NTRIG-1:0] pend;
  logic [NTRIG-1:0][SW-1:0] cap;  // one capture register per kind
  logic [NTRIG-1:0] pick;         // one-hot: pending kind sent next
  logic             load;
  logic [TRACE_W-1:0] next_pkt;

  logic             can_load;
  logic [NTRIG-1:0] req;

  assign can_load = !trace_valid || trace_ready;
  assign req      = can_load ? pend : '0;

  // round robin over the pending kinds, so a kind that fires every cycle
  // cannot keep the others out
  arbiter #(.N(NTRIG)) u_arb (.clk (clk), .rst_n (rst_n), .req (req), .gnt (pick));

  assign load = (pick != '0);

  // packet of the picked kind (AND-OR over the one-hot pick)
  always_comb begin
    next_pkt = '0;
    for (int k = 0; k < NTRIG; k++)
      if (pick[k]) next_pkt = next_pkt | {1'b0, RID_W'(RID), TID_W'(k + 1), cap[k]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trace_valid <= 1'b0;
      trace_pkt   <= '0;
    end else if (can_load) begin
      trace_valid <= load;
      if (load) trace_pkt <= next_pkt;
    end
  end

  for (genvar k = 0; k < NTRIG; k++) begin : g_kind
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        pend[k] <= 1'b0;
        cap[k]  <= '0;
      end else if (trig[k] && (!pend[k] || pick[k])) begin
        pend[k] <= 1'b1;
        cap[k]  <= payload[k][SW-1:0];
      end else if (pick[k]) begin
        pend[k] <= 1'b0;
      end
    end
  end

  assign lost = |(trig & pend & ~(load ? pick : '0));

  initial begin
    assert (SW > 0 && SW <= SIG_W) else $error("trace_packer: trace width out of range");
  end

endmodule
