// mux_trigger: synthesized security checker T12 for one crossbar output.
//
// When the select vector is one-hot, the multiplexer output must equal the
// selected input; otherwise the trigger fires in the same cycle
// (combinational). A zero or multi-bit select is left to the arbiter
// checkers. The trace word holds sel and the low 12 bits of the output and of
// the selected input.
module mux_trigger
  import noc_pkg::*;
#(
  parameter int unsigned N = 5,
  parameter int unsigned W = 44
) (
  input  logic [N-1:0]     sel,
  input  logic [W-1:0]     mux_in [N],
  input  logic [W-1:0]     mux_out,
  output logic             trig,
  output logic [SIG_W-1:0] payload
);

  logic [W-1:0] chosen;

  always_comb begin
    chosen = '0;
    for (int i = 0; i < N; i++)
      if (sel[i]) chosen = mux_in[i];
    trig    = (sel != '0) && ((sel & (sel - 1'b1)) == '0) && (chosen != mux_out);
    payload = SIG_W'({sel, chosen[11:0], mux_out[11:0]});
  end

  initial begin
    assert (W >= 12) else $error("mux_trigger: W below 12");
  end

endmodule
