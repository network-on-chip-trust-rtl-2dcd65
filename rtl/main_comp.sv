// main_comp: one output of the router crossbar.
//
// An N-input multiplexer with a one-hot select: the output is the OR of the
// inputs whose select bit is set, so it is the selected input when sel is
// one-hot and zero when sel is zero. Purely combinational. One instance
// drives each router output port; sel is the output-stage grant.
module main_comp #(
  parameter int unsigned N = 5,
  parameter int unsigned W = 44
) (
  input  logic [N-1:0] sel,
  input  logic [W-1:0] mux_in [N],
  output logic [W-1:0] mux_out
);

  always_comb begin
    mux_out = '0;
    for (int i = 0; i < N; i++)
      if (sel[i]) mux_out = mux_out | mux_in[i];
  end

endmodule
