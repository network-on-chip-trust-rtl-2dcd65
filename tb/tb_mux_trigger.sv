// tb_mux_trigger: T12 watches a real main_comp. With the true multiplexer
// output it never fires; with an output that differs from the selected
// input under a one-hot select it fires, and a zero or multi-hot select is
// not its concern.
`include "tb_check.svh"
module tb_mux_trigger;
  import noc_pkg::*;
  localparam int N = 5, W = 44;
  logic [N-1:0] sel;
  logic [W-1:0] mux_in [N];
  logic [W-1:0] good, mux_out;
  logic trig;
  logic [SIG_W-1:0] payload;
  int checks = 0, failures = 0;

  main_comp #(.N(N), .W(W)) u_mux (.sel, .mux_in, .mux_out (good));
  mux_trigger #(.N(N), .W(W)) dut (.sel, .mux_in, .mux_out, .trig, .payload);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int s, mode;
      for (int i = 0; i < N; i++) mux_in[i] = W'({$urandom, $urandom});
      s = $urandom_range(0, N - 1);
      mode = $urandom_range(0, 3);
      sel = (mode == 3) ? N'(5'b00101) : N'(1) << s;
      if (mode == 2) sel = '0;
      #1;
      mux_out = (mode == 1) ? good ^ W'(1 << $urandom_range(0, W - 1)) : good;
      #1;
      `CHECK(trig == (mode == 1), $sformatf("T12 in mode %0d", mode))
      if (mode == 1) `CHECK(payload[28:24] == sel, "T12 trace holds sel")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
