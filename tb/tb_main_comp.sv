// tb_main_comp: the crossbar output multiplexer with random inputs: a
// one-hot select passes exactly the selected input, a zero select gives
// zero.
`include "tb_check.svh"
module tb_main_comp;
  localparam int N = 5, W = 44;
  logic [N-1:0] sel;
  logic [W-1:0] mux_in [N];
  logic [W-1:0] mux_out;
  int checks = 0, failures = 0;

  main_comp #(.N(N), .W(W)) dut (.sel, .mux_in, .mux_out);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int s;
      for (int i = 0; i < N; i++) mux_in[i] = W'({$urandom, $urandom});
      s = $urandom_range(0, N);
      sel = (s == N) ? '0 : N'(1) << s;
      #1;
      `CHECK(mux_out == ((s == N) ? '0 : mux_in[s]), "selected input")
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
