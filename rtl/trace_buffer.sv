// trace_buffer: the central on-chip trace buffer shared by all routers.
//
// Each cycle a round-robin arbiter picks one router with a waiting trace
// packet and acknowledges it (src_ready). The packet is appended to a
// DEPTH-entry memory kept in arrival order. When the memory is full the
// earliest packets are kept: an acknowledged packet is discarded and counted
// in dropped (saturating 16-bit). Packets are read out oldest first for
// offline analysis: rd_data shows the oldest one and rd_en removes it at the
// clock edge; count gives the fill. The read port stands for the chip's
// debug access (JTAG). Keep-earliest on overflow and the depth are choices
// of this design.
module trace_buffer #(
  parameter int unsigned N       = 16,
  parameter int unsigned TRACE_W = 48,
  parameter int unsigned DEPTH   = 64,
  localparam int unsigned PW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0]       src_valid,
  input  logic [TRACE_W-1:0] src_pkt [N],
  output logic [N-1:0]       src_ready,
  input  logic               rd_en,
  output logic [TRACE_W-1:0] rd_data,
  output logic [CW-1:0]      count,
  output logic [15:0]        dropped
);

  logic [TRACE_W-1:0] mem [DEPTH];
  logic [PW-1:0]      wp, rp;
  logic [TRACE_W-1:0] sel_pkt;
  logic               take, push, pop;

  arbiter #(.N(N)) u_arb (
    .clk (clk),
    .rst_n (rst_n),
    .req (src_valid),
    .gnt (src_ready)
  );

  always_comb begin
    sel_pkt = '0;
    for (int i = 0; i < N; i++)
      if (src_ready[i]) sel_pkt = src_pkt[i];
  end

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  assign take = |src_ready;
  assign pop  = rd_en && (count != '0);
  assign push = take && (count != CW'(DEPTH) || pop);

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= sel_pkt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; dropped <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      if (push && !pop)      count <= count + CW'(1);
      else if (pop && !push) count <= count - CW'(1);
      if (take && !push && dropped != 16'hFFFF) dropped <= dropped + 16'd1;
    end
  end

  assign rd_data = mem[rp];

endmodule
