// router: five-port virtual-channel mesh router with on-chip security
// triggers.
//
// Data path. Every input port (LOCAL, EAST, NORTH, WEST, SOUTH) writes the
// flit arriving on its link into a flit_buffer of V VCs x B flits. A
// route_mesh unit at each input VC computes the X-Y output port of the flit
// at the head of that VC. Allocation is done in one cycle, with VC and
// switch allocation combined and nothing speculative:
//   * an output port is usable when one of its downstream VCs has a credit;
//     the flit will go to the lowest such VC, skipping the VC written on the
//     previous cycle;
//   * an input VC requests when it holds a flit, its port is usable and it
//     was not itself read on the previous cycle; a round-robin arbiter per
//     input port picks one of its VCs;
//   * a round-robin arbiter per output port picks one of the input ports
//     that want it.
// The winners are read out of their buffers and pass the crossbar, one
// main_comp multiplexer per output, whose select is the output grant. The
// outgoing link is combinational; the next router's buffer registers it, so
// a hop costs one cycle. A credit goes back upstream (credit_out) in the
// cycle a flit leaves a VC; credit counters per output VC start at B.
//
// The rule that a VC is never written or read on two cycles running keeps
// the no-back-to-back check (T4) an invariant of the healthy router; it is
// this design's choice, as are single-flit packets, the port numbering and
// the one-cycle pipeline.
//
// Checkers. Each part has its synthesized checkers beside it: fb_trigger
// (T1-T6) at every buffer, route_trigger (T7-T9) at every route unit,
// arb_trigger (T10-T11) at every arbiter and mux_trigger (T12) at every
// crossbar output. Triggers of one kind are ORed into trig[k-1] for Tk.
// The trace word of a kind comes from its lowest-numbered firing instance,
// shifted up by 4 bits with the instance number in the low 4 bits (input
// port for T1-T6, port*V+vc for T7-T9, input port or 5+output port for
// T10-T11, output port for T12). trace_packer turns them into trace packets
// for the central trace buffer.
module router
  import noc_pkg::*;
#(
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned NX         = 4,
  parameter int unsigned NY         = 4,
  parameter int unsigned V          = 2,
  parameter int unsigned B          = 4,
  parameter int unsigned TRACE_W    = 48,
  parameter int unsigned LIVE_BOUND = 512,
  parameter int unsigned ARB_BOUND  = 32,
  localparam int unsigned PW  = (B > 1) ? $clog2(B) : 1,
  localparam int unsigned DW  = $clog2(B + 1),
  localparam int unsigned AW  = $clog2(V * B),
  localparam int unsigned VW  = $clog2(V),
  localparam int unsigned RID_W = (NX * NY > 1) ? $clog2(NX * NY) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  link_t              in_link    [NPORT],
  output logic [V-1:0]       credit_out [NPORT],
  output link_t              out_link   [NPORT],
  input  logic [V-1:0]       credit_in  [NPORT],
  output logic [NTRIG-1:0]   trig,
  output logic               trace_valid,
  output logic [TRACE_W-1:0] trace_pkt,
  input  logic               trace_ready,
  output logic               trace_lost
);

  localparam logic [COORD_W-1:0] CX = COORD_W'(X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(Y);

  // ---------------------------------------------------------------- state
  logic [DW-1:0]    cred     [NPORT][V];
  logic [NPORT-1:0] sent_q;
  logic [VW-1:0]    last_vc  [NPORT];
  logic [NPORT-1:0] rd_q;
  logic [VW-1:0]    rd_vc_q  [NPORT];

  // ---------------------------------------------------------------- nets
  flit_t            dout     [NPORT];
  logic [V-1:0]     ne       [NPORT];
  logic [NPORT-1:0] dport    [NPORT][V];
  logic [V-1:0]     req1     [NPORT];
  logic [V-1:0]     gnt1     [NPORT];
  logic [NPORT-1:0] dsel     [NPORT];
  logic [NPORT-1:0] req2     [NPORT];   // [output][input]
  logic [NPORT-1:0] gnt2     [NPORT];   // [output][input]
  logic [NPORT-1:0] avail;
  logic [VW-1:0]    pick     [NPORT];
  logic [NPORT-1:0] rd_en;
  logic [VW-1:0]    rd_vc    [NPORT];
  logic [FLIT_W-1:0] xin     [NPORT];
  logic [FLIT_W-1:0] xout    [NPORT];

  // trigger nets
  logic [5:0]       t_fb     [NPORT];
  logic [SIG_W-1:0] p_fb     [NPORT][6];
  logic [2:0]       t_rt     [NPORT][V];
  logic [SIG_W-1:0] p_rt     [NPORT][V][3];
  logic [1:0]       t_a1     [NPORT];
  logic [SIG_W-1:0] p_a1     [NPORT][2];
  logic [1:0]       t_a2     [NPORT];
  logic [SIG_W-1:0] p_a2     [NPORT][2];
  logic             t_mx     [NPORT];
  logic [SIG_W-1:0] p_mx     [NPORT];

  // ---------------------------------------------------------------- inputs
  for (genvar p = 0; p < NPORT; p++) begin : g_in
    logic [V-1:0]  obs_wr, obs_rd;
    logic [PW-1:0] obs_wr_ptr [V];
    logic [PW-1:0] obs_rd_ptr [V];
    logic [DW-1:0] obs_depth  [V];
    logic [AW-1:0] obs_wr_addr, obs_rd_addr;
    logic          obs_parity_data;
    flit_t         head_p [V];

    flit_buffer #(.V(V), .B(B)) u_fb (
      .clk (clk), .rst_n (rst_n),
      .wr_en (in_link[p].valid), .wr_vc (in_link[p].vc), .din (in_link[p].flit),
      .rd_en (rd_en[p]), .rd_vc (VC_W'(rd_vc[p])),
      .dout (dout[p]), .head (head_p), .vc_not_empty (ne[p]),
      .obs_wr (obs_wr), .obs_rd (obs_rd), .obs_wr_ptr (obs_wr_ptr), .obs_rd_ptr (obs_rd_ptr),
      .obs_depth (obs_depth), .obs_wr_addr (obs_wr_addr), .obs_rd_addr (obs_rd_addr),
      .obs_parity_data (obs_parity_data)
    );

    fb_trigger #(.V(V), .B(B), .LIVE_BOUND(LIVE_BOUND)) u_fb_trig (
      .clk (clk), .rst_n (rst_n),
      .wr (obs_wr), .rd (obs_rd), .wr_ptr (obs_wr_ptr), .rd_ptr (obs_rd_ptr),
      .depth (obs_depth), .wr_addr (obs_wr_addr), .rd_addr (obs_rd_addr),
      .parity_data (obs_parity_data), .dout (dout[p]),
      .trig (t_fb[p]), .payload (p_fb[p])
    );

    for (genvar v = 0; v < V; v++) begin : g_vc
      logic [NPORT-1:0] destport;

      route_mesh #(.NX(NX), .NY(NY)) u_route (
        .valid (ne[p][v]), .cur_x (CX), .cur_y (CY),
        .dest_x (head_p[v].dst_x), .dest_y (head_p[v].dst_y),
        .destport (destport)
      );
      assign dport[p][v] = destport;

      route_trigger #(.NX(NX), .NY(NY)) u_route_trig (
        .valid (ne[p][v]), .cur_x (CX), .cur_y (CY),
        .dest_x (head_p[v].dst_x), .dest_y (head_p[v].dst_y),
        .destport (dport[p][v]), .trig (t_rt[p][v]), .payload (p_rt[p][v])
      );
    end

    // VC stage of the allocator
    always_comb begin
      for (int v = 0; v < V; v++)
        req1[p][v] = ne[p][v] && !(rd_q[p] && rd_vc_q[p] == VW'(v)) &&
                     ((dport[p][v] & avail) != '0);
    end

    arbiter #(.N(V)) u_arb_vc (.clk (clk), .rst_n (rst_n), .req (req1[p]), .gnt (gnt1[p]));

    arb_trigger #(.N(V), .ARB_BOUND(ARB_BOUND)) u_arb_vc_trig (
      .clk (clk), .rst_n (rst_n), .req (req1[p]), .gnt (gnt1[p]),
      .trig (t_a1[p]), .payload (p_a1[p])
    );

    always_comb begin
      dsel[p]  = '0;
      rd_vc[p] = '0;
      for (int v = 0; v < V; v++)
        if (gnt1[p][v]) begin
          dsel[p]  = dsel[p] | dport[p][v];
          rd_vc[p] = VW'(v);
        end
    end

    assign xin[p] = dout[p];

    always_comb begin
      for (int v = 0; v < V; v++)
        credit_out[p][v] = rd_en[p] && rd_vc[p] == VW'(v);
    end
  end

  // ---------------------------------------------------------------- outputs
  for (genvar o = 0; o < NPORT; o++) begin : g_out
    always_comb begin
      avail[o] = 1'b0;
      pick[o]  = '0;
      for (int v = V - 1; v >= 0; v--)
        if (cred[o][v] != '0 && !(sent_q[o] && last_vc[o] == VW'(v))) begin
          avail[o] = 1'b1;
          pick[o]  = VW'(v);
        end
      for (int p = 0; p < NPORT; p++)
        req2[o][p] = (gnt1[p] != '0) && dsel[p][o];
    end

    arbiter #(.N(NPORT)) u_arb_sw (.clk (clk), .rst_n (rst_n), .req (req2[o]), .gnt (gnt2[o]));

    arb_trigger #(.N(NPORT), .ARB_BOUND(ARB_BOUND)) u_arb_sw_trig (
      .clk (clk), .rst_n (rst_n), .req (req2[o]), .gnt (gnt2[o]),
      .trig (t_a2[o]), .payload (p_a2[o])
    );

    main_comp #(.N(NPORT), .W(FLIT_W)) u_mux (
      .sel (gnt2[o]), .mux_in (xin), .mux_out (xout[o])
    );

    mux_trigger #(.N(NPORT), .W(FLIT_W)) u_mux_trig (
      .sel (gnt2[o]), .mux_in (xin), .mux_out (xout[o]),
      .trig (t_mx[o]), .payload (p_mx[o])
    );

    assign out_link[o].valid = (gnt2[o] != '0);
    assign out_link[o].vc    = VC_W'(pick[o]);
    assign out_link[o].flit  = flit_t'(xout[o]);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        sent_q[o]  <= 1'b0;
        last_vc[o] <= '0;
        for (int v = 0; v < V; v++) cred[o][v] <= DW'(B);
      end else begin
        sent_q[o]  <= out_link[o].valid;
        last_vc[o] <= pick[o];
        for (int v = 0; v < V; v++)
          cred[o][v] <= cred[o][v] + DW'(credit_in[o][v])
                        - DW'(out_link[o].valid && pick[o] == VW'(v));
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      rd_en[p] = 1'b0;
      for (int o = 0; o < NPORT; o++)
        if (gnt2[o][p]) rd_en[p] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q <= '0;
      for (int p = 0; p < NPORT; p++) rd_vc_q[p] <= '0;
    end else begin
      rd_q <= rd_en;
      for (int p = 0; p < NPORT; p++) rd_vc_q[p] <= rd_vc[p];
    end
  end

  // ---------------------------------------------------------------- triggers
  logic [SIG_W-1:0] tpay [NTRIG];

  // the top 4 bits of a trace word are dropped to make room for the tag
  function automatic logic [SIG_W-1:0] tag(logic [SIG_W-5:0] w, logic [3:0] inst);
    return {w, inst};
  endfunction

  always_comb begin
    trig = '0;
    for (int k = 0; k < NTRIG; k++) tpay[k] = '0;
    // walk from the highest instance down so the lowest firing one is kept
    for (int p = NPORT - 1; p >= 0; p--) begin
      for (int k = 0; k < 6; k++)
        if (t_fb[p][k]) begin trig[k] = 1'b1; tpay[k] = tag(p_fb[p][k][SIG_W-5:0], 4'(p)); end
      for (int v = V - 1; v >= 0; v--)
        for (int k = 0; k < 3; k++)
          if (t_rt[p][v][k]) begin trig[6+k] = 1'b1; tpay[6+k] = tag(p_rt[p][v][k][SIG_W-5:0], 4'(p * V + v)); end
    end
    for (int o = NPORT - 1; o >= 0; o--) begin
      for (int k = 0; k < 2; k++)
        if (t_a2[o][k]) begin trig[9+k] = 1'b1; tpay[9+k] = tag(p_a2[o][k][SIG_W-5:0], 4'(NPORT + o)); end
    end
    for (int p = NPORT - 1; p >= 0; p--) begin
      for (int k = 0; k < 2; k++)
        if (t_a1[p][k]) begin trig[9+k] = 1'b1; tpay[9+k] = tag(p_a1[p][k][SIG_W-5:0], 4'(p)); end
    end
    for (int o = NPORT - 1; o >= 0; o--)
      if (t_mx[o]) begin trig[11] = 1'b1; tpay[11] = tag(p_mx[o][SIG_W-5:0], 4'(o)); end
  end

  trace_packer #(.TRACE_W(TRACE_W), .RID(Y * NX + X), .RID_W(RID_W)) u_packer (
    .clk (clk), .rst_n (rst_n), .trig (trig), .payload (tpay),
    .trace_valid (trace_valid), .trace_pkt (trace_pkt), .trace_ready (trace_ready),
    .lost (trace_lost)
  );

endmodule
