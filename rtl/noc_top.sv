// noc_top: NX x NY mesh network-on-chip with security triggers and a central
// trace buffer.
//
// Routers sit in a grid, router r = y*NX + x with router 0 at the north-west
// corner; neighbours are joined by a link and a set of V credit lines in each
// direction. Each router's LOCAL port is brought out of the top for the
// processing element and network interface attached to it (loc_* ports);
// ports on the mesh edge are tied off. Every router carries its twelve
// trigger kinds (T1..T12) and a trace formatter; all formatters feed one
// trace_buffer, read out through the trace_* ports.
//
// A processing element sends a flit by driving loc_in[r] (valid, VC, flit)
// for one cycle; it may write a VC only while it holds a credit for it (B
// per VC after reset, one back per loc_credit_out pulse) and not on two
// cycles running. Delivered flits appear on loc_out[r] for one cycle and the
// element returns each with a pulse on loc_credit_in[r][vc]. trig_flags
// shows, per router, which triggers fired in the cycle; trace_lost which
// routers lost a trace because the same trigger kind was still pending.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned NX         = 4,
  parameter int unsigned NY         = 4,
  parameter int unsigned V          = 2,
  parameter int unsigned B          = 4,
  parameter int unsigned TRACE_W    = 48,
  parameter int unsigned TBUF_DEPTH = 64,
  parameter int unsigned LIVE_BOUND = 512,
  parameter int unsigned ARB_BOUND  = 32,
  localparam int unsigned N  = NX * NY,
  localparam int unsigned CW = $clog2(TBUF_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  link_t              loc_in         [N],
  output logic [V-1:0]       loc_credit_out [N],
  output link_t              loc_out        [N],
  input  logic [V-1:0]       loc_credit_in  [N],
  output logic [NTRIG-1:0]   trig_flags     [N],
  output logic [N-1:0]       trace_lost,
  input  logic               trace_rd_en,
  output logic [TRACE_W-1:0] trace_rd_data,
  output logic [CW-1:0]      trace_count,
  output logic [15:0]        trace_dropped
);

  link_t              rin   [N][NPORT];
  link_t              rout  [N][NPORT];
  logic [V-1:0]       cin   [N][NPORT];
  logic [V-1:0]       cout  [N][NPORT];
  logic [N-1:0]       tvalid, tready;
  logic [TRACE_W-1:0] tpkt  [N];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned R = y * NX + x;

      router #(
        .X (x), .Y (y), .NX (NX), .NY (NY), .V (V), .B (B), .TRACE_W (TRACE_W),
        .LIVE_BOUND (LIVE_BOUND), .ARB_BOUND (ARB_BOUND)
      ) u_router (
        .clk (clk), .rst_n (rst_n),
        .in_link (rin[R]), .credit_out (cout[R]),
        .out_link (rout[R]), .credit_in (cin[R]),
        .trig (trig_flags[R]),
        .trace_valid (tvalid[R]), .trace_pkt (tpkt[R]), .trace_ready (tready[R]),
        .trace_lost (trace_lost[R])
      );

      // local port
      assign rin[R][P_LOCAL] = loc_in[R];
      assign cin[R][P_LOCAL] = loc_credit_in[R];
      assign loc_out[R]        = rout[R][P_LOCAL];
      assign loc_credit_out[R] = cout[R][P_LOCAL];

      // east neighbour: our EAST output feeds its WEST input
      if (x < NX - 1) begin : g_e
        assign rin[R][P_EAST] = rout[R+1][P_WEST];
        assign cin[R][P_EAST] = cout[R+1][P_WEST];
      end else begin : g_e_edge
        assign rin[R][P_EAST] = '0;
        assign cin[R][P_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign rin[R][P_WEST] = rout[R-1][P_EAST];
        assign cin[R][P_WEST] = cout[R-1][P_EAST];
      end else begin : g_w_edge
        assign rin[R][P_WEST] = '0;
        assign cin[R][P_WEST] = '0;
      end
      if (y < NY - 1) begin : g_s
        assign rin[R][P_SOUTH] = rout[R+NX][P_NORTH];
        assign cin[R][P_SOUTH] = cout[R+NX][P_NORTH];
      end else begin : g_s_edge
        assign rin[R][P_SOUTH] = '0;
        assign cin[R][P_SOUTH] = '0;
      end
      if (y > 0) begin : g_n
        assign rin[R][P_NORTH] = rout[R-NX][P_SOUTH];
        assign cin[R][P_NORTH] = cout[R-NX][P_SOUTH];
      end else begin : g_n_edge
        assign rin[R][P_NORTH] = '0;
        assign cin[R][P_NORTH] = '0;
      end
    end
  end

  trace_buffer #(.N(N), .TRACE_W(TRACE_W), .DEPTH(TBUF_DEPTH)) u_tbuf (
    .clk (clk), .rst_n (rst_n),
    .src_valid (tvalid), .src_pkt (tpkt), .src_ready (tready),
    .rd_en (trace_rd_en), .rd_data (trace_rd_data), .count (trace_count),
    .dropped (trace_dropped)
  );

endmodule
