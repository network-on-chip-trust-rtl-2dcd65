// flit_buffer: input buffer of one router port.
//
// V virtual channels share one RAM of V*B flits. VC v owns the fixed region
// v*B .. v*B+B-1; inside it a write pointer and a read pointer walk round the
// region and a depth counter tracks the fill. Every flit is stored with an
// even-parity bit computed when it is written, so a flit changed while it
// sits in the buffer shows up as a parity mismatch when it is read.
//
// Interface: one write port (wr_en, wr_vc, din) fed by the upstream link and
// one read port (rd_en, rd_vc) driven by the router's allocator. A write to a
// full VC and a read from an empty VC are ignored. head[v] always shows the
// oldest flit of VC v and dout the one of rd_vc, combinationally; the read
// itself (pointer move) happens at the clock edge. The obs_* outputs expose
// the pointers, depths, addresses and parity that the T1-T6 triggers watch;
// their names follow the signal names of the original router
// (wr_ptr, rd_ptr, depth, vc_wr_addr, vc_rd_addr, parity_data).
//
// The fixed per-VC regions, the even parity over the whole flit and the
// ignore-on-full/empty rule are choices of this design.
module flit_buffer
  import noc_pkg::*;
#(
  parameter int unsigned V = 2,
  parameter int unsigned B = 4,
  localparam int unsigned PW = (B > 1) ? $clog2(B) : 1,
  localparam int unsigned DW = $clog2(B + 1),
  localparam int unsigned AW = $clog2(V * B),
  localparam int unsigned VW = $clog2(V)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [VC_W-1:0]      wr_vc,
  input  flit_t                din,
  input  logic                 rd_en,
  input  logic [VC_W-1:0]      rd_vc,
  output flit_t                dout,
  output flit_t                head         [V],
  output logic [V-1:0]         vc_not_empty,
  // observation for the triggers
  output logic [V-1:0]         obs_wr,
  output logic [V-1:0]         obs_rd,
  output logic [PW-1:0]        obs_wr_ptr   [V],
  output logic [PW-1:0]        obs_rd_ptr   [V],
  output logic [DW-1:0]        obs_depth    [V],
  output logic [AW-1:0]        obs_wr_addr,
  output logic [AW-1:0]        obs_rd_addr,
  output logic                 obs_parity_data
);

  flit_t          ram     [V*B];
  logic           par_mem [V*B];
  logic [PW-1:0]  wr_ptr  [V];
  logic [PW-1:0]  rd_ptr  [V];
  logic [DW-1:0]  depth   [V];

  function automatic logic [PW-1:0] ptr_inc(logic [PW-1:0] p);
    return (p == PW'(B - 1)) ? '0 : p + PW'(1);
  endfunction

  function automatic logic [AW-1:0] vc_addr(logic [VC_W-1:0] vc, logic [PW-1:0] p);
    return AW'(int'(vc) * int'(B) + int'(p));
  endfunction

  logic [AW-1:0] vc_wr_addr, vc_rd_addr;
  logic          wr_ok, rd_ok;
  logic [VW-1:0] wv, rv;     // VC numbers cut to the VCs that exist

  assign wv = wr_vc[VW-1:0];
  assign rv = rd_vc[VW-1:0];

  assign vc_wr_addr = vc_addr(wr_vc, wr_ptr[wv]);
  assign vc_rd_addr = vc_addr(rd_vc, rd_ptr[rv]);
  assign wr_ok = wr_en && (depth[wv] != DW'(B));
  assign rd_ok = rd_en && (depth[rv] != '0);

  always_ff @(posedge clk) begin
    if (wr_ok) begin
      ram[vc_wr_addr]     <= din;
      par_mem[vc_wr_addr] <= flit_parity(din);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < V; v++) begin
        wr_ptr[v] <= '0;
        rd_ptr[v] <= '0;
        depth[v]  <= '0;
      end
    end else begin
      for (int v = 0; v < V; v++) begin
        logic w, r;
        w = wr_ok && (wr_vc == VC_W'(v));
        r = rd_ok && (rd_vc == VC_W'(v));
        if (w) wr_ptr[v] <= ptr_inc(wr_ptr[v]);
        if (r) rd_ptr[v] <= ptr_inc(rd_ptr[v]);
        if (w && !r)      depth[v] <= depth[v] + DW'(1);
        else if (r && !w) depth[v] <= depth[v] - DW'(1);
      end
    end
  end

  always_comb begin
    for (int v = 0; v < V; v++) begin
      head[v]         = ram[vc_addr(VC_W'(v), rd_ptr[v])];
      vc_not_empty[v] = (depth[v] != '0);
      obs_wr[v]       = wr_en && (wr_vc == VC_W'(v));
      obs_rd[v]       = rd_en && (rd_vc == VC_W'(v));
      obs_wr_ptr[v]   = wr_ptr[v];
      obs_rd_ptr[v]   = rd_ptr[v];
      obs_depth[v]    = depth[v];
    end
  end

  assign dout            = ram[vc_rd_addr];
  assign obs_wr_addr     = vc_wr_addr;
  assign obs_rd_addr     = vc_rd_addr;
  assign obs_parity_data = par_mem[vc_rd_addr];

  initial begin
    assert (V >= 2 && V <= (1 << VC_W)) else $error("flit_buffer: V out of range");
  end

endmodule
