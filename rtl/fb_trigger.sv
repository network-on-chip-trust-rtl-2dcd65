// fb_trigger: synthesized security checkers T1-T6 for one flit buffer.
//
// Each checker is the hardware form of one buffer assertion and raises its
// trigger bit in the cycle it sees the violation (T1, T2 one cycle after the
// offending write or read, since they compare against the previous cycle):
//   T1  a write without a read (read without write) must move the VC's write
//       (read) pointer on by exactly one place;
//   T2  a write to a full VC (read from an empty VC) must leave the write
//       (read) pointer where it was;
//   T3  every address read from a VC lies between the smallest and largest
//       address written to it so far;
//   T4  a VC is never written (read) on two cycles in a row;
//   T5  the parity stored with a flit matches the flit read out, and a
//       non-empty VC is read within LIVE_BOUND cycles (bounded "eventually");
//   T6  (writes without read) - (reads without write), counted per VC,
//       equals the VC's depth.
// The V VCs are checked side by side and ORed per trigger; the trace word of
// a trigger (SIG_W bits, lowest-numbered firing VC) carries the signals the
// original design traces for it: pointers, depth, addresses, enables, or the
// source, destination and parity of the flit read.
//
// Checking the write pointer in T2, the running min/max form of T3, the
// bounded form of T5 and the per-cycle balance form of T6 are this design's
// reading of the assertions; LIVE_BOUND has no published value.
module fb_trigger
  import noc_pkg::*;
#(
  parameter int unsigned V          = 2,
  parameter int unsigned B          = 4,
  parameter int unsigned LIVE_BOUND = 512,
  localparam int unsigned PW = (B > 1) ? $clog2(B) : 1,
  localparam int unsigned DW = $clog2(B + 1),
  localparam int unsigned AW = $clog2(V * B),
  localparam int unsigned CW = 16,
  localparam int unsigned LW = $clog2(LIVE_BOUND + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [V-1:0]      wr,
  input  logic [V-1:0]      rd,
  input  logic [PW-1:0]     wr_ptr [V],
  input  logic [PW-1:0]     rd_ptr [V],
  input  logic [DW-1:0]     depth  [V],
  input  logic [AW-1:0]     wr_addr,
  input  logic [AW-1:0]     rd_addr,
  input  logic              parity_data,
  input  flit_t             dout,
  output logic [5:0]        trig,
  output logic [SIG_W-1:0]  payload [6]
);

  function automatic logic [PW-1:0] ptr_inc(logic [PW-1:0] p);
    return (p == PW'(B - 1)) ? '0 : p + PW'(1);
  endfunction

  // previous-cycle state
  logic [V-1:0]  wr_q, rd_q, wr_only_q, rd_only_q, wr_full_q, rd_empty_q;
  logic [PW-1:0] wptr_q [V];
  logic [PW-1:0] rptr_q [V];
  // T3 address ranges
  logic [V-1:0]  wseen;
  logic [AW-1:0] wmin [V];
  logic [AW-1:0] wmax [V];
  // T5 age, T6 counters
  logic [LW-1:0] age    [V];
  logic [CW-1:0] wr_cnt [V];
  logic [CW-1:0] rd_cnt [V];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_q <= '0; rd_q <= '0; wr_only_q <= '0; rd_only_q <= '0;
      wr_full_q <= '0; rd_empty_q <= '0; wseen <= '0;
      for (int v = 0; v < V; v++) begin
        wptr_q[v] <= '0; rptr_q[v] <= '0;
        wmin[v] <= '0; wmax[v] <= '0;
        age[v] <= '0; wr_cnt[v] <= '0; rd_cnt[v] <= '0;
      end
    end else begin
      wr_q <= wr;
      rd_q <= rd;
      for (int v = 0; v < V; v++) begin
        wr_only_q[v]  <= wr[v] && !rd[v];
        rd_only_q[v]  <= rd[v] && !wr[v];
        wr_full_q[v]  <= wr[v] && !rd[v] && (depth[v] == DW'(B));
        rd_empty_q[v] <= rd[v] && !wr[v] && (depth[v] == '0);
        wptr_q[v]     <= wr_ptr[v];
        rptr_q[v]     <= rd_ptr[v];
        if (wr[v]) begin
          wseen[v] <= 1'b1;
          if (!wseen[v] || wr_addr < wmin[v]) wmin[v] <= wr_addr;
          if (!wseen[v] || wr_addr > wmax[v]) wmax[v] <= wr_addr;
        end
        if (depth[v] != '0 && !rd[v]) begin
          if (age[v] != LW'(LIVE_BOUND)) age[v] <= age[v] + LW'(1);
        end else begin
          age[v] <= '0;
        end
        if (wr[v] && !rd[v]) wr_cnt[v] <= wr_cnt[v] + CW'(1);
        if (rd[v] && !wr[v]) rd_cnt[v] <= rd_cnt[v] + CW'(1);
      end
    end
  end

  logic [V-1:0] f1, f2, f3, f4, f5, f6;

  always_comb begin
    for (int v = 0; v < V; v++) begin
      logic          ws;
      logic [AW-1:0] lo, hi;
      // range including a write in this same cycle
      ws = wseen[v] || wr[v];
      lo = (!wseen[v] || (wr[v] && wr_addr < wmin[v])) ? wr_addr : wmin[v];
      hi = (!wseen[v] || (wr[v] && wr_addr > wmax[v])) ? wr_addr : wmax[v];

      f1[v] = (wr_only_q[v] && wr_ptr[v] != ptr_inc(wptr_q[v])) ||
              (rd_only_q[v] && rd_ptr[v] != ptr_inc(rptr_q[v]));
      f2[v] = (wr_full_q[v]  && wr_ptr[v] != wptr_q[v]) ||
              (rd_empty_q[v] && rd_ptr[v] != rptr_q[v]);
      f3[v] = rd[v] && (!ws || rd_addr < lo || rd_addr > hi);
      f4[v] = (wr_q[v] && wr[v]) || (rd_q[v] && rd[v]);
      f5[v] = (rd[v] && depth[v] != '0 && parity_data != flit_parity(dout)) ||
              (age[v] == LW'(LIVE_BOUND));
      f6[v] = (wr_cnt[v] - rd_cnt[v]) != CW'(depth[v]);
    end
  end

  assign trig = {|f6, |f5, |f4, |f3, |f2, |f1};

  always_comb begin
    for (int k = 0; k < 6; k++) payload[k] = '0;
    for (int v = V - 1; v >= 0; v--) begin
      if (f1[v] || f2[v])
        for (int k = 0; k < 2; k++)
          if ((k == 0) ? f1[v] : f2[v])
            payload[k] = SIG_W'({VC_W'(v), depth[v], wr_ptr[v], wptr_q[v], wr_addr,
                                 wr_q[v], rd_ptr[v], rptr_q[v], rd_addr, rd_q[v]});
      if (f3[v])
        payload[2] = SIG_W'({VC_W'(v), depth[v], rd_ptr[v], rd_addr, wmin[v], wmax[v], rd[v]});
      if (f4[v])
        payload[3] = SIG_W'({VC_W'(v), depth[v], wr_ptr[v], rd_ptr[v], wr_addr, rd_addr,
                             wr[v], rd[v]});
      if (f5[v])
        payload[4] = SIG_W'({VC_W'(v), dout.src_x, dout.src_y, dout.dst_x, dout.dst_y,
                             parity_data, flit_parity(dout), age[v]});
      if (f6[v])
        payload[5] = SIG_W'({VC_W'(v), depth[v], rd_cnt[v], wr_cnt[v]});
    end
  end

endmodule
