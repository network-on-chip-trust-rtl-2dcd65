// tb_flit_buffer: random writes and reads on a 2-VC x 4-flit buffer checked
// against one queue per VC: head flits, dout, not-empty flags, depths,
// stored parity, and that a write to a full VC or a read from an empty VC
// changes nothing.
`include "tb_check.svh"
module tb_flit_buffer;
  import noc_pkg::*;
  localparam int V = 2, B = 4;
  localparam int PW = $clog2(B), DW = $clog2(B + 1), AW = $clog2(V * B);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [VC_W-1:0] wr_vc = 0, rd_vc = 0;
  flit_t din = '0, dout;
  flit_t head [V];
  logic [V-1:0] ne, obs_wr, obs_rd;
  logic [PW-1:0] wp [V], rp [V];
  logic [DW-1:0] dp [V];
  logic [AW-1:0] wa, ra;
  logic par;
  int checks = 0, failures = 0;
  flit_t q [V][$];
  int full_writes = 0, empty_reads = 0;
  bit was_full;  // a write is refused when its VC was full before the edge

  flit_buffer #(.V(V), .B(B)) dut (
    .clk, .rst_n, .wr_en, .wr_vc, .din, .rd_en, .rd_vc, .dout, .head, .vc_not_empty (ne),
    .obs_wr, .obs_rd, .obs_wr_ptr (wp), .obs_rd_ptr (rp), .obs_depth (dp),
    .obs_wr_addr (wa), .obs_rd_addr (ra), .obs_parity_data (par)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      // compare state before this cycle's operation
      for (int v = 0; v < V; v++) begin
        `CHECK(ne[v] == (q[v].size() != 0), "not-empty flag")
        `CHECK(int'(dp[v]) == q[v].size(), "depth")
        if (q[v].size() != 0) begin `CHECK(head[v] == q[v][0], "head flit") if (head[v] != q[v][0]) $display("v=%0d head=%h exp=%h size=%0d", v, head[v], q[v][0], q[v].size()); end
      end
      wr_en = ($urandom_range(0, 2) != 0);
      wr_vc = VC_W'($urandom_range(0, V - 1));
      din   = flit_t'({$urandom, $urandom});
      rd_en = ($urandom_range(0, 2) != 0);
      rd_vc = VC_W'($urandom_range(0, V - 1));
      #1;
      if (rd_en && q[rd_vc].size() != 0) begin
        `CHECK(dout == q[rd_vc][0], "dout")
        `CHECK(par == ^dout, "stored parity")
      end
      @(posedge clk);
      was_full = (q[wr_vc].size() == B);
      if (rd_en) begin
        if (q[rd_vc].size() != 0) void'(q[rd_vc].pop_front());
        else empty_reads++;
      end
      if (wr_en) begin
        if (!was_full) q[wr_vc].push_back(din);
        else full_writes++;
      end
    end
    `CHECK(full_writes > 0, "writes to a full VC were exercised")
    `CHECK(empty_reads > 0, "reads from an empty VC were exercised")
    $display("full writes %0d, empty reads %0d", full_writes, empty_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
