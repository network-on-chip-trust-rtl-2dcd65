// tb_noc_top: end-to-end test of the 4x4 mesh at its default parameters.
//
// Every processing element is a behavioural traffic model: it sends queued
// single-flit packets on its local link while it holds credits (never the
// same VC on two cycles running) and returns a credit one cycle after each
// delivered flit.
//   1. Hot-spot run: every IP except IP10 sends three packets to IP10. All
//      45 must arrive once, unchanged, and no trigger may fire.
//   2. Uniform random run: every IP sends 30 packets to random destinations;
//      all must arrive, with credit stalls and output contention seen and no
//      trigger firing.
//   3. Bug injection: twelve separate runs, each after a reset, force one
//      bug into a router (a dropped write, a pointer moved on an empty read,
//      a wrong read address, a repeated downstream VC, a blocked flit, a
//      two-hot route, a destination outside the mesh, a wrong route, a
//      double grant, a withheld grant, a corrupted multiplexer output) and
//      check that the matching trigger fires in the expected router and that
//      a trace packet with that router id and trace id is read out of the
//      central trace buffer.
`include "tb_check.svh"
`define R5 dut.g_y[1].g_x[1].u_router
module tb_noc_top;
  import noc_pkg::*;
  localparam int NX = 4, NY = 4, N = 16, V = 2, B = 4, TW = 48;

  logic clk = 0, rst_n = 0;
  link_t loc_in [N], loc_out [N];
  logic [V-1:0] loc_credit_out [N], loc_credit_in [N];
  logic [NTRIG-1:0] trig_flags [N];
  logic [N-1:0] trace_lost;
  logic trace_rd_en;
  logic [TW-1:0] trace_rd_data;
  logic [6:0] trace_count;
  logic [15:0] trace_dropped;
  int checks = 0, failures = 0;

  noc_top dut (
    .clk, .rst_n, .loc_in, .loc_credit_out, .loc_out, .loc_credit_in, .trig_flags,
    .trace_lost, .trace_rd_en, .trace_rd_data, .trace_count, .trace_dropped);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ IP models
  flit_t txq [N][$];
  int    cred [N][V];
  int    lastv [N];
  logic [V-1:0] ret [N];
  flit_t outstanding [$];
  int n_recv = 0, n_wrong_dst = 0;
  int cyc = 0;
  // mechanism counters
  int stall_cycles = 0, contention = 0, trig_seen [N][NTRIG];
  bit expect_quiet = 1;

  function automatic flit_t mk(int s, int d, int seq);
    flit_t f;
    f.src_x = COORD_W'(s % NX); f.src_y = COORD_W'(s / NX);
    f.dst_x = COORD_W'(d % NX); f.dst_y = COORD_W'(d / NX);
    f.payload = {8'(s), 8'(d), 16'(seq)};
    return f;
  endfunction

  task automatic models_reset();
    for (int r = 0; r < N; r++) begin
      txq[r].delete(); lastv[r] = -1; ret[r] = '0;
      for (int v = 0; v < V; v++) cred[r][v] = B;
    end
    outstanding.delete();
  endtask

  task automatic tick();
    @(negedge clk);
    cyc++;
    for (int r = 0; r < N; r++) begin
      int v;
      loc_credit_in[r] = ret[r];
      ret[r] = '0;
      loc_in[r] = '0;
      v = (lastv[r] == 0) ? 1 : 0;
      if (cred[r][v] == 0) v = 1 - v;
      if (txq[r].size() != 0) begin
        if (cred[r][v] > 0 && v != lastv[r]) begin
          loc_in[r].valid = 1'b1; loc_in[r].vc = VC_W'(v); loc_in[r].flit = txq[r].pop_front();
          cred[r][v]--; lastv[r] = v;
          outstanding.push_back(loc_in[r].flit);
        end else begin
          lastv[r] = -1; stall_cycles++;
        end
      end else lastv[r] = -1;
    end
    #1;
    for (int r = 0; r < N; r++) begin
      for (int v = 0; v < V; v++) if (loc_credit_out[r][v]) cred[r][v]++;
      if (loc_out[r].valid) begin
        int idx;
        ret[r][loc_out[r].vc] = 1'b1;
        if (int'(loc_out[r].flit.dst_x) + NX * int'(loc_out[r].flit.dst_y) != r) n_wrong_dst++;
        idx = -1;
        foreach (outstanding[i]) if (idx < 0 && outstanding[i] == loc_out[r].flit) idx = i;
        if (expect_quiet) `CHECK(idx >= 0, "delivered flit was sent and not yet delivered")
        if (idx >= 0) outstanding.delete(idx);
        n_recv++;
      end
      for (int k = 0; k < NTRIG; k++) if (trig_flags[r][k]) trig_seen[r][k]++;
    end
    if ($countones(dut.g_y[2].g_x[2].u_router.req2[P_LOCAL]) > 1 ||
        $countones(dut.g_y[2].g_x[1].u_router.req2[P_EAST]) > 1) contention++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    for (int r = 0; r < N; r++) begin loc_in[r] = '0; loc_credit_in[r] = '0; end
    models_reset();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < N; r++) for (int k = 0; k < NTRIG; k++) trig_seen[r][k] = 0;
  endtask

  function automatic int any_trig();
    int s = 0;
    for (int r = 0; r < N; r++) for (int k = 0; k < NTRIG; k++) s += trig_seen[r][k];
    return s;
  endfunction

  // read the whole trace buffer; report whether (rid, tid) was among it
  int trace_read_total = 0;
  bit trace_hit [NTRIG];
  task automatic drain_trace(int rid);
    int n = 0;
    for (int k = 0; k < NTRIG; k++) trace_hit[k] = 0;
    repeat (4) @(negedge clk);   // let the last packets reach the buffer
    // a bug that keeps firing refills the buffer: read at most 2*64 packets
    while (trace_count != 0 && n < 128) begin
      n++;
      @(negedge clk);
      if (trace_rd_data[TW-1] == 1'b0 && int'(trace_rd_data[TW-2 -: 4]) == rid &&
          trace_rd_data[TW-6 -: 4] >= 4'd1 && trace_rd_data[TW-6 -: 4] <= 4'd12)
        trace_hit[int'(trace_rd_data[TW-6 -: 4]) - 1] = 1;
      trace_rd_en = 1;
      trace_read_total++;
      @(negedge clk);
      trace_rd_en = 0;
    end
  endtask

  task automatic run_until_delivered(int max_cycles);
    int c = 0;
    while ((outstanding.size() != 0 || any_queued()) && c < max_cycles) begin tick(); c++; end
  endtask

  function automatic bit any_queued();
    for (int r = 0; r < N; r++) if (txq[r].size() != 0) return 1;
    return 0;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fired_ok [NTRIG];

  // check that trigger k (and k2, if given) fired in router rid and that
  // its trace packet reached the trace buffer; then reset for the next bug
  task automatic expect_fault(int k, int rid, int k2 = 0);
    repeat (4) tick();
    drain_trace(rid);
    for (int i = 0; i < 2; i++) begin
      int t;
      t = (i == 0) ? k : k2;
      if (t != 0) begin
        `CHECK(trig_seen[rid][t-1] > 0, $sformatf("T%0d fired in R%0d", t, rid))
        `CHECK(trace_hit[t-1], $sformatf("trace packet R%0d/T%0d read out", rid, t))
        if (trig_seen[rid][t-1] > 0 && trace_hit[t-1]) fired_ok[t-1]++;
      end
    end
    do_reset();
  endtask

  initial begin
    int t0, lat;
    bit found;
    trace_rd_en = 0;
    for (int r = 0; r < N; r++) begin loc_in[r] = '0; loc_credit_in[r] = '0; end
    for (int k = 0; k < NTRIG; k++) fired_ok[k] = 0;
    models_reset();
    do_reset();

    // 1. hot spot: three packets from every IP to IP10
    for (int s = 0; s < N; s++)
      if (s != 10) for (int j = 0; j < 3; j++) txq[s].push_back(mk(s, 10, j));
    t0 = cyc;
    run_until_delivered(5000);
    lat = cyc - t0;
    `CHECK(outstanding.size() == 0 && n_recv == 45, $sformatf("hot spot: %0d of 45 delivered", n_recv))
    `CHECK(n_wrong_dst == 0, "hot spot: right destination")
    `CHECK(any_trig() == 0, "hot spot: no trigger")
    `CHECK(trace_count == 0, "hot spot: trace buffer empty")
    // IP10 takes at most one flit per cycle: the run cannot beat 45 cycles
    `CHECK(lat >= 45, "hot spot: no faster than the ejection port")
    $display("hot spot: 45 packets in %0d cycles", lat);

    // 2. uniform random traffic
    n_recv = 0;
    for (int s = 0; s < N; s++)
      for (int j = 0; j < 30; j++) txq[s].push_back(mk(s, $urandom_range(0, N - 1), j));
    run_until_delivered(20000);
    `CHECK(outstanding.size() == 0 && n_recv == N * 30, $sformatf("random: %0d of %0d delivered", n_recv, N * 30))
    `CHECK(n_wrong_dst == 0, "random: right destinations")
    `CHECK(any_trig() == 0, "random: no trigger")
    `CHECK(stall_cycles > 0, "credit stall seen")
    `CHECK(contention > 0, "output contention seen")
    $display("random: stalls %0d contention %0d", stall_cycles, contention);

    // 3. bug injection, one bug per run, all in or next to R5
    expect_quiet = 0;
    // T1 (+T6): write into R5's local buffer dropped
    do_reset();
    txq[5].push_back(mk(5, 6, 1));
    force `R5.g_in[0].u_fb.wr_ok = 1'b0;
    tick();
    @(posedge clk); #1;
    release `R5.g_in[0].u_fb.wr_ok;
    expect_fault(1, 5, 6);

    // T2: read pointer moved by a read of an empty VC
    force `R5.rd_en = 5'b00001;
    force `R5.g_in[0].u_fb.rd_ok = 1'b1;
    tick();
    @(posedge clk); #1;
    release `R5.rd_en;
    release `R5.g_in[0].u_fb.rd_ok;
    expect_fault(2, 5);

    // T3: read address outside the VC's range
    for (int j = 0; j < 6; j++) txq[5].push_back(mk(5, 6, j));
    force `R5.g_in[0].u_fb.vc_rd_addr = 3'd7;
    repeat (10) tick();
    release `R5.g_in[0].u_fb.vc_rd_addr;
    expect_fault(3, 5);

    // T4: R5 writes the same VC of R6 on consecutive cycles
    for (int j = 0; j < 8; j++) txq[5].push_back(mk(5, 7, j));
    force `R5.sent_q = '0;
    repeat (12) tick();
    release `R5.sent_q;
    expect_fault(4, 6);

    // T5: a flit kept from leaving R5 past the bound
    txq[5].push_back(mk(5, 6, 1));
    force `R5.avail = '0;
    t0 = cyc;
    while (trig_seen[5][4] == 0 && cyc - t0 < 700) tick();
    lat = cyc - t0;
    release `R5.avail;
    `CHECK(lat >= 512 && lat <= 516, $sformatf("T5 after the 512-cycle bound (%0d)", lat))
    expect_fault(5, 5);

    // T7: two-hot route vector
    force `R5.g_in[0].g_vc[0].destport = 5'b00110;
    tick();
    @(posedge clk); #1;
    release `R5.g_in[0].g_vc[0].destport;
    expect_fault(7, 5);

    // T8: destination outside the mesh
    begin flit_t f; f = mk(5, 6, 1); f.dst_x = 3'd5; txq[5].push_back(f); end
    repeat (2) tick();
    expect_fault(8, 5);

    // T9: flit for the east sent west
    txq[5].push_back(mk(5, 6, 1));
    force `R5.g_in[0].g_vc[0].destport = 5'b01000;
    repeat (2) tick();
    release `R5.g_in[0].g_vc[0].destport;
    expect_fault(9, 5);

    // T10: two grants at R5's east output
    force `R5.g_out[1].u_arb_sw.gnt = 5'b00011;
    tick();
    @(posedge clk); #1;
    release `R5.g_out[1].u_arb_sw.gnt;
    expect_fault(10, 5);

    // T11: east output grant withheld
    txq[5].push_back(mk(5, 6, 1));
    force `R5.g_out[1].u_arb_sw.gnt = '0;
    repeat (40) tick();
    release `R5.g_out[1].u_arb_sw.gnt;
    expect_fault(11, 5);

    // T12: crossbar output corrupted
    for (int j = 0; j < 3; j++) txq[5].push_back(mk(5, 6, j));
    force `R5.g_out[1].u_mux.mux_out = '0;
    repeat (4) tick();
    release `R5.g_out[1].u_mux.mux_out;
    expect_fault(12, 5);

    for (int k = 0; k < NTRIG; k++)
      `CHECK(fired_ok[k] > 0, $sformatf("mechanism T%0d exercised", k + 1))
    for (int k = 0; k < NTRIG; k++) $display("T%0d shown %0d time(s) with its trace packet", k + 1, fired_ok[k]);
    $display("trace packets read: %0d", trace_read_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
