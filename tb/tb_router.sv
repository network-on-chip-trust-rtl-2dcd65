// tb_router: one router at (1,1) of a 4x4 mesh with behavioural neighbours
// on all five ports. Senders obey credits and never write a VC on two
// cycles running; receivers check they are never sent more than B flits per
// VC and return credits after a random delay. Every flit must leave once,
// unchanged, on its X-Y port, and no trigger may fire. An idle router must
// forward a flit in the cycle after it is written (one cycle per hop), and
// contention for one output must be seen.
`include "tb_check.svh"
module tb_router;
  import noc_pkg::*;
  localparam int V = 2, B = 4, X = 1, Y = 1;
  logic clk = 0, rst_n = 0;
  link_t in_link [NPORT], out_link [NPORT];
  logic [V-1:0] credit_out [NPORT], credit_in [NPORT];
  logic [NTRIG-1:0] trig;
  logic tvalid, tlost;
  logic [47:0] tpkt;
  int checks = 0, failures = 0;

  router #(.X(X), .Y(Y), .NX(4), .NY(4), .V(V), .B(B)) dut (
    .clk, .rst_n, .in_link, .credit_out, .out_link, .credit_in, .trig,
    .trace_valid (tvalid), .trace_pkt (tpkt), .trace_ready (1'b1), .trace_lost (tlost));

  always #5 clk = ~clk;

  int up_cred [NPORT][V];
  int last_vc [NPORT];
  int occ [NPORT][V];
  int rel [NPORT][V][$];     // release countdowns per buffered flit
  flit_t sent [$];
  int n_sent = 0, n_recv = 0, contention = 0, trig_cycles = 0;
  int cycle = 0;

  function automatic int xy_port(flit_t f);
    if (f.dst_x > X) return P_EAST;
    if (f.dst_x < X) return P_WEST;
    if (f.dst_y > Y) return P_SOUTH;
    if (f.dst_y < Y) return P_NORTH;
    return P_LOCAL;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit allow_send, int only_port, flit_t fixed, output bit did);
    @(negedge clk);
    cycle++;
    did = 0;
    // credits back to the senders and from the receivers
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < V; v++) begin
        credit_in[o][v] = 1'b0;
        if (rel[o][v].size() != 0 && rel[o][v][0] == 0) begin
          void'(rel[o][v].pop_front());
          credit_in[o][v] = 1'b1;
          occ[o][v]--;
        end
        foreach (rel[o][v][i]) if (rel[o][v][i] > 0) rel[o][v][i]--;
      end
    for (int p = 0; p < NPORT; p++) begin
      int v;
      in_link[p] = '0;
      v = $urandom_range(0, V - 1);
      if (v == last_vc[p]) v = (v + 1) % V;
      if (allow_send && (only_port < 0 || only_port == p) &&
          ($urandom_range(0, 1) == 0 || only_port >= 0) && up_cred[p][v] > 0) begin
        flit_t f;
        f = fixed;
        if (only_port < 0) begin
          f.src_x = COORD_W'(X); f.src_y = COORD_W'(Y);
          f.dst_x = COORD_W'($urandom_range(0, 3)); f.dst_y = COORD_W'($urandom_range(0, 3));
          f.payload = $urandom;
          // a flit entering from a side never turns back towards it
          if (p == P_EAST && f.dst_x > X) f.dst_x = COORD_W'(X);
          if (p == P_WEST && f.dst_x < X) f.dst_x = COORD_W'(X);
          if (p == P_SOUTH && (f.dst_x != X || f.dst_y > Y)) begin f.dst_x = COORD_W'(X); f.dst_y = COORD_W'(Y); end
          if (p == P_NORTH && (f.dst_x != X || f.dst_y < Y)) begin f.dst_x = COORD_W'(X); f.dst_y = COORD_W'(Y); end
        end
        in_link[p].valid = 1'b1; in_link[p].vc = VC_W'(v); in_link[p].flit = f;
        up_cred[p][v]--; last_vc[p] = v;
        sent.push_back(f); n_sent++; did = 1;
      end else last_vc[p] = -1;
    end
    #1;
    // outputs of this cycle
    for (int o = 0; o < NPORT; o++) begin
      if (out_link[o].valid) begin
        int v, idx;
        v = int'(out_link[o].vc);
        `CHECK(occ[o][v] < B, "no flit without a credit")
        occ[o][v]++;
        rel[o][v].push_back($urandom_range(0, 3));
        `CHECK(xy_port(out_link[o].flit) == o, "X-Y output port")
        idx = -1;
        foreach (sent[i]) if (idx < 0 && sent[i] == out_link[o].flit) idx = i;
        `CHECK(idx >= 0, "flit was sent and not yet delivered")
        if (idx >= 0) sent.delete(idx);
        n_recv++;
      end
      for (int v = 0; v < V; v++) if (credit_out[o][v]) up_cred[o][v]++;
    end
    begin
      int busy;
      busy = 0;
      for (int p = 0; p < NPORT; p++) busy += dut.req2[P_LOCAL][p] ? 1 : 0;
      if (busy > 1) contention++;
    end
    `CHECK(trig == '0, $sformatf("no trigger in a healthy router (%b)", trig))
  endtask

  initial begin
    bit did;
    flit_t f;
    for (int p = 0; p < NPORT; p++) begin
      in_link[p] = '0; credit_in[p] = '0; last_vc[p] = -1;
      for (int v = 0; v < V; v++) begin up_cred[p][v] = B; occ[p][v] = 0; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // latency: one flit into the idle router, from WEST to EAST
    f = '0; f.dst_x = 3'd3; f.dst_y = 3'd1; f.payload = 32'hCAFE_0001;
    step(1, P_WEST, f, did);
    `CHECK(did, "flit injected")
    step(0, -1, f, did);
    `CHECK(n_recv == 1, "forwarded in the cycle after it was written")
    // random traffic
    for (int it = 0; it < 4000; it++) step(1, -1, f, did);
    for (int it = 0; it < 200; it++) step(0, -1, f, did);
    `CHECK(sent.size() == 0, "every flit delivered")
    `CHECK(n_recv == n_sent, "no duplicates")
    `CHECK(contention > 0, "output contention exercised")
    $display("sent %0d received %0d contention cycles %0d", n_sent, n_recv, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
