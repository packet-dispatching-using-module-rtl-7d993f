// The smallest MCNS, C_M(2, 1, 2): a 4 x 4 switch with two IMs, one CM and
// two OMs (n = 2, k = 2; request thresholds 2 and 4 cells).
//
// Random Bernoulli traffic with a per-phase bias toward one output module
// drives the switch for several thousand slots; a final overload sends
// everything to OM 1 so that both IMs contend for it; then the switch is
// drained. Every
// slot the arbiter's decision is compared with the reference matching of
// arb_ref_pkg; every departing cell must leave at its destination and in
// flow order; at the end cells in = cells out + dropped. CM transfers, high
// and low priority requests and rejected requests must all occur.
module mcns_4x4_tb;
  import mcns_pkg::*;
  import arb_ref_pkg::*;

  localparam int N  = 2;
  localparam int NP = N * N;

  logic        clk = 0, rst_n = 0;
  cell_t       in_cell  [N][N];
  cell_t       out_cell [N][N];
  logic [0:0]  cm_en;
  logic [N:0]  req         [N];
  logic        grant_valid [N];
  logic [0:0]  grant_om    [N];
  logic [0:0]  hp_ptr, lp_ptr;
  logic [31:0] vomq_cells, oq_cells, vomq_drops, oq_drops;

  mcns_switch #(.N(N), .VOMQ_DEPTH(16), .OQ_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, slot = 0, n_in = 0, n_out = 0;
  int n_cm = 0, n_hi = 0, n_lo = 0, n_reject = 0;
  int m_hp = 0, m_lp = 0;
  int last_seq [NP][NP];
  logic [15:0] src_seq [NP];
  bit pending [int];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at slot %0d", what, slot);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_slot(input int pct, input int hot, input int bias = 1);
    logic [127:0] r [];
    int list [$];
    int gom [];
    int nh;
    r = new[N];
    for (int j = 0; j < N; j++)
      for (int p = 0; p < N; p++)
        if (out_cell[j][p].valid) begin
          int s, d, key;
          s = int'(out_cell[j][p].src);
          d = j * N + p;
          key = s * 65536 + int'(out_cell[j][p].seq);
          check(int'(out_cell[j][p].om) == j && int'(out_cell[j][p].port) == p, "destination");
          check(int'(out_cell[j][p].seq) > last_seq[s][d], "flow order");
          last_seq[s][d] = int'(out_cell[j][p].seq);
          check(pending.exists(key), "known cell");
          pending.delete(key);
          n_out++;
        end
    for (int s = 0; s < NP; s++) begin
      cell_t c;
      int d;
      c = '0;
      if ($urandom_range(99) < pct) begin
        d = ($urandom_range(bias) != 0) ? hot * N + $urandom_range(N - 1) : $urandom_range(NP - 1);
        c.valid = 1;
        c.om    = 8'(d / N);
        c.port  = 8'(d % N);
        c.src   = 16'(s);
        c.seq   = src_seq[s];
        src_seq[s]++;
        pending[s * 65536 + int'(c.seq)] = 1;
        n_in++;
      end
      in_cell[s / N][s % N] = c;
    end
    #1;
    for (int i = 0; i < N; i++) r[i] = 128'(req[i]);
    order(N, r, m_hp, m_lp, list);
    match(N, r, list, gom);
    check(int'(hp_ptr) == m_hp && int'(lp_ptr) == m_lp, "pointers");
    for (int i = 0; i < N; i++) begin
      check(grant_valid[i] == (gom[i] >= 0), "grant");
      if (gom[i] >= 0) check(int'(grant_om[i]) == gom[i], "granted OM");
      if (req[i][N:1] != 0) begin
        if (req[i][0]) n_hi++; else n_lo++;
        if (!grant_valid[i]) n_reject++;
      end
      if (dut.im_cm[i][0].valid) n_cm++;
    end
    nh = 0;
    foreach (list[k]) if (r[list[k]][0]) nh++;
    if (nh > 0)           m_hp = (list[0] + 1) % N;
    if (list.size() > nh) m_lp = (list[nh] + 1) % N;
    @(negedge clk);
    slot++;
  endtask

  initial begin
    foreach (in_cell[i, p]) in_cell[i][p] = '0;
    foreach (last_seq[s, d]) last_seq[s][d] = -1;
    foreach (src_seq[s]) src_seq[s] = '0;
    cm_en = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 8; ph++)
      repeat (500) run_slot(30 + 6 * ph, ph % N);
    // both IMs send only to OM 1: they contend and queues pass kn cells
    repeat (300) run_slot(100, 0, 1000);
    repeat (200) run_slot(0, 0);
    check(vomq_cells == 0 && oq_cells == 0, "drained");
    check(n_in == n_out + int'(vomq_drops + oq_drops), "cells conserved");
    check(n_cm > 0 && n_hi > 0 && n_lo > 0 && n_reject > 0, "CM use, both priorities, rejections");
    $display("in=%0d out=%0d drops=%0d via CM=%0d high=%0d low=%0d rejected=%0d",
             n_in, n_out, vomq_drops + oq_drops, n_cm, n_hi, n_lo, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
