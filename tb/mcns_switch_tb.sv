// End-to-end testbench of the MCNS at its default size (n = 8, k = 2: a
// 64 x 64 switch with 8 IMs, 7 CMs and 8 OMs).
//
// Traffic phases, each followed by the next without draining:
//   latency    one cell into an empty switch must leave two slots later
//   uniform    Bernoulli arrivals, p = 0.5, destinations uniform
//   chang      p = 0.8, any output except the one equal to the input
//   diagonal   p = 0.8, 2/3 to output i, 1/3 to output i+1
//   hotspot    p = 0.9, half to output i, the rest uniform over the others
//   one_cm     uniform p = 0.8 with only CM 1 switched on, then two CMs
//   bursty     on/off bursts (mean 16 cells) to one destination, p = 0.6
//   overload   all inputs of IMs 1 and 2 to one output port: the IMs contend
//              for OM 0, VOMQs pass the high-priority threshold, VOMQs and
//              the output queue overflow
// then the switch is drained.
// Every slot the arbiter's decision (taken from the top's req/grant ports) is
// compared with the reference matching of arb_ref_pkg, run with its own copy
// of the round-robin pointers. Every departing cell must leave at the port
// it was addressed to and in order within its (input, output) flow; after
// the drain, cells in = cells out + cells dropped. The testbench counts the
// mechanisms of the dispatching scheme (direct-link transfers, CM transfers,
// high and low priority requests, rejected requests, pointer moves, CMs
// switched off, queue overflow) and fails if one never happened. Average cell
// delay per phase is printed; for the Bernoulli phases up to p = 0.9 it must
// stay below 10 slots.
module mcns_switch_tb;
  import mcns_pkg::*;
  import arb_ref_pkg::*;

  localparam int N  = 8;
  localparam int NP = N * N;

  logic        clk = 0, rst_n = 0;
  cell_t       in_cell  [N][N];
  cell_t       out_cell [N][N];
  logic [N-2:0] cm_en;
  logic [N:0]  req         [N];
  logic        grant_valid [N];
  logic [2:0]  grant_om    [N];
  logic [2:0]  hp_ptr, lp_ptr;
  logic [31:0] vomq_cells, oq_cells, vomq_drops, oq_drops;

  mcns_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int slot = 0;
  int n_in = 0, n_out = 0;
  int last_seq [NP][NP];
  int inj_slot [int];
  logic [15:0] src_seq [NP];
  // bursty source state
  int burst_left [NP];
  int burst_dst  [NP];
  // mechanism counters
  int n_direct = 0, n_cm = 0, n_hi = 0, n_lo = 0, n_reject = 0;
  int n_hp_move = 0, n_lp_move = 0, n_cm_off_slots = 0;
  // reference arbiter state
  int m_hp = 0, m_lp = 0;
  // delay statistics of the current phase
  longint delay_sum = 0;
  int delay_n = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at slot %0d", what, slot);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // traffic patterns: 0 uniform, 1 chang, 2 diagonal, 3 hotspot, 4 bursty, 5 overload
  function automatic int pick_dst(input int pat, input int s);
    int d;
    case (pat)
      1: begin
        d = $urandom_range(NP - 2);
        if (d >= s) d++;
      end
      2: d = ($urandom_range(2) < 2) ? s : (s + 1) % NP;
      3: begin
        if ($urandom_range(1) == 0) d = s;
        else begin
          d = $urandom_range(NP - 2);
          if (d >= s) d++;
        end
      end
      default: d = $urandom_range(NP - 1);
    endcase
    return d;
  endfunction

  function automatic cell_t make_cell(input int s, input int d);
    cell_t c;
    c.valid = 1'b1;
    c.om    = 8'(d / N);
    c.port  = 8'(d % N);
    c.src   = 16'(s);
    c.seq   = src_seq[s];
    src_seq[s]++;
    return c;
  endfunction

  // one time slot: collect departures, offer arrivals, check the arbiter
  task automatic run_slot(input int pat, input int pct);
    logic [127:0] r [];
    int list [$];
    int gom [];
    int nh;
    r = new[N];
    // departures of this slot
    for (int j = 0; j < N; j++)
      for (int p = 0; p < N; p++)
        if (out_cell[j][p].valid) begin
          int s, d, key;
          cell_t c;
          c = out_cell[j][p];
          s = int'(c.src);
          d = j * N + p;
          key = s * 65536 + int'(c.seq);
          check(int'(c.om) == j && int'(c.port) == p, "cell left at its destination");
          check(int'(c.seq) > last_seq[s][d], "flow order");
          last_seq[s][d] = int'(c.seq);
          if (inj_slot.exists(key)) begin
            delay_sum += slot - inj_slot[key];
            delay_n++;
            inj_slot.delete(key);
          end else
            check(0, "unknown or duplicated cell");
          n_out++;
        end
    // arrivals of this slot
    for (int s = 0; s < NP; s++) begin
      cell_t c;
      int d;
      c = '0;
      if (pat == 4) begin
        if (burst_left[s] > 0) begin
          c = make_cell(s, burst_dst[s]);
          burst_left[s]--;
        end else if ($urandom_range(999) < pct * 10 / 16) begin
          burst_dst[s]  = $urandom_range(NP - 1);
          burst_left[s] = $urandom_range(30);
          c = make_cell(s, burst_dst[s]);
        end
      end else if (pat == 5) begin
        if (s / N == 1 || s / N == 2) c = make_cell(s, 3);
      end else if (pat >= 0 && $urandom_range(99) < pct) begin
        d = pick_dst(pat, s);
        c = make_cell(s, d);
      end
      if (c.valid) begin
        inj_slot[s * 65536 + int'(c.seq)] = slot;
        n_in++;
      end
      in_cell[s / N][s % N] = c;
    end
    #1;
    // arbiter against the reference
    for (int i = 0; i < N; i++) r[i] = 128'(req[i]);
    order(N, r, m_hp, m_lp, list);
    match(N, r, list, gom);
    check(int'(hp_ptr) == m_hp && int'(lp_ptr) == m_lp, "round-robin pointers");
    for (int i = 0; i < N; i++) begin
      check(grant_valid[i] == (gom[i] >= 0), "grant");
      if (gom[i] >= 0) check(int'(grant_om[i]) == gom[i], "granted OM");
      if (req[i][N:1] != 0) begin
        if (req[i][0]) n_hi++; else n_lo++;
        if (!grant_valid[i]) n_reject++;
      end
    end
    nh = 0;
    foreach (list[k]) if (r[list[k]][0]) nh++;
    if (nh > 0)           begin if (m_hp != (list[0] + 1) % N) n_hp_move++;  m_hp = (list[0] + 1) % N; end
    if (list.size() > nh) begin if (m_lp != (list[nh] + 1) % N) n_lp_move++; m_lp = (list[nh] + 1) % N; end
    // transfers, read from the links inside the switch
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) if (dut.direct[i][j].valid) n_direct++;
      for (int c = 0; c < N - 1; c++) if (dut.im_cm[i][c].valid) n_cm++;
    end
    if (cm_en != '1) n_cm_off_slots++;
    @(negedge clk);
    slot++;
  endtask

  task automatic phase(input string name, input int pat, input int pct, input int slots,
                       input bit check_delay);
    delay_sum = 0;
    delay_n   = 0;
    repeat (slots) run_slot(pat, pct);
    if (delay_n > 0)
      $display("%-9s p=%0.2f  cells delivered=%0d  average delay=%0.2f slots  VOMQ cells=%0d OQ cells=%0d",
               name, pct / 100.0, delay_n, real'(delay_sum) / delay_n, vomq_cells, oq_cells);
    if (check_delay) check(delay_n > 0 && real'(delay_sum) / delay_n < 10.0, {"average delay below 10: ", name});
  endtask

  initial begin
    foreach (in_cell[i, p]) in_cell[i][p] = '0;
    foreach (last_seq[s, d]) last_seq[s][d] = -1;
    foreach (src_seq[s]) src_seq[s] = '0;
    foreach (burst_left[s]) burst_left[s] = 0;
    cm_en = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // minimum latency: input 5 of IM 2 to output 3 of OM 6
    in_cell[2][5] = make_cell(21, 51);
    inj_slot[21 * 65536] = slot;
    n_in++;
    @(negedge clk);
    in_cell[2][5] = '0;
    slot++;
    check(!out_cell[6][3].valid, "not out after one slot");
    @(negedge clk);
    slot++;
    check(out_cell[6][3].valid && out_cell[6][3].src == 16'(21), "out after two slots");
    run_slot(-1, 0);

    phase("uniform",  0, 50, 1500, 1);
    phase("chang",    1, 80, 1500, 1);
    phase("diagonal", 2, 80, 1500, 1);
    phase("hotspot",  3, 90, 1500, 1);
    cm_en = 7'b0000001;
    phase("one_cm",   0, 80, 1000, 0);
    cm_en = 7'b0000011;
    phase("two_cm",   0, 80, 1000, 0);
    cm_en = '1;
    phase("bursty",   4, 60, 1500, 0);
    phase("overload", 5, 100, 200, 0);
    phase("drain",   -1, 0, 800, 0);

    check(vomq_cells == 0 && oq_cells == 0, "switch drained");
    check(n_in == n_out + int'(vomq_drops) + int'(oq_drops), "cells conserved");
    check(inj_slot.size() == int'(vomq_drops + oq_drops), "every missing cell was dropped");
    check(n_direct > 0,  "direct-link transfers");
    check(n_cm > 0,      "CM transfers");
    check(n_hi > 0,      "high priority requests");
    check(n_lo > 0,      "low priority requests");
    check(n_reject > 0,  "rejected requests");
    check(n_hp_move > 0 && n_lp_move > 0, "round-robin pointer moves");
    check(n_cm_off_slots > 0, "CMs switched off");
    check(oq_drops > 0,  "output queue overflow");
    check(vomq_drops > 0, "VOMQ overflow");
    $display("cells in=%0d out=%0d VOMQ drops=%0d OQ drops=%0d", n_in, n_out, vomq_drops, oq_drops);
    $display("direct=%0d via CMs=%0d high req=%0d low req=%0d rejected=%0d hp moves=%0d lp moves=%0d CM-off slots=%0d",
             n_direct, n_cm, n_hi, n_lo, n_reject, n_hp_move, n_lp_move, n_cm_off_slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
