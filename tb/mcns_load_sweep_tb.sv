// Load sweep of the default 64 x 64 MCNS (n = 8, k = 2, all 7 CMs on).
//
// For each traffic pattern (Bernoulli uniform, Chang's, diagonal, hot-spot,
// and bursty uniform) and each input load p in {0.2, 0.4, 0.6, 0.8, 0.95}
// the switch is fed for MEAS slots and then drained. Reported per point:
//   d3   average delay behind the third stage: slots from being offered at an
//        input until leaving an output port (minimum 2);
//   d1   average delay behind the first stage: slots from being offered until
//        leaving the IM over a direct link or a CM (minimum 1);
//   vq   average VOMQ occupancy and oq average output-queue occupancy, in
//        cells per queue, sampled every slot.
// Checks on every point: each cell leaves at its destination, in flow order,
// and cells in = cells out + dropped; with Bernoulli arrivals nothing may be
// dropped. Against the expected behaviour of the scheme: with Bernoulli
// arrivals d3 stays below 10 slots for p < 0.95 and d1 stays below 3 slots
// (at most two slots of waiting in a VOMQ); with bursty arrivals d3 stays
// below 100 slots.
module mcns_load_sweep_tb;
  import mcns_pkg::*;

  localparam int N    = 8;
  localparam int NP   = N * N;
  localparam int MEAS = 700;
  localparam int NPAT = 5;
  localparam int NLD  = 5;
  localparam int LOADS [NLD] = '{20, 40, 60, 80, 95};

  logic         clk = 0, rst_n = 0;
  cell_t        in_cell  [N][N];
  cell_t        out_cell [N][N];
  logic [N-2:0] cm_en;
  logic [N:0]   req         [N];
  logic         grant_valid [N];
  logic [2:0]   grant_om    [N];
  logic [2:0]   hp_ptr, lp_ptr;
  logic [31:0]  vomq_cells, oq_cells, vomq_drops, oq_drops;

  mcns_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int slot = 0;
  int n_in = 0, n_out = 0;
  int last_seq [NP][NP];
  int inj3 [int];
  int inj1 [int];
  logic [15:0] src_seq [NP];
  int burst_left [NP];
  int burst_dst  [NP];
  longint d3_sum, d1_sum, vq_sum, oq_sum;
  int d3_n, d1_n, occ_n;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at slot %0d", what, slot);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int other_dst(input int s);
    int d;
    d = $urandom_range(NP - 2);
    if (d >= s) d++;
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

  // pat: 0 uniform, 1 chang, 2 diagonal, 3 hotspot, 4 bursty, -1 idle
  task automatic run_slot(input int pat, input int pct, input bit meas);
    // cells leaving the IMs this slot (first stage)
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++)
        if (dut.direct[i][j].valid) begin
          int key;
          key = int'(dut.direct[i][j].src) * 65536 + int'(dut.direct[i][j].seq);
          if (inj1.exists(key)) begin d1_sum += slot - inj1[key]; d1_n++; inj1.delete(key); end
        end
      for (int c = 0; c < N - 1; c++)
        if (dut.im_cm[i][c].valid) begin
          int key;
          key = int'(dut.im_cm[i][c].src) * 65536 + int'(dut.im_cm[i][c].seq);
          if (inj1.exists(key)) begin d1_sum += slot - inj1[key]; d1_n++; inj1.delete(key); end
        end
    end
    // cells leaving the switch this slot
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
          check(inj3.exists(key), "known cell");
          if (inj3.exists(key)) begin d3_sum += slot - inj3[key]; d3_n++; inj3.delete(key); end
          n_out++;
        end
    if (meas) begin
      vq_sum += vomq_cells;
      oq_sum += oq_cells;
      occ_n++;
    end
    // arrivals
    for (int s = 0; s < NP; s++) begin
      cell_t c;
      c = '0;
      case (pat)
        -1: ;
        4: begin
          if (burst_left[s] > 0) begin
            c = make_cell(s, burst_dst[s]);
            burst_left[s]--;
          end else if ($urandom_range(9999) < pct * 100 / 16) begin
            burst_dst[s]  = $urandom_range(NP - 1);
            burst_left[s] = $urandom_range(30);
            c = make_cell(s, burst_dst[s]);
          end
        end
        default:
          if ($urandom_range(9999) < pct * 100) begin
            int d;
            case (pat)
              1: d = other_dst(s);
              2: d = ($urandom_range(2) < 2) ? s : (s + 1) % NP;
              3: d = ($urandom_range(1) == 0) ? s : other_dst(s);
              default: d = $urandom_range(NP - 1);
            endcase
            c = make_cell(s, d);
          end
      endcase
      if (c.valid) begin
        inj3[s * 65536 + int'(c.seq)] = slot;
        inj1[s * 65536 + int'(c.seq)] = slot;
        n_in++;
      end
      in_cell[s / N][s % N] = c;
    end
    @(negedge clk);
    slot++;
  endtask

  initial begin
    string names [NPAT] = '{"uniform", "chang", "diagonal", "hotspot", "bursty"};
    foreach (in_cell[i, p]) in_cell[i][p] = '0;
    foreach (last_seq[s, d]) last_seq[s][d] = -1;
    foreach (src_seq[s]) src_seq[s] = '0;
    foreach (burst_left[s]) burst_left[s] = 0;
    cm_en = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    $display("pattern    p     d3      d1      vq      oq    drops");
    for (int pat = 0; pat < NPAT; pat++)
      for (int l = 0; l < NLD; l++) begin
        int drops0;
        real d3, d1;
        drops0 = int'(vomq_drops + oq_drops);
        d3_sum = 0; d1_sum = 0; vq_sum = 0; oq_sum = 0;
        d3_n = 0; d1_n = 0; occ_n = 0;
        repeat (MEAS) run_slot(pat, LOADS[l], 1'b1);
        while (vomq_cells != 0 || oq_cells != 0) run_slot(-1, 0, 1'b0);
        run_slot(-1, 0, 1'b0);
        d3 = real'(d3_sum) / d3_n;
        d1 = real'(d1_sum) / d1_n;
        $display("%-9s %4.2f %7.2f %7.2f %7.2f %7.2f %5d", names[pat], LOADS[l] / 100.0, d3, d1,
                 real'(vq_sum) / occ_n / NP, real'(oq_sum) / occ_n / NP,
                 int'(vomq_drops + oq_drops) - drops0);
        check(n_in == n_out + int'(vomq_drops + oq_drops), "cells conserved");
        check(inj3.size() == int'(vomq_drops + oq_drops), "only dropped cells missing");
        if (pat < 4) begin
          check(int'(vomq_drops + oq_drops) == drops0, "no drops with Bernoulli arrivals");
          if (LOADS[l] < 95) check(d3 < 10.0, "third-stage delay below 10");
          check(d1 < 3.0, "first-stage delay below 3");
        end else
          check(d3 < 100.0, "bursty delay below 100");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
