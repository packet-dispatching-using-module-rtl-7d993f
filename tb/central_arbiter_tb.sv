// Self-checking testbench of central_arbiter.
//
// Over many time slots random requests are presented to an 8-IM arbiter. A
// reference model (arb_ref_pkg) keeps its own pair of round-robin pointers,
// orders the requests, runs the masking procedure and predicts each IM's
// grant; the grants and the pointers are compared every slot. Counts high
// and low priority grants, rejected requests, and pointer moves of both
// classes; each must occur. Checks that the top request of the high class is
// always granted.
module central_arbiter_tb;
  import arb_ref_pkg::*;

  localparam int N = 8;

  logic       clk = 0, rst_n = 0;
  logic [N:0] req [N];
  logic       grant_valid [N];
  logic [2:0] grant_om [N];
  logic [2:0] hp_ptr, lp_ptr;
  int checks = 0, failures = 0;
  int n_hi_grant = 0, n_lo_grant = 0, n_reject = 0, n_hp_move = 0, n_lp_move = 0;

  central_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] r [];
    int list [$];
    int gom [];
    int m_hp = 0, m_lp = 0, nh;
    r = new[N];
    foreach (req[i]) req[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) begin
        req[i] = '0;
        if ($urandom_range(2) != 0) begin
          req[i][N:1] = (t % 2) ? (N)'($urandom) : (N)'($urandom & $urandom);
          req[i][0]   = ($urandom_range(2) == 0);
        end
        r[i] = 128'(req[i]);
      end
      order(N, r, m_hp, m_lp, list);
      match(N, r, list, gom);
      #1;
      check(int'(hp_ptr) == m_hp && int'(lp_ptr) == m_lp, "pointers");
      for (int i = 0; i < N; i++) begin
        check(grant_valid[i] == (gom[i] >= 0), "grant valid");
        if (gom[i] >= 0) begin
          check(int'(grant_om[i]) == gom[i], "granted OM");
          if (req[i][0]) n_hi_grant++; else n_lo_grant++;
        end else if (req[i][N:1] != 0) n_reject++;
      end
      if (list.size() > 0 && r[list[0]][0]) check(grant_valid[list[0]], "top high request granted");
      // reference pointer update
      nh = 0;
      foreach (list[k]) if (r[list[k]][0]) nh++;
      if (nh > 0)           begin m_hp = (list[0] + 1) % N;  n_hp_move++; end
      if (list.size() > nh) begin m_lp = (list[nh] + 1) % N; n_lp_move++; end
      @(negedge clk);
    end
    check(n_hi_grant > 0 && n_lo_grant > 0, "both priorities granted");
    check(n_reject > 0, "contention exercised");
    check(n_hp_move > 0 && n_lp_move > 0, "pointers moved");
    $display("high grants=%0d low grants=%0d rejected=%0d", n_hi_grant, n_lo_grant, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
