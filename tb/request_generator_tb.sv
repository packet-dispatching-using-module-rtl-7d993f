// Self-checking testbench of request_generator.
//
// Uses n = 8, k = 2 (thresholds 8 and 16). Hand-made occupancies check the
// request format (bit 0 priority, bit j = OM(j)), including the example of a
// low-priority request for OM(2) and OM(4); random occupancies are compared
// with a reference that evaluates the thresholds. A second instance uses
// redefined thresholds (high above n cells, low from 2 cells). High, low and empty
// requests must all occur.
module request_generator_tb;

  localparam int N = 8, K = 2, CW = 6;

  logic [CW-1:0] vomq_count [N];
  logic [N:0]    req;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0, n_none = 0;

  request_generator #(.N(N), .K(K), .CW(CW)) dut (.*);

  // redefined thresholds: high above n cells, low from 2 cells
  logic [N:0] req_r;
  request_generator #(.N(N), .K(K), .CW(CW), .LOW_THR(2), .HIGH_THR(N + 1)) dut_r (
    .vomq_count (vomq_count),
    .req        (req_r)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s req=%b", what, req);
    end
  endtask

  task automatic ref_check();
    logic [N:0] exp;
    logic any_hi;
    any_hi = 0;
    for (int j = 0; j < N; j++) if (vomq_count[j] >= 2 * N) any_hi = 1;
    exp = '0;
    exp[0] = any_hi;
    for (int j = 0; j < N; j++)
      if (any_hi) exp[j+1] = vomq_count[j] >= 16;
      else        exp[j+1] = vomq_count[j] >= 8;
    #1;
    check(req == exp, "random occupancy");
    if (req[0]) n_hi++;
    else if (req != 0) n_lo++;
    else n_none++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (vomq_count[j]) vomq_count[j] = 0;
    vomq_count[1] = 9;
    vomq_count[3] = 12;
    vomq_count[5] = 7;
    #1 check(req == 9'b000010100, "example low priority request");
    vomq_count[5] = 8;
    #1 check(req == 9'b001010100, "threshold n is inclusive");
    vomq_count[6] = 16;
    #1 check(req == 9'b010000001, "high priority names only long VOMQs");
    foreach (vomq_count[j]) vomq_count[j] = 7;
    #1 check(req == 0, "no request below n");
    check(req_r == 9'b111111110, "redefined: low priority from 2 cells");
    vomq_count[2] = 9;
    vomq_count[4] = 1;
    #1 check(req_r == 9'b000001001, "redefined: high priority above n");
    vomq_count[2] = 7;
    #1 check(req_r == 9'b111011110, "redefined: one cell is not enough");
    for (int t = 0; t < 3000; t++) begin
      foreach (vomq_count[j]) vomq_count[j] = CW'($urandom_range(t % 2 ? 17 : 12));
      ref_check();
    end
    check(n_hi > 0 && n_lo > 0 && n_none > 0, "all request kinds seen");
    $display("high=%0d low=%0d none=%0d", n_hi, n_lo, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
