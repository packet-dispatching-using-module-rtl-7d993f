// Self-checking testbench of input_module.
//
// An IM with n = 4, k = 2 (request thresholds 4 and 8) and 16-cell VOMQs
// receives random arrivals biased toward one OM at a time, so VOMQs grow past
// both thresholds and sometimes overflow. The testbench plays the arbiter:
// when the IM requests, it usually grants one of the requested OMs, and it
// switches CMs on and off at random. A reference model keeps one queue per
// OM and predicts the request, the cell on every direct link, the cells sent
// through each enabled CM, the VOMQ occupancies and the drop count.
module input_module_tb;
  import mcns_pkg::*;

  localparam int N = 4, K = 2, D = 16;

  logic        clk = 0, rst_n = 0;
  cell_t       in_cell     [N];
  logic [N:0]  req;
  logic        grant_valid;
  logic [1:0]  grant_om;
  logic [N-2:0] cm_en;
  cell_t       direct_cell [N];
  cell_t       cm_cell     [N-1];
  logic [4:0]  vomq_count  [N];
  logic [31:0] drop_count;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_grant = 0, n_cm_cells = 0, n_partial_cm = 0, m_drop = 0;
  cell_t model [N][$];
  logic [15:0] seq = 0;

  input_module #(.N(N), .K(K), .VOMQ_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (in_cell[p]) in_cell[p] = '0;
    grant_valid = 0;
    grant_om    = 0;
    cm_en       = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      logic [N:0] exp_req;
      logic [N-1:0] hi, lo;
      int hot, k, g, pop;
      // arrivals
      hot = (t / 150) % N;
      for (int p = 0; p < N; p++) begin
        in_cell[p] = '0;
        if ($urandom_range(99) < 85) begin
          in_cell[p].valid = 1;
          in_cell[p].om    = 8'(($urandom_range(99) < 60) ? hot : $urandom_range(N - 1));
          in_cell[p].port  = 8'($urandom_range(N - 1));
          in_cell[p].src   = 16'(p);
          in_cell[p].seq   = seq;
          seq++;
        end
      end
      cm_en = ($urandom_range(3) == 0) ? (N-1)'($urandom) : '1;
      // expected request
      for (int j = 0; j < N; j++) begin
        hi[j] = model[j].size() >= K * N;
        lo[j] = model[j].size() >= N && !hi[j];
      end
      exp_req = (hi != 0) ? {hi, 1'b1} : {lo, 1'b0};
      #1;
      check(req == exp_req, "request");
      if (req[0]) n_hi++; else if (req != 0) n_lo++;
      // act as the arbiter
      grant_valid = 0;
      grant_om    = 0;
      if (req[N:1] != 0 && $urandom_range(9) < 8) begin
        do g = $urandom_range(N - 1); while (!req[g+1]);
        grant_valid = 1;
        grant_om    = 2'(g);
        n_grant++;
      end
      #1;
      for (int j = 0; j < N; j++) begin
        check(vomq_count[j] == 5'(model[j].size()), "VOMQ occupancy");
        if (model[j].size() > 0) check(direct_cell[j] == model[j][0], "direct link cell");
        else                     check(!direct_cell[j].valid, "idle direct link");
      end
      k = 1;
      for (int c = 0; c < N - 1; c++) begin
        if (grant_valid && cm_en[c]) begin
          check(cm_cell[c] == model[grant_om][k], "cell through CM");
          check(cm_cell[c].valid, "CM cell present");
          k++;
          n_cm_cells++;
        end else
          check(!cm_cell[c].valid, "idle CM link");
      end
      if (grant_valid && cm_en != '1) n_partial_cm++;
      check(drop_count == 32'(m_drop), "drop count");
      // model update: departures, then arrivals in port order
      for (int j = 0; j < N; j++) begin
        pop = (model[j].size() > 0) ? 1 : 0;
        if (grant_valid && int'(grant_om) == j) pop = pop + k - 1;
        repeat (pop) void'(model[j].pop_front());
      end
      for (int p = 0; p < N; p++)
        if (in_cell[p].valid) begin
          if (model[in_cell[p].om].size() < D) model[in_cell[p].om].push_back(in_cell[p]);
          else m_drop++;
        end
      @(negedge clk);
    end
    check(n_hi > 0 && n_lo > 0, "both request priorities");
    check(n_cm_cells > 0 && n_partial_cm > 0, "CM transfers with all and some CMs on");
    check(m_drop > 0, "VOMQ overflow exercised");
    $display("high=%0d low=%0d grants=%0d cm cells=%0d drops=%0d", n_hi, n_lo, n_grant, n_cm_cells, m_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
