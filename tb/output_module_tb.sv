// Self-checking testbench of output_module.
//
// An OM with n = 4 (7 inputs per slot) and 8-cell output queues receives
// random bursts on its direct and CM inputs, sometimes more than its ports
// can drain, so queues fill and drop. A reference model keeps one queue per
// output port, fed in input order (direct links first, then CMs), and
// predicts each slot's output cells and the running drop count.
module output_module_tb;
  import mcns_pkg::*;

  localparam int N = 4, D = 8;

  logic       clk = 0, rst_n = 0;
  cell_t      direct_cell [N];
  cell_t      cm_cell     [N-1];
  cell_t      out_cell    [N];
  logic [3:0] oq_count    [N];
  logic [31:0] drop_count;
  int checks = 0, failures = 0, n_multi = 0, n_sent = 0;
  int m_drop = 0;
  cell_t model [N][$];
  logic [15:0] seq = 0;

  output_module #(.N(N), .OQ_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic cell_t rnd_cell(input int pct);
    cell_t c;
    c = '0;
    if ($urandom_range(99) < pct) begin
      c.valid = 1;
      c.port  = 8'($urandom_range(N - 1));
      c.src   = 16'($urandom);
      c.seq   = seq;
      seq++;
    end
    return c;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (direct_cell[i]) direct_cell[i] = '0;
    foreach (cm_cell[i]) cm_cell[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int pct, cnt [N];
      cell_t arr [$];
      arr.delete();
      pct = ((t / 300) % 2) ? 70 : 30;
      foreach (direct_cell[i]) direct_cell[i] = rnd_cell(pct);
      foreach (cm_cell[i])     cm_cell[i]     = rnd_cell(pct / 2);
      #1;
      // outputs show the queue heads
      for (int p = 0; p < N; p++) begin
        check(oq_count[p] == 4'(model[p].size()), "queue occupancy");
        if (oq_count[p] != 4'(model[p].size())) $display("p%0d dut %0d model %0d", p, oq_count[p], model[p].size());
        if (model[p].size() > 0) begin
          check(out_cell[p] == model[p][0], "output cell");
          n_sent++;
        end else
          check(!out_cell[p].valid, "idle output");
      end
      check(drop_count == 32'(m_drop), "drop count");
      foreach (cnt[p]) cnt[p] = 0;
      foreach (direct_cell[i]) arr.push_back(direct_cell[i]);
      foreach (cm_cell[i]) arr.push_back(cm_cell[i]);
      for (int p = 0; p < N; p++) if (model[p].size() > 0) void'(model[p].pop_front());
      foreach (arr[k])
        if (arr[k].valid) begin
          int p;
          p = int'(arr[k].port);
          cnt[p]++;
          if (model[p].size() < D) model[p].push_back(arr[k]);
          else m_drop++;
        end
      foreach (cnt[p]) if (cnt[p] > 1) n_multi++;
      @(negedge clk);
    end
    check(n_multi > 0, "several cells to one port in a slot");
    check(m_drop > 0, "output queue overflow exercised");
    $display("sent=%0d drops=%0d", n_sent, m_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
