// Self-checking testbench of cell_queue.
//
// Drives random multi-cell writes and multi-cell pops into a small queue
// (DEPTH 8, 4 writers, 3 readers) so that it runs full and drops cells, and
// compares count, head cells and drop counts every slot with a reference
// model kept as a SystemVerilog queue. Also checks that a full queue that
// pops frees room for arrivals of the same slot.
module cell_queue_tb;
  import mcns_pkg::*;

  localparam int DEPTH = 8, WR = 4, RD = 3;

  logic clk = 0, rst_n = 0;
  cell_t wr_cell [WR];
  logic [1:0] rd_num;
  cell_t head [RD];
  logic [3:0] count;
  logic [2:0] dropped;

  int checks = 0, failures = 0;
  int n_drop_seen = 0, n_full = 0;
  cell_t model [$];
  logic [15:0] seq = 0;

  cell_queue #(.DEPTH(DEPTH), .WR(WR), .RD(RD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (wr_cell[w]) wr_cell[w] = '0;
    rd_num = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int pop, exp_drop, space, nw;
      // stimulus, biased so that the queue often runs full
      for (int w = 0; w < WR; w++) begin
        wr_cell[w] = '0;
        if ($urandom_range(99) < ((t / 200) % 2 ? 30 : 70)) begin
          wr_cell[w].valid = 1;
          wr_cell[w].seq   = seq;
          wr_cell[w].src   = 16'(w);
          wr_cell[w].om    = 8'($urandom);
          seq++;
        end
      end
      rd_num = 2'($urandom_range(RD));
      #1;
      // compare visible state with the model
      check(count == 4'(model.size()), "count");
      if (count != 4'(model.size())) $display("count %0d model %0d", count, model.size());
      if (model.size() == DEPTH) n_full++;
      for (int r = 0; r < RD; r++) begin
        if (r < model.size()) check(head[r] == model[r], "head cell");
        else                  check(!head[r].valid, "head valid");
      end
      pop = (rd_num > model.size()) ? model.size() : rd_num;
      space = DEPTH - model.size() + pop;
      exp_drop = 0;
      nw = 0;
      for (int k = 0; k < pop; k++) void'(model.pop_front());
      for (int w = 0; w < WR; w++)
        if (wr_cell[w].valid) begin
          if (nw < space) begin model.push_back(wr_cell[w]); nw++; end
          else exp_drop++;
        end
      check(dropped == 3'(exp_drop), "dropped");
      if (exp_drop > 0) n_drop_seen++;
      @(negedge clk);
    end
    check(n_drop_seen > 0, "overflow exercised");
    check(n_full > 0, "full queue exercised");
    $display("slots full=%0d slots with drops=%0d", n_full, n_drop_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
