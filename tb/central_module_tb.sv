// Self-checking testbench of central_module.
//
// Random partial permutations (the connection pattern broadcast by the
// arbiter) and random cells are applied to an 8 x 8 CM, switched on and off.
// Every output is compared with the cell a reference predicts: the cell of
// the input whose pattern entry names that output, or none.
module central_module_tb;
  import mcns_pkg::*;

  localparam int N = 8;

  logic       en;
  cell_t      in_cell   [N];
  logic       pat_valid [N];
  logic [2:0] pat_om    [N];
  cell_t      out_cell  [N];
  int checks = 0, failures = 0, n_off = 0, n_moved = 0;

  central_module #(.N(N)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
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
    for (int t = 0; t < 3000; t++) begin
      int perm [N];
      cell_t exp [N];
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      en = ($urandom_range(4) != 0);
      for (int i = 0; i < N; i++) begin
        in_cell[i]       = cell_t'({$urandom, $urandom});
        in_cell[i].valid = 1'b1;
        pat_valid[i]     = ($urandom_range(2) != 0);
        pat_om[i]        = 3'(perm[i]);
      end
      foreach (exp[j]) exp[j] = '0;
      if (en)
        for (int i = 0; i < N; i++)
          if (pat_valid[i]) exp[perm[i]] = in_cell[i];
      #1;
      for (int j = 0; j < N; j++) begin
        check(out_cell[j] == exp[j], "output cell");
        if (exp[j].valid) n_moved++;
      end
      if (!en) n_off++;
    end
    check(n_off > 0 && n_moved > 0, "on and off exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
