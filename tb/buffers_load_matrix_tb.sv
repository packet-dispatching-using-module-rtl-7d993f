// Self-checking testbench of buffers_load_matrix.
//
// Applies random and hand-made request matrices to an 8 x 8 matcher and
// compares its selection with a reference that literally performs the
// masking procedure on a copy of the matrix: scan each row from bit 0, keep
// the first remaining 1, clear the rest of the row and of the column below.
// Also checks the matching properties (one 1 per row/column, top row always
// served) and that contention, where a request is rejected, happens.
module buffers_load_matrix_tb;

  localparam int N = 8;

  logic [N-1:0] row_bits [N];
  logic [N-1:0] sel      [N];
  int checks = 0, failures = 0, n_reject = 0;

  buffers_load_matrix #(.N(N)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_one();
    logic [N-1:0] m [N];
    logic [N-1:0] exp_sel [N];
    logic [N-1:0] cols;
    m = row_bits;
    for (int r = 0; r < N; r++) begin
      exp_sel[r] = '0;
      for (int c = 0; c < N; c++)
        if (m[r][c]) begin
          exp_sel[r][c] = 1'b1;
          for (int c2 = c + 1; c2 < N; c2++) m[r][c2] = 1'b0;
          for (int r2 = r + 1; r2 < N; r2++) m[r2][c] = 1'b0;
          break;
        end
    end
    #1;
    cols = '0;
    for (int r = 0; r < N; r++) begin
      check(sel[r] == exp_sel[r], "selection row");
      check($countones(sel[r]) <= 1, "one per row");
      check((sel[r] & cols) == 0, "one per column");
      check((sel[r] & ~row_bits[r]) == 0, "only requested OMs");
      cols |= sel[r];
      if (row_bits[r] != 0 && sel[r] == 0) n_reject++;
    end
    if (row_bits[0] != 0) check(sel[0] == (row_bits[0] & -row_bits[0]), "top row lowest OM");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // all rows request everything: a diagonal results
    foreach (row_bits[r]) row_bits[r] = '1;
    run_one();
    foreach (row_bits[r]) check(sel[r] == N'(1) << r, "diagonal");
    // all rows request the same OM: only the top one wins
    foreach (row_bits[r]) row_bits[r] = 8'b0000_0100;
    run_one();
    // the example from the scheme: OM(2) and OM(4) requested
    foreach (row_bits[r]) row_bits[r] = '0;
    row_bits[0] = 8'b0000_1010;
    row_bits[1] = 8'b0000_1010;
    row_bits[2] = 8'b0000_1010;
    run_one();
    check(sel[0] == 8'b10 && sel[1] == 8'b1000 && sel[2] == 0, "example rows");
    for (int t = 0; t < 2000; t++) begin
      foreach (row_bits[r]) row_bits[r] = (t % 3 == 0) ? N'($urandom) : N'($urandom & $urandom);
      run_one();
    end
    check(n_reject > 0, "contention exercised");
    $display("rejected requests=%0d", n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
