// Self-checking testbench of request_reorder.
//
// Random requests (mixed priorities, some IMs idle) and random round-robin
// pointers are applied to an 8-IM reorder stage. The rows, the row-to-IM and
// IM-to-row maps and the first IM of each class are compared with the
// reference ordering of arb_ref_pkg; empty rows must sit at the bottom.
module request_reorder_tb;
  import arb_ref_pkg::*;

  localparam int N = 8;

  logic [N:0]   req      [N];
  logic [2:0]   hp_ptr, lp_ptr;
  logic [N-1:0] row_bits [N];
  logic [2:0]   row_im   [N];
  logic [2:0]   im_row   [N];
  logic         im_act   [N];
  logic         first_hp_valid, first_lp_valid;
  logic [2:0]   first_hp, first_lp;
  int checks = 0, failures = 0, n_mixed = 0;

  request_reorder #(.N(N)) dut (.*);

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
    logic [127:0] r [];
    int list [$];
    int nh;
    r = new[N];
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) begin
        req[i] = '0;
        if ($urandom_range(3) != 0) begin
          req[i][N:1] = (N)'($urandom);
          req[i][0]   = $urandom_range(1);
        end
        r[i] = 128'(req[i]);
      end
      hp_ptr = 3'($urandom);
      lp_ptr = 3'($urandom);
      order(N, r, int'(hp_ptr), int'(lp_ptr), list);
      nh = 0;
      foreach (list[k]) if (r[list[k]][0]) nh++;
      if (nh > 0 && nh < list.size()) n_mixed++;
      #1;
      for (int k = 0; k < N; k++) begin
        if (k < list.size()) begin
          check(row_bits[k] == req[list[k]][N:1], "row contents");
          check(int'(row_im[k]) == list[k], "row to IM");
          check(int'(im_row[list[k]]) == k, "IM to row");
          check(im_act[list[k]], "IM active");
        end else
          check(row_bits[k] == 0, "empty rows at the bottom");
      end
      check(first_hp_valid == (nh > 0), "first high valid");
      if (nh > 0) check(int'(first_hp) == list[0], "first high IM");
      check(first_lp_valid == (list.size() > nh), "first low valid");
      if (list.size() > nh) check(int'(first_lp) == list[nh], "first low IM");
    end
    check(n_mixed > 0, "mixed priorities exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
