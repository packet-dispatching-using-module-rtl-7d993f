// Central arbiter at the matrix sizes of large switches: 32 x 32 (a 1024-port
// MCNS) and 64 x 64 (4096 ports).
//
// Both arbiters get random request sets every slot (mixed priorities, sparse
// and dense rows). Their grants and round-robin pointers are compared with
// the reference matching of arb_ref_pkg, which keeps its own pointers.
module arbiter_scale_tb;
  import arb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, n_grant = 0, n_reject = 0;

  logic [32:0] req32 [32];
  logic        gv32  [32];
  logic [4:0]  go32  [32];
  logic [4:0]  hp32, lp32;
  logic [64:0] req64 [64];
  logic        gv64  [64];
  logic [5:0]  go64  [64];
  logic [5:0]  hp64, lp64;

  central_arbiter #(.N(32)) u32 (.clk, .rst_n, .req(req32), .grant_valid(gv32),
                                 .grant_om(go32), .hp_ptr(hp32), .lp_ptr(lp32));
  central_arbiter #(.N(64)) u64 (.clk, .rst_n, .req(req64), .grant_valid(gv64),
                                 .grant_om(go64), .hp_ptr(hp64), .lp_ptr(lp64));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference pointer update after one slot
  function automatic void next_ptrs(input int n, input logic [127:0] r [], input int list [$],
                                    ref int hp, ref int lp);
    int nh;
    nh = 0;
    foreach (list[k]) if (r[list[k]][0]) nh++;
    if (nh > 0)           hp = (list[0] + 1) % n;
    if (list.size() > nh) lp = (list[nh] + 1) % n;
  endfunction

  function automatic logic [127:0] rnd_req(input int n, input int t);
    logic [127:0] v;
    v = '0;
    if ($urandom_range(3) != 0) begin
      for (int j = 0; j < n; j++)
        v[j+1] = (t % 2) ? ($urandom_range(1) == 0) : ($urandom_range(15) == 0);
      v[0] = ($urandom_range(2) == 0);
    end
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] r32 [], r64 [];
    int l32 [$], l64 [$];
    int g32 [], g64 [];
    int h32 = 0, w32 = 0, h64 = 0, w64 = 0;
    r32 = new[32];
    r64 = new[64];
    foreach (req32[i]) req32[i] = '0;
    foreach (req64[i]) req64[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      for (int i = 0; i < 32; i++) begin r32[i] = rnd_req(32, t); req32[i] = 33'(r32[i]); end
      for (int i = 0; i < 64; i++) begin r64[i] = rnd_req(64, t); req64[i] = 65'(r64[i]); end
      order(32, r32, h32, w32, l32);
      match(32, r32, l32, g32);
      order(64, r64, h64, w64, l64);
      match(64, r64, l64, g64);
      #1;
      check(int'(hp32) == h32 && int'(lp32) == w32, "pointers 32");
      check(int'(hp64) == h64 && int'(lp64) == w64, "pointers 64");
      for (int i = 0; i < 32; i++) begin
        check(gv32[i] == (g32[i] >= 0), "grant 32");
        if (g32[i] >= 0) check(int'(go32[i]) == g32[i], "granted OM 32");
      end
      for (int i = 0; i < 64; i++) begin
        check(gv64[i] == (g64[i] >= 0), "grant 64");
        if (g64[i] >= 0) begin
          check(int'(go64[i]) == g64[i], "granted OM 64");
          n_grant++;
        end else if (r64[i][64:1] != 0) n_reject++;
      end
      next_ptrs(32, r32, l32, h32, w32);
      next_ptrs(64, r64, l64, h64, w64);
      @(negedge clk);
    end
    check(n_grant > 0 && n_reject > 0, "grants and rejections at 64 x 64");
    $display("64x64: grants=%0d rejected=%0d", n_grant, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
