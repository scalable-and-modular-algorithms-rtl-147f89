// Self-checking testbench of the Algorithm 1/2 linear array.
//
// Three arrays: the worked example with n = 4, s = 2 and two-stage adder and
// multiplier (Algorithm 1, 8 PEs); Algorithm 2 with r = 2, n = 8, s = 2 (8
// PEs); and an Algorithm 1 array built for N = 8, s = 8 that is also run at a
// smaller run-time problem size.  Every C element is compared with a
// reference computed here, and the cycle at which the last PE produces its
// last final result is compared with the closed form
// n*d + NPE + d - 1 + LAT_MUL + LAT_ADD (d = n/r).
module tb_mm_array;
  import mm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic go1 = 0, go2 = 0, go3 = 0;
  int n1 = 4, n2 = 8, n3 = 8, mode = 0;
  logic idle1, idle2, idle3;
  int ch1, ch2, ch3, er1, er2, er3, td1, td2, td3, tl1, tl2, tl3, bu1, bu2, bu3;

  mm_env #(.R(1), .N(4), .S(2), .LAT_MUL(2), .LAT_ADD(2)) e1 (
    .clk, .rst_n, .go(go1), .n(n1), .mode, .idle(idle1), .checks(ch1), .errors(er1),
    .t_done(td1), .t_lastgen(tl1), .buf_uses(bu1));
  mm_env #(.R(2), .N(8), .S(2), .LAT_MUL(3), .LAT_ADD(3)) e2 (
    .clk, .rst_n, .go(go2), .n(n2), .mode, .idle(idle2), .checks(ch2), .errors(er2),
    .t_done(td2), .t_lastgen(tl2), .buf_uses(bu2));
  mm_env #(.R(1), .N(8), .S(8), .LAT_MUL(3), .LAT_ADD(4)) e3 (
    .clk, .rst_n, .go(go3), .n(n3), .mode, .idle(idle3), .checks(ch3), .errors(er3),
    .t_done(td3), .t_lastgen(tl3), .buf_uses(bu3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run3(input int m);
    mode = m;
    @(negedge clk); go1 = 1; go2 = 1; go3 = 1;
    @(negedge clk); go1 = 0; go2 = 0; go3 = 0;
    @(negedge clk);
    wait (idle1 && idle2 && idle3);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // exact data, full size of each build
    run3(0);
    check(er1 == 0 && ch1 == 16, "Algorithm 1 n=4 s=2 result");
    check(er2 == 0 && ch2 == 64, "Algorithm 2 r=2 n=8 result");
    check(er3 == 0 && ch3 == 64, "Algorithm 1 n=8 s=8 result");
    // n=4, s=2, q=4: last result at n*n + n*n/s + n - 1 + q = 16+8+3+4
    check(tl1 == 31, $sformatf("Algorithm 1 last result cycle %0d (31)", tl1));
    // r=2: n*d + NPE + d - 1 + q = 32 + 8 + 3 + 6
    check(tl2 == 49, $sformatf("Algorithm 2 last result cycle %0d (49)", tl2));
    check(tl3 == 64 + 8 + 7 + 7, $sformatf("Algorithm 1 N=8 last result cycle %0d", tl3));
    $display("completion: alg1 n=4 %0d, alg2 n=8 %0d, alg1 n=8 %0d cycles", td1, td2, td3);
    // the n*n results leave through R lanes: at least n*n/R cycles after the first
    check(td1 >= 16 + 16, "Algorithm 1 completion no earlier than the drain allows");
    check(bu1 > 0 && bu2 > 0 && bu3 > 0, "CoutBuffers were used");

    // random data
    run3(1);
    check(er1 == 0 && er2 == 0 && er3 == 0, "random data results");

    // smaller run-time problem size on the N=8 build (counter limits only)
    n3 = 5;
    run3(0);
    check(er3 == 0 && ch3 == 25, "run-time n=5 on the N=8 build");
    check(tl1 > 0, "runs again after a previous run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
