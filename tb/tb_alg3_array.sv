// Self-checking testbench of the Algorithm 3 array.
//
// Two builds: p = 2, sqrt(M) = 8 (W = 4 cycles per slot) for n = 16 and for
// n = 8, and p = 4, sqrt(M) = 4 (W = 1) for n = 8.  Every C element is
// compared with a reference computed here.  The cycle of the last final
// result of the last PE is compared with
// sqrt(M) + (n/sqrt(M))^3 * M * W + (p-1)*W + LAT_MUL + LAT_ADD,
// i.e. the sqrt(M) + n^3/p streaming time plus the pipeline fill.
module tb_alg3_array;
  import mm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic go1 = 0, go2 = 0;
  int n1 = 16, n2 = 8, mode = 0;
  logic idle1, idle2;
  int ch1, ch2, er1, er2, td1, td2, tl1, tl2, bu1, bu2, bs1, bs2;

  alg3_env #(.P(2), .SQRT_M(8), .N(16), .LAT_MUL(3), .LAT_ADD(4)) e1 (
    .clk, .rst_n, .go(go1), .n(n1), .mode, .idle(idle1), .checks(ch1), .errors(er1),
    .t_done(td1), .t_lastgen(tl1), .buf_uses(bu1), .bank_swaps(bs1));
  alg3_env #(.P(4), .SQRT_M(4), .N(8), .LAT_MUL(2), .LAT_ADD(3)) e2 (
    .clk, .rst_n, .go(go2), .n(n2), .mode, .idle(idle2), .checks(ch2), .errors(er2),
    .t_done(td2), .t_lastgen(tl2), .buf_uses(bu2), .bank_swaps(bs2));

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

  task automatic run2(input int m);
    mode = m;
    @(negedge clk); go1 = 1; go2 = 1;
    @(negedge clk); go1 = 0; go2 = 0;
    @(negedge clk);
    wait (idle1 && idle2);
    @(negedge clk);
  endtask

  function automatic int lastgen(int p, int sm, int n, int q);
    int w, nb;
    w = sm / p;
    nb = n / sm;
    return sm + nb*nb*nb * sm*sm * w + (p-1)*w + q;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    run2(0);
    check(er1 == 0 && ch1 == 256, "p=2 sqrtM=8 n=16 result");
    check(er2 == 0 && ch2 == 64,  "p=4 sqrtM=4 n=8 result");
    check(tl1 == lastgen(2, 8, 16, 7), $sformatf("p=2 last result cycle %0d (%0d)", tl1, lastgen(2, 8, 16, 7)));
    check(tl2 == lastgen(4, 4, 8, 5),  $sformatf("p=4 last result cycle %0d (%0d)", tl2, lastgen(4, 4, 8, 5)));
    $display("completion: %0d and %0d cycles", td1, td2);
    check(bu1 > 0 && bu2 > 0, "CoutBuffers were used");
    check(bs1 > 0 && bs2 > 0, "B register banks alternated");

    run2(1);
    check(er1 == 0 && er2 == 0, "random data results");

    n1 = 8; n2 = 4;
    run2(0);
    check(er1 == 0 && ch1 == 64 && er2 == 0 && ch2 == 16, "single-block run-time sizes");
    check(tl1 == lastgen(2, 8, 8, 7), $sformatf("p=2 n=8 last result cycle %0d", tl1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
