// Testbench of the Algorithm 3 stream controller (p = 2, sqrt(M) = 4, N = 8).
//
// A memory model returns words that encode their own row and column.  For
// run-time sizes n = 8 (two blocks per side, eight block products) and
// n = 4 (one block) the testbench rebuilds the slot stream from the loop
// nest (block row g, block column h, z, column q of A_gz, row i) and checks
// each slot in order: the A element, the B element of the next row and its
// register bank, the first/last flags, the row and column bases, and the
// cycle it is emitted (preload slots one cycle apart, then one slot every
// W = sqrt(M)/p cycles, with no gap).  It then returns all n*n result words
// in scrambled order and checks the write addresses and that done pulses
// exactly when the last one is written.
module tb_alg3_ctrl;
  import mm_pkg::*;
  localparam int P = 2, SM = 4, N = 8, AW = $clog2(N*N), W = SM / P;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, a_rd_en, b_rd_en, c_wr_en;
  idx_t cfg_n = '0;
  logic [AW-1:0] a_rd_addr, b_rd_addr, c_wr_addr;
  fp_t a_rd_data, b_rd_data, c_wr_data;
  slot_t s_first;
  c3_word_t c_last;

  alg3_ctrl #(.P(P), .SQRT_M(SM), .N(N)) dut (.clk, .rst_n, .start, .cfg_n, .busy, .done,
    .a_rd_en, .a_rd_addr, .a_rd_data, .b_rd_en, .b_rd_addr, .b_rd_data,
    .c_wr_en, .c_wr_addr, .c_wr_data, .s_first, .c_last);

  function automatic fp_t enc(bit is_b, int r, int c);
    return {is_b ? 16'hBBBB : 16'hAAAA, 16'(r), 16'(c), 16'h0};
  endfunction
  always_ff @(posedge clk) begin
    a_rd_data <= enc(0, int'(a_rd_addr) / N, int'(a_rd_addr) % N);
    b_rd_data <= enc(1, int'(b_rd_addr) / N, int'(b_rd_addr) % N);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected slots and their emission cycles relative to the first one
  slot_t exp_q [$];
  int    exp_t [$];
  int    t_first, slot_bad, slot_seen;

  always @(posedge clk) if (rst_n && s_first.valid) begin
    slot_t e, got;
    got = s_first;
    if (slot_seen == 0) t_first = cyc;
    if (exp_q.size() == 0) slot_bad++;
    else begin
      e = exp_q.pop_front();
      // data of absent elements is don't-care
      if (!got.a_valid) got.a = '0;
      if (!got.b_valid) got.b = '0;
      if (got.preload) begin
        got.a_first = 0; got.a_last = 0; got.a_bank = 0; got.a_i = '0;
        got.row_base = '0; got.col_base = '0;
      end
      if (got != e || cyc - t_first != exp_t.pop_front()) begin
        slot_bad++;
        if (slot_bad < 5)
          $display("slot %0d differs at %0d: got %p\n expected %p", slot_seen, cyc - t_first, got, e);
      end
    end
    slot_seen++;
  end

  task automatic build(input int n);
    int nb, t;
    slot_t s;
    int cols_g [$], cols_h [$], cols_z [$], cols_q [$];
    nb = n / SM;
    exp_q.delete(); exp_t.delete();
    for (int g = 0; g < nb; g++)
      for (int h = 0; h < nb; h++)
        for (int z = 0; z < nb; z++)
          for (int q = 0; q < SM; q++) begin
            cols_g.push_back(g); cols_h.push_back(h); cols_z.push_back(z); cols_q.push_back(q);
          end
    for (int i = 0; i < SM; i++) begin
      s = '0;
      s.valid = 1; s.preload = 1; s.b_valid = 1; s.b_bank = 0; s.b_j = idx_t'(i);
      s.b = enc(1, 0, i);
      exp_q.push_back(s); exp_t.push_back(i);
    end
    t = SM;
    foreach (cols_q[c]) begin
      for (int i = 0; i < SM; i++) begin
        s = '0;
        s.valid = 1; s.a_valid = 1;
        s.a_first = (cols_z[c] == 0 && cols_q[c] == 0);
        s.a_last  = (cols_z[c] == nb - 1 && cols_q[c] == SM - 1);
        s.a_bank  = c[0];
        s.a_i     = idx_t'(i);
        s.row_base = idx_t'(cols_g[c] * SM);
        s.col_base = idx_t'(cols_h[c] * SM);
        s.a = enc(0, cols_g[c] * SM + i, cols_z[c] * SM + cols_q[c]);
        s.b_j = idx_t'(i);
        s.b_bank = ~c[0];
        if (c + 1 < cols_q.size()) begin
          s.b_valid = 1;
          s.b = enc(1, cols_z[c+1] * SM + cols_q[c+1], cols_h[c+1] * SM + i);
        end
        exp_q.push_back(s); exp_t.push_back(t);
        t += W;
      end
    end
  endtask

  task automatic run(input int n);
    int order [$], cnt_done, wr_bad;
    build(n);
    slot_seen = 0; slot_bad = 0;
    cfg_n = idx_t'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    while (exp_q.size() > 0 && slot_bad == 0 && cyc < 15000) @(negedge clk);
    @(negedge clk);
    check(slot_bad == 0 && exp_q.size() == 0,
          $sformatf("n=%0d: slot stream matches the loop nest (%0d slots, %0d bad)", n, slot_seen, slot_bad));
    repeat (W + 2) @(negedge clk);
    check(slot_seen == SM + (n / SM) ** 3 * SM * SM,
          $sformatf("n=%0d: no extra slots (%0d)", n, slot_seen));
    // results back in scrambled order
    for (int e = 0; e < n * n; e++) order.push_back(e);
    order.shuffle();
    cnt_done = 0; wr_bad = 0;
    foreach (order[m]) begin
      c_last = '0;
      c_last.valid = 1;
      c_last.row = idx_t'(order[m] / n);
      c_last.col = idx_t'(order[m] % n);
      c_last.data = enc(0, order[m], 7);
      #1;
      if (!(c_wr_en && c_wr_addr == AW'((order[m] / n) * N + order[m] % n) && c_wr_data == c_last.data))
        wr_bad++;
      @(negedge clk);
      c_last = '0;
      if (done) cnt_done++;
      if (m == n * n - 1) check(done, $sformatf("n=%0d: done right after the last write", n));
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    check(wr_bad == 0, $sformatf("n=%0d: C write addresses (%0d bad)", n, wr_bad));
    check(cnt_done == 1, $sformatf("n=%0d: done pulsed once (%0d)", n, cnt_done));
    @(negedge clk);
    check(!busy && !done, $sformatf("n=%0d: idle after done", n));
  endtask

  initial begin
    c_last = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!busy, "idle after reset");
    run(8);
    repeat (5) @(negedge clk);
    run(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
