// Testbench of the Algorithm 1/2 stream controller (r = 2, N = 8).
//
// A memory model returns words that encode their own row and column.  For
// run-time sizes n = 8 and n = 4 the testbench checks, cycle by cycle, that
// B enters row-major one phase (d = n/r cycles) ahead of A, that A enters
// column-major, that each lane carries its own sub-matrix, and that the
// index tags and first/last flags are right.  It then returns all n*n result
// words in scrambled order on the two result lanes and checks the write
// addresses and that done pulses exactly when the last one is written.
module tb_mm_ctrl;
  import mm_pkg::*;
  localparam int R = 2, N = 8, AW = $clog2(N*N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, a_rd_en, b_rd_en;
  idx_t cfg_n = '0, cfg_d;
  logic [AW-1:0] a_rd_addr [R], b_rd_addr [R], c_wr_addr [R];
  fp_t a_rd_data [R], b_rd_data [R], c_wr_data [R];
  logic [R-1:0] c_wr_en;
  a_word_t a_first [R];
  b_word_t b_first [R];
  c_word_t c_last [R];

  mm_ctrl #(.R(R), .N(N)) dut (.clk, .rst_n, .start, .cfg_n, .busy, .done, .cfg_d,
    .a_rd_en, .a_rd_addr, .a_rd_data, .b_rd_en, .b_rd_addr, .b_rd_data,
    .c_wr_en, .c_wr_addr, .c_wr_data, .a_first, .b_first, .c_last);

  function automatic fp_t enc(bit is_b, int r, int c);
    return {is_b ? 16'hBBBB : 16'hAAAA, 16'(r), 16'(c), 16'h0};
  endfunction
  always_ff @(posedge clk)
    for (int g = 0; g < R; g++) begin
      a_rd_data[g] <= enc(0, int'(a_rd_addr[g]) / N, int'(a_rd_addr[g]) % N);
      b_rd_data[g] <= enc(1, int'(b_rd_addr[g]) / N, int'(b_rd_addr[g]) % N);
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

  task automatic run(int n);
    int d, t, bad, writes, done_at, wr_bad;
    int pos [R][$];
    d = n / R;
    for (int g = 0; g < R; g++) c_last[g] = '0;
    @(negedge clk); cfg_n = idx_t'(n); start = 1;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    check(cfg_d == idx_t'(d), "cfg_d = n/r");
    // the first stream word is on a_first/b_first one cycle after the read
    while (!b_first[0].valid) @(negedge clk);
    bad = 0;
    for (t = 0; t < (n + 1) * d + 3; t++) begin
      for (int g = 0; g < R; g++) begin
        bit bv, av;
        bv = (t < n * d);
        av = (t >= d && t < (n + 1) * d);
        if (b_first[g].valid != bv) bad++;
        else if (bv && (b_first[g].k != idx_t'(t / d) || b_first[g].j != idx_t'(t % d) ||
                        b_first[g].data != enc(1, t / d, g * d + t % d))) bad++;
        if (a_first[g].valid != av) bad++;
        else if (av) begin
          int k, i;
          k = (t - d) / d; i = (t - d) % d;
          if (a_first[g].k != idx_t'(k) || a_first[g].i != idx_t'(i) ||
              a_first[g].first != (k == 0) || a_first[g].last != (k == n - 1) ||
              a_first[g].data != enc(0, g * d + i, k)) bad++;
        end
      end
      @(negedge clk);
    end
    check(bad == 0, $sformatf("stream order for n=%0d (%0d mismatches)", n, bad));
    // return results: every (x, y, i, j) once, y = lane
    for (int g = 0; g < R; g++) begin
      for (int x = 0; x < R; x++)
        for (int i = 0; i < d; i++)
          for (int j = 0; j < d; j++) pos[g].push_back((x << 16) | (i << 8) | j);
      pos[g].shuffle();
    end
    writes = 0; wr_bad = 0; done_at = -1;
    while (pos[0].size() > 0 || pos[1].size() > 0 || done_at < 0) begin
      for (int g = 0; g < R; g++) begin
        c_last[g] = '0;
        if (pos[g].size() > 0 && $urandom_range(3) != 0) begin
          int p;
          p = pos[g].pop_front();
          c_last[g].valid = 1; c_last[g].x = 4'(p >> 16); c_last[g].i = idx_t'((p >> 8) & 255);
          c_last[g].j = idx_t'(p & 255); c_last[g].data = {32'hC0DE, 32'(p)};
          #1;
          if (!c_wr_en[g] || c_wr_addr[g] != AW'((int'(c_last[g].x) * d + int'(c_last[g].i)) * N
                                                  + g * d + int'(c_last[g].j)) ||
              c_wr_data[g] != c_last[g].data) wr_bad++;
          writes++;
        end
      end
      @(posedge clk);
      #1;
      if (done) done_at = writes;
      if (writes > n * n + 2) break;
      @(negedge clk);
    end
    for (int g = 0; g < R; g++) c_last[g] = '0;
    check(wr_bad == 0, $sformatf("write addresses for n=%0d", n));
    check(done_at == n * n, $sformatf("done after the last of %0d writes (%0d)", n * n, done_at));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    for (int g = 0; g < R; g++) c_last[g] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8);
    run(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
