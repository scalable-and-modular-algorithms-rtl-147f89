// Testbench of one PE of the Algorithm 1/2 array, driven on its own.
//
// Build: r = 2 lanes, s = 2 words per MAC, two row groups, n = 8 (d = 4),
// two-stage multiplier and three-stage adder.  The PE is placed at column 1,
// row group 1, so it owns rows 1 and 3, column 1 of each of the four C
// sub-matrices: 8 results.  The testbench feeds A and B in the order the
// controller uses, checks that the forwarded streams leave one cycle later,
// checks every own result (value, tags, and the cycle it leaves: two cycles
// after a_{i,n-1} is presented plus the MAC depth for x = 0), and injects
// words on the result lanes, partly colliding with own results, which must
// all leave in order through the CoutBuffers.
module tb_mm_pe;
  import mm_pkg::*;
  localparam int R = 2, S = 2, RG = 2, LM = 2, LA = 3, NN = 8, D = NN / R;
  localparam int Q = LM + LA;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  a_word_t a_in [R], a_out [R];
  b_word_t b_in [R], b_out [R];
  c_word_t c_in [R], c_out [R];
  idx_t col_out, grp_out;

  mm_pe #(.R(R), .S(S), .RG(RG), .LAT_MUL(LM), .LAT_ADD(LA)) dut (
    .clk, .rst_n, .cfg_d(idx_t'(D)), .cfg_col_in(idx_t'(1)), .cfg_grp_in(idx_t'(1)),
    .cfg_col_out(col_out), .cfg_grp_out(grp_out),
    .a_in, .b_in, .a_out, .b_out, .c_in, .c_out);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real A [NN][NN], B [NN][NN];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected own results: lane y -> queue of words; the x = 0 word has a
  // fixed exit cycle
  c_word_t inj_q [R][$];       // injected words, in order
  int      own_exit [$];       // exit cycles of x = 0 own words
  int      own_seen = 0, inj_seen = 0, own_on_time = 0, stray = 0;

  function automatic real cref(int x, int y, int i, int j);
    real s = 0.0;
    for (int k = 0; k < NN; k++) s += A[x*D+i][k] * B[k][y*D+j];
    return s;
  endfunction

  // observe the result lanes
  always @(posedge clk) if (rst_n) begin
    for (int y = 0; y < R; y++) begin
      if (c_out[y].valid) begin
        if (c_out[y].data[63:48] == 16'hABCD) begin
          // injected word: must be the oldest outstanding one of this lane
          if (inj_q[y].size() > 0 && c_out[y] == inj_q[y][0]) begin
            void'(inj_q[y].pop_front());
            inj_seen++;
          end else stray++;
        end else begin
          real e;
          e = cref(int'(c_out[y].x), y, int'(c_out[y].i), int'(c_out[y].j));
          checks++;
          if (!(c_out[y].j == 1 && (c_out[y].i == 1 || c_out[y].i == 3) &&
                $bitstoreal(c_out[y].data) == e)) begin
            failures++;
            $display("FAIL own result x%0d y%0d i%0d j%0d = %f expected %f",
                     c_out[y].x, y, c_out[y].i, c_out[y].j, $bitstoreal(c_out[y].data), e);
          end
          own_seen++;
          if (c_out[y].x == 0) begin
            foreach (own_exit[m]) if (own_exit[m] == cyc) own_on_time++;
          end
        end
      end
    end
  end

  // forwarded streams leave one cycle after entering
  a_word_t a_prev [R];
  b_word_t b_prev [R];
  int fwd_bad = 0;
  always @(posedge clk) if (rst_n) begin
    for (int q = 0; q < R; q++) begin
      if (a_out[q] != a_prev[q] || b_out[q] != b_prev[q]) fwd_bad++;
    end
    a_prev <= a_in;
    b_prev <= b_in;
  end

  int inj_count = 0;
  initial begin
    for (int r = 0; r < NN; r++)
      for (int c = 0; c < NN; c++) begin
        A[r][c] = real'($signed($urandom_range(10)) - 5);
        B[r][c] = real'($signed($urandom_range(10)) - 5);
      end
    for (int q = 0; q < R; q++) begin
      a_in[q] = '0; b_in[q] = '0; c_in[q] = '0; a_prev[q] = '0; b_prev[q] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(col_out == 2 && grp_out == 1, "configuration chain passes column+1");
    // (n+1) phases of d cycles, then idle
    for (int t = 0; t < (NN + 1) * D + 40; t++) begin
      for (int q = 0; q < R; q++) begin
        a_in[q] = '0; b_in[q] = '0; c_in[q] = '0;
        if (t < NN * D) begin
          b_in[q].valid = 1; b_in[q].k = idx_t'(t / D); b_in[q].j = idx_t'(t % D);
          b_in[q].data = $realtobits(B[t / D][q*D + t % D]);
        end
        if (t >= D && t < (NN + 1) * D) begin
          int k, i;
          k = (t - D) / D; i = (t - D) % D;
          a_in[q].valid = 1; a_in[q].k = idx_t'(k); a_in[q].i = idx_t'(i);
          a_in[q].first = (k == 0); a_in[q].last = (k == NN - 1);
          a_in[q].data = $realtobits(A[q*D + i][k]);
          if (q == 0 && k == NN - 1 && (i == 1 || i == 3)) own_exit.push_back(cyc + 2 + Q);
        end
        // inject a burst of passing words around the end of the run
        if (t >= NN * D - 2 && t < NN * D + 12 && (t % 3 != 0 || q == 1)) begin
          c_in[q].valid = 1; c_in[q].x = 4'(q); c_in[q].i = idx_t'(inj_count);
          c_in[q].j = idx_t'(t); c_in[q].data = {16'hABCD, 48'(inj_count)};
          inj_q[q].push_back(c_in[q]);
          inj_count++;
        end
      end
      @(negedge clk);
    end
    check(own_seen == 8, $sformatf("8 own results left the PE (%0d)", own_seen));
    check(own_on_time == 2 * R, $sformatf("x=0 results left on time (%0d)", own_on_time));
    check(inj_seen == inj_count && stray == 0,
          $sformatf("passing words all forwarded in order (%0d of %0d, %0d stray)", inj_seen, inj_count, stray));
    check(fwd_bad == 0, "A/B streams forwarded with one cycle delay");
    check(inj_count > 0, "words injected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
