// Body shared by the end-to-end testbenches of matmul_top.  The including
// module declares the localparams
//   ALG1_N ALG1_S ALG2_N ALG2_R ALG2_S ALG3_P ALG3_SM ALG3_N LM LA
//   RUN2_1 RUN2_2 RUN2_3   second-run sizes (0: no second run)
//   SAMPLE3                C elements of Algorithm 3 checked per run
//                          (0: all of them)
//   ALG3_WINDOW            0: Algorithm 3 runs to completion; otherwise
//                          it is followed for this many cycles only and
//                          checked through its partial sums
//   WATCHDOG               cycles
// and instantiates the top as dut with clk, rst_n and the signals below.
//
// External memories: one per array, row-major with the build's N as pitch,
// answering reads one cycle later.  Run 1: all three arrays start in the
// same cycle at their full size with small integers (exact sums); run 2:
// smaller run-time sizes with random doubles.  Every run checks C against a
// reference computed here, the cycle in which the last PE produces its last
// result (the latency formulas of the three algorithms; full size only) and
// the done handshake.  Every update of a local-storage word of Algorithm 3
// in rows 0, 1, sqrt(M)/2 and sqrt(M)-1 of a block is compared with the
// partial sum it must hold after that many updates.  Each mechanism of the
// design is counted; one that never happened counts as a failure.

  localparam int D1 = ALG1_N, D2 = ALG2_N / ALG2_R;
  localparam int NPE1 = D1 * D1 / ALG1_S, NPE2 = D2 * D2 / ALG2_S;
  localparam int AW1 = $clog2(ALG1_N*ALG1_N), AW2 = $clog2(ALG2_N*ALG2_N);
  localparam int AW3 = $clog2(ALG3_N*ALG3_N);
  localparam int W3 = ALG3_SM / ALG3_P;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- top-level signals -------------------------------------------------
  logic alg1_start = 0, alg2_start = 0, alg3_start = 0;
  idx_t alg1_n = '0, alg2_n = '0, alg3_n = '0;
  logic alg1_busy, alg1_done, alg2_busy, alg2_done, alg3_busy, alg3_done;
  logic alg1_a_rd_en, alg1_b_rd_en, alg1_c_wr_en;
  logic [AW1-1:0] alg1_a_rd_addr, alg1_b_rd_addr, alg1_c_wr_addr;
  fp_t alg1_a_rd_data, alg1_b_rd_data, alg1_c_wr_data;
  logic alg2_a_rd_en, alg2_b_rd_en;
  logic [ALG2_R-1:0] alg2_c_wr_en;
  logic [AW2-1:0] alg2_a_rd_addr [ALG2_R], alg2_b_rd_addr [ALG2_R], alg2_c_wr_addr [ALG2_R];
  fp_t alg2_a_rd_data [ALG2_R], alg2_b_rd_data [ALG2_R], alg2_c_wr_data [ALG2_R];
  logic alg3_a_rd_en, alg3_b_rd_en, alg3_c_wr_en;
  logic [AW3-1:0] alg3_a_rd_addr, alg3_b_rd_addr, alg3_c_wr_addr;
  fp_t alg3_a_rd_data, alg3_b_rd_data, alg3_c_wr_data;

  // ---- memories ----------------------------------------------------------
  fp_t A1 [ALG1_N*ALG1_N], B1 [ALG1_N*ALG1_N], C1 [ALG1_N*ALG1_N];
  fp_t A2 [ALG2_N*ALG2_N], B2 [ALG2_N*ALG2_N], C2 [ALG2_N*ALG2_N];
  fp_t A3 [ALG3_N*ALG3_N], B3 [ALG3_N*ALG3_N], C3 [ALG3_N*ALG3_N];

  always_ff @(posedge clk) begin
    if (alg1_a_rd_en) alg1_a_rd_data <= A1[alg1_a_rd_addr];
    if (alg1_b_rd_en) alg1_b_rd_data <= B1[alg1_b_rd_addr];
    if (alg1_c_wr_en) C1[alg1_c_wr_addr] <= alg1_c_wr_data;
    for (int g = 0; g < ALG2_R; g++) begin
      if (alg2_a_rd_en) alg2_a_rd_data[g] <= A2[alg2_a_rd_addr[g]];
      if (alg2_b_rd_en) alg2_b_rd_data[g] <= B2[alg2_b_rd_addr[g]];
      if (alg2_c_wr_en[g]) C2[alg2_c_wr_addr[g]] <= alg2_c_wr_data[g];
    end
    if (alg3_a_rd_en) alg3_a_rd_data <= A3[alg3_a_rd_addr];
    if (alg3_b_rd_en) alg3_b_rd_data <= B3[alg3_b_rd_addr];
    if (alg3_c_wr_en) C3[alg3_c_wr_addr] <= alg3_c_wr_data;
  end

  // ---- mechanism counters and cycle measurements -------------------------
  longint cyc = 0;
  longint t0_1, t0_2, t0_3, last1, last2, last3;
  logic   seen1, seen2, seen3;
  int n_park1, n_park2, n_park3;     // cycles a CoutBuffer took a word
  int n_b1_1, n_b2_1, n_b1_2, n_b2_2; // multiplies fed from RR.B1 / RR.B2
  int n_lane2 [ALG2_R];              // C words written per lane
  int n_bank3;                       // B register bank changes
  int n_accum3;                      // A slots of a block product with z > 0
  int n_pre3;                        // preload slots
  int n_concurrent;                  // cycles with all three arrays busy

  logic [NPE1-1:0] park1;
  logic [NPE2-1:0] park2;
  logic [ALG3_P-1:0] park3;
  for (genvar l = 0; l < NPE1; l++) begin : g_m1
    assign park1[l] = |dut.u_alg1.g_pe[l].u_pe.g_lane[0].push_v;
  end
  for (genvar l = 0; l < NPE2; l++) begin : g_m2
    logic [ALG2_R-1:0] pv;
    for (genvar y = 0; y < ALG2_R; y++) begin : g_y
      assign pv[y] = |dut.u_alg2.g_pe[l].u_pe.g_lane[y].push_v;
    end
    assign park2[l] = |pv;
  end
  for (genvar k = 0; k < ALG3_P; k++) begin : g_m3
    assign park3[k] = dut.u_alg3.g_pe[k].u_pe.push_v[0];
  end

  logic last_bank3;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (!seen1 && dut.u_alg1.g_pe[0].u_pe.rr_b[0].valid) begin seen1 <= 1; t0_1 <= cyc; end
      if (!seen2 && dut.u_alg2.g_pe[0].u_pe.rr_b[0].valid) begin seen2 <= 1; t0_2 <= cyc; end
      if (!seen3 && dut.u_alg3.g_pe[0].u_pe.rr.valid)      begin seen3 <= 1; t0_3 <= cyc; end
      if (dut.u_alg1.g_pe[NPE1-1].u_pe.fin) last1 <= cyc - t0_1 + 1;
      if (dut.u_alg2.g_pe[NPE2-1].u_pe.fin) last2 <= cyc - t0_2 + 1;
      if (dut.u_alg3.g_pe[ALG3_P-1].u_pe.fin) last3 <= cyc - t0_3 + 1;
      if (park1 != '0) n_park1 <= n_park1 + 1;
      if (park2 != '0) n_park2 <= n_park2 + 1;
      if (park3 != '0) n_park3 <= n_park3 + 1;
      if (dut.u_alg1.g_pe[0].u_pe.hit) begin
        if (dut.u_alg1.g_pe[0].u_pe.rr_a[0].k[0]) n_b2_1 <= n_b2_1 + 1;
        else                                       n_b1_1 <= n_b1_1 + 1;
      end
      if (dut.u_alg2.g_pe[0].u_pe.hit) begin
        if (dut.u_alg2.g_pe[0].u_pe.rr_a[0].k[0]) n_b2_2 <= n_b2_2 + 1;
        else                                       n_b1_2 <= n_b1_2 + 1;
      end
      for (int g = 0; g < ALG2_R; g++) if (alg2_c_wr_en[g]) n_lane2[g] <= n_lane2[g] + 1;
      if (dut.u_alg3.g_pe[0].u_pe.issue) begin
        last_bank3 <= dut.u_alg3.g_pe[0].u_pe.rr.a_bank;
        if (dut.u_alg3.g_pe[0].u_pe.rr.a_bank != last_bank3) n_bank3 <= n_bank3 + 1;
      end
      if (dut.u_alg3.u_ctrl.a_rd_en && dut.u_alg3.u_ctrl.z != '0) n_accum3 <= n_accum3 + 1;
      if (dut.u_alg3.g_pe[0].u_pe.s_in.valid && dut.u_alg3.g_pe[0].u_pe.s_in.preload)
        n_pre3 <= n_pre3 + 1;
      if (alg1_busy && alg2_busy && alg3_busy) n_concurrent <= n_concurrent + 1;
    end
  end

  // ---- Algorithm 3 partial sums --------------------------------------------
  localparam int SD3 = ALG3_SM * W3;
  int    upd_cnt [int];
  real   upd_sum [int];
  int    n_upd3, err_upd3;
  int    mode3;
  for (genvar k = 0; k < ALG3_P; k++) begin : g_u3
    always @(posedge clk) if (rst_n && dut.u_alg3.g_pe[k].u_pe.tag_add_out.valid) begin
      int key, rl, kk, row, col;
      real e;
      row = int'(dut.u_alg3.g_pe[k].u_pe.tag_add_out.row);
      col = int'(dut.u_alg3.g_pe[k].u_pe.tag_add_out.col);
      rl  = row % ALG3_SM;
      if (rl == 0 || rl == 1 || rl == ALG3_SM / 2 || rl == ALG3_SM - 1) begin
        key = k * SD3 + int'(dut.u_alg3.g_pe[k].u_pe.tag_add_out.addr);
        if (dut.u_alg3.g_pe[k].u_pe.tag_add_out.first) begin
          upd_cnt[key] = 0;
          upd_sum[key] = 0.0;
        end
        if (upd_cnt.exists(key)) begin
          kk = upd_cnt[key];
          e = upd_sum[key] + $bitstoreal(A3[row*ALG3_N + kk]) * $bitstoreal(B3[kk*ALG3_N + col]);
          if (!close($bitstoreal(dut.u_alg3.g_pe[k].u_pe.add_y), e, mode3)) begin
            err_upd3++;
            if (err_upd3 < 5) $display("partial sum PE %0d row %0d col %0d after %0d updates: %f, expected %f",
                                       k, row, col, kk + 1, $bitstoreal(dut.u_alg3.g_pe[k].u_pe.add_y), e);
          end
          upd_sum[key] = $bitstoreal(dut.u_alg3.g_pe[k].u_pe.add_y);
          upd_cnt[key] = kk + 1;
          n_upd3++;
        end else err_upd3++;
      end
    end
  end

  // ---- data, reference, checking -----------------------------------------
  function automatic fp_t rnd(int mode);
    if (mode == 0) return $realtobits(real'($signed($urandom_range(16)) - 8));
    return $realtobits((real'($urandom) / 4294967296.0) * 2.0 - 1.0);
  endfunction

  function automatic bit close(real got, real ref_v, int mode);
    real d, m;
    if (mode == 0) return got == ref_v;
    d = (got > ref_v) ? got - ref_v : ref_v - got;
    m = (ref_v < 0.0) ? -ref_v : ref_v;
    if (m < 1.0) m = 1.0;
    return d / m < 1e-9;
  endfunction

  task automatic fill(int mode);
    foreach (A1[e]) begin A1[e] = rnd(mode); B1[e] = rnd(mode); C1[e] = '1; end
    foreach (A2[e]) begin A2[e] = rnd(mode); B2[e] = rnd(mode); C2[e] = '1; end
    foreach (A3[e]) begin A3[e] = rnd(mode); B3[e] = rnd(mode); C3[e] = '1; end
  endtask

  int err1, err2, err3;
  task automatic check_c1(int n, int mode);
    err1 = 0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        real s = 0.0;
        for (int k = 0; k < n; k++) s += $bitstoreal(A1[r*ALG1_N+k]) * $bitstoreal(B1[k*ALG1_N+c]);
        if (!close($bitstoreal(C1[r*ALG1_N+c]), s, mode)) err1++;
      end
    check(err1 == 0, $sformatf("Algorithm 1, n=%0d: all %0d C elements right (%0d wrong)", n, n*n, err1));
  endtask
  task automatic check_c2(int n, int mode);
    err2 = 0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        real s = 0.0;
        for (int k = 0; k < n; k++) s += $bitstoreal(A2[r*ALG2_N+k]) * $bitstoreal(B2[k*ALG2_N+c]);
        if (!close($bitstoreal(C2[r*ALG2_N+c]), s, mode)) err2++;
      end
    check(err2 == 0, $sformatf("Algorithm 2, n=%0d: all %0d C elements right (%0d wrong)", n, n*n, err2));
  endtask
  task automatic check_c3(int n, int mode);
    int cnt;
    err3 = 0;
    cnt = (SAMPLE3 == 0 || SAMPLE3 > n*n) ? n*n : SAMPLE3;
    for (int e = 0; e < cnt; e++) begin
      int r, c;
      real s = 0.0;
      if (cnt == n*n) begin r = e / n; c = e % n; end
      else begin
        // corners of every block first, then random elements
        r = int'($urandom_range(n - 1)); c = int'($urandom_range(n - 1));
        if (e < 4) begin r = (e / 2) * (n - 1); c = (e % 2) * (n - 1); end
      end
      for (int k = 0; k < n; k++) s += $bitstoreal(A3[r*ALG3_N+k]) * $bitstoreal(B3[k*ALG3_N+c]);
      if (!close($bitstoreal(C3[r*ALG3_N+c]), s, mode)) err3++;
    end
    check(err3 == 0, $sformatf("Algorithm 3, n=%0d: %0d C elements checked (%0d wrong)", n, cnt, err3));
  endtask

  function automatic longint lastgen12(int n, int r, int npe);
    int d = n / r;
    return longint'(n) * d + npe + d - 1 + LM + LA;
  endfunction
  function automatic longint lastgen3(int n);
    longint nb = n / ALG3_SM;
    return ALG3_SM + nb * nb * nb * ALG3_SM * ALG3_SM * W3 + (ALG3_P - 1) * W3 + LM + LA;
  endfunction

  // Start the arrays whose size is not 0 in the same cycle; wait for all.
  task automatic run(int n1, int n2, int n3, int mode);
    int dn1, dn2, dn3;
    fill(mode);
    mode3 = mode;
    seen1 = 0; seen2 = 0; seen3 = 0;
    @(negedge clk);
    alg1_n = idx_t'(n1); alg2_n = idx_t'(n2); alg3_n = idx_t'(n3);
    alg1_start = (n1 != 0); alg2_start = (n2 != 0); alg3_start = (n3 != 0);
    @(negedge clk);
    alg1_start = 0; alg2_start = 0; alg3_start = 0;
    dn1 = (n1 == 0); dn2 = (n2 == 0); dn3 = (n3 == 0);
    if (ALG3_WINDOW != 0) fork
      begin repeat (ALG3_WINDOW) @(posedge clk); dn3 = 1; end
    join_none
    while (!(dn1 && dn2 && dn3)) begin
      @(posedge clk);
      if (alg1_done) dn1 = 1;
      if (alg2_done) dn2 = 1;
      if (alg3_done) dn3 = 1;
    end
    @(negedge clk);
    @(negedge clk);
    check(!alg1_busy && !alg2_busy && (!alg3_busy || ALG3_WINDOW != 0), "arrays idle after done");
    if (n1 != 0) check_c1(n1, mode);
    if (n2 != 0) check_c2(n2, mode);
    if (n3 != 0 && ALG3_WINDOW == 0) check_c3(n3, mode);
  endtask

  initial begin
    n_park1 = 0; n_park2 = 0; n_park3 = 0; n_b1_1 = 0; n_b2_1 = 0; n_b1_2 = 0; n_b2_2 = 0;
    n_upd3 = 0; err_upd3 = 0; mode3 = 0;
    n_bank3 = 0; n_accum3 = 0; n_pre3 = 0; n_concurrent = 0; last_bank3 = 0;
    for (int g = 0; g < ALG2_R; g++) n_lane2[g] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // run 1: full size, all three at once
    run(ALG1_N, ALG2_N, ALG3_N, 0);
    check(last1 == lastgen12(ALG1_N, 1, NPE1),
          $sformatf("Algorithm 1 last result at cycle %0d (formula %0d)", last1, lastgen12(ALG1_N, 1, NPE1)));
    check(last2 == lastgen12(ALG2_N, ALG2_R, NPE2),
          $sformatf("Algorithm 2 last result at cycle %0d (formula %0d)", last2, lastgen12(ALG2_N, ALG2_R, NPE2)));
    if (ALG3_WINDOW == 0) check(last3 == lastgen3(ALG3_N),
          $sformatf("Algorithm 3 last result at cycle %0d (formula %0d)", last3, lastgen3(ALG3_N)));
    // run 2: smaller run-time sizes, random doubles
    if (RUN2_1 + RUN2_2 + RUN2_3 != 0) run(RUN2_1, RUN2_2, RUN2_3, 1);

    check(n_upd3 > 0 && err_upd3 == 0,
          $sformatf("Algorithm 3: %0d partial sums checked (%0d wrong)", n_upd3, err_upd3));
    $display("mechanisms: park %0d/%0d/%0d  B1/B2 %0d/%0d %0d/%0d  banks %0d  accum %0d  preload %0d  concurrent %0d",
             n_park1, n_park2, n_park3, n_b1_1, n_b2_1, n_b1_2, n_b2_2, n_bank3, n_accum3, n_pre3, n_concurrent);
    check(n_park1 > 0, "Algorithm 1: a CoutBuffer parked a passing result");
    check(n_park2 > 0, "Algorithm 2: a CoutBuffer parked a passing result");
    // final results and several block products need a whole run
    if (ALG3_WINDOW == 0) check(n_park3 > 0, "Algorithm 3: a CoutBuffer parked a passing result");
    check(n_b1_1 > 0 && n_b2_1 > 0, "Algorithm 1: RR.B1 and RR.B2 both used");
    check(n_b1_2 > 0 && n_b2_2 > 0, "Algorithm 2: RR.B1 and RR.B2 both used");
    for (int g = 0; g < ALG2_R; g++)
      check(n_lane2[g] > 0, $sformatf("Algorithm 2: lane %0d wrote results", g));
    check(n_bank3 > 0, "Algorithm 3: B register banks alternated");
    check(n_pre3 > 0, "Algorithm 3: first B row preloaded");
    if (ALG3_WINDOW == 0) check(n_accum3 > 0, "Algorithm 3: block products accumulated over z");
    check(n_concurrent > 0, "all three arrays ran at the same time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
