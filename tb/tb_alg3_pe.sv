// Testbench of one Algorithm 3 PE, driven on its own.
//
// Build: p = 2 PEs, sqrt(M) = 4 (W = 2 cycles per slot, 8 local words),
// PE index 1, two-stage multiplier, three-stage adder.  Matrices are 8 x 8
// (two blocks per side).  The testbench produces the slot stream the
// controller would produce for two blocks of C, (0,0) and (1,1), each the
// sum of two block products (z = 0, 1): the preload of the first B row, then
// one slot every W cycles, the next B row spread over the slots and loaded
// into the other register bank.  Checked: every own result (value, row and
// column tags, and the exact cycle it leaves: the MAC depth plus two cycles
// after the slot with the last A element arrives, plus its position t in
// the slot), that every slot leaves unchanged after W cycles (one for
// preload slots), and that words entering on the result chain, partly
// colliding with own results, all leave in order through the CoutBuffer.
module tb_alg3_pe;
  import mm_pkg::*;
  localparam int P = 2, SM = 4, IDX = 1, LM = 2, LA = 3, NN = 8;
  localparam int W = SM / P, TL = LM + LA, NB = NN / SM;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  slot_t s_in, s_out;
  c3_word_t c_in, c_out;

  alg3_pe #(.P(P), .SQRT_M(SM), .IDX(IDX), .LAT_MUL(LM), .LAT_ADD(LA)) dut (
    .clk, .rst_n, .s_in, .s_out, .c_in, .c_out);

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

  function automatic real cref(int i, int j);
    real s = 0.0;
    for (int k = 0; k < NN; k++) s += A[i][k] * B[k][j];
    return s;
  endfunction

  // expected exit cycle of each own result, keyed by row*NN+col
  int own_exit [int];
  int own_seen = 0, own_on_time = 0, inj_seen = 0, stray = 0;
  c3_word_t inj_q [$];

  always @(posedge clk) if (rst_n && c_out.valid) begin
    if (c_out.data[63:48] == 16'hABCD) begin
      if (inj_q.size() > 0 && c_out == inj_q[0]) begin
        void'(inj_q.pop_front());
        inj_seen++;
      end else stray++;
    end else begin
      int key;
      real e;
      key = int'(c_out.row) * NN + int'(c_out.col);
      e = cref(int'(c_out.row), int'(c_out.col));
      check(own_exit.exists(key) && $bitstoreal(c_out.data) == e,
            $sformatf("own result row %0d col %0d = %f expected %f",
                      c_out.row, c_out.col, $bitstoreal(c_out.data), e));
      if (own_exit.exists(key) && own_exit[key] == cyc) own_on_time++;
      own_seen++;
    end
  end

  // slots leave after their stay, unchanged
  slot_t sent_q [$];
  int    leave_q [$];
  int    slot_ok = 0, slot_bad = 0;
  always @(posedge clk) if (rst_n && s_out.valid) begin
    if (sent_q.size() > 0 && s_out == sent_q[0] && leave_q[0] == cyc) slot_ok++;
    else slot_bad++;
    if (sent_q.size() > 0) begin
      void'(sent_q.pop_front());
      void'(leave_q.pop_front());
    end
  end

  // one entry per column of A block processed: (g, h, z, q)
  int col_g [$], col_h [$], col_z [$], col_q [$];
  int inj_count = 0;

  task automatic send(input slot_t s, input int stay);
    s_in = s;
    sent_q.push_back(s);
    leave_q.push_back(cyc + stay);
    @(negedge clk);
    s_in = '0;
    repeat (stay - 1) @(negedge clk);
  endtask

  initial begin
    int nc;
    for (int r = 0; r < NN; r++)
      for (int c = 0; c < NN; c++) begin
        A[r][c] = real'($signed($urandom_range(10)) - 5);
        B[r][c] = real'($signed($urandom_range(10)) - 5);
      end
    // blocks (0,0) and (1,1), z innermost, q within
    for (int blk = 0; blk < 2; blk++)
      for (int z = 0; z < NB; z++)
        for (int q = 0; q < SM; q++) begin
          col_g.push_back(blk); col_h.push_back(blk); col_z.push_back(z); col_q.push_back(q);
        end
    nc = col_q.size();
    s_in = '0; c_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // preload: row 0 of B block (z=0, h=0) into bank 0, one element a cycle
    for (int j = 0; j < SM; j++) begin
      slot_t s;
      s = '0;
      s.valid = 1; s.preload = 1; s.b_valid = 1; s.b_bank = 0;
      s.b_j = idx_t'(j); s.b = $realtobits(B[0][j]);
      send(s, 1);
    end
    // stream
    for (int c = 0; c < nc; c++) begin
      for (int i = 0; i < SM; i++) begin
        slot_t s;
        int g, h, z, q, nr, nh;
        g = col_g[c]; h = col_h[c]; z = col_z[c]; q = col_q[c];
        s = '0;
        s.valid = 1; s.a_valid = 1;
        s.a_first = (z == 0 && q == 0);
        s.a_last  = (z == NB - 1 && q == SM - 1);
        s.a_bank = c[0];
        s.a_i = idx_t'(i);
        s.row_base = idx_t'(g * SM); s.col_base = idx_t'(h * SM);
        s.a = $realtobits(A[g*SM + i][z*SM + q]);
        if (c + 1 < nc) begin
          nr = col_z[c+1] * SM + col_q[c+1];
          nh = col_h[c+1];
          s.b_valid = 1; s.b_bank = ~c[0]; s.b_j = idx_t'(i);
          s.b = $realtobits(B[nr][nh*SM + i]);
        end
        if (s.a_last)
          for (int t = 0; t < W; t++)
            own_exit[(g*SM + i) * NN + h*SM + t*P + IDX] = cyc + 2 + TL + t;
        // inject passing words during the last columns of each block
        if (q >= SM - 1 && i >= 1) begin
          c_in = '0;
          c_in.valid = 1; c_in.row = idx_t'(inj_count); c_in.col = idx_t'(c);
          c_in.data = {16'hABCD, 48'(inj_count)};
          inj_q.push_back(c_in);
          inj_count++;
        end
        s_in = s;
        sent_q.push_back(s);
        leave_q.push_back(cyc + W);
        @(negedge clk);
        s_in = '0; c_in = '0;
        repeat (W - 1) @(negedge clk);
      end
    end
    repeat (TL + 3 * SM * W) @(negedge clk);
    check(own_seen == 2 * SM * W, $sformatf("all own results left the PE (%0d)", own_seen));
    check(own_on_time == own_seen, $sformatf("own results left on time (%0d of %0d)", own_on_time, own_seen));
    check(inj_seen == inj_count && stray == 0,
          $sformatf("passing words forwarded in order (%0d of %0d, %0d stray)", inj_seen, inj_count, stray));
    check(slot_bad == 0 && slot_ok == SM + nc * SM,
          $sformatf("slots left after their stay (%0d ok, %0d bad)", slot_ok, slot_bad));
    check(dut.u_cbuf.count == 0, "CoutBuffer empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
