// Test environment for one Algorithm 3 array: external memory model
// (one-cycle synchronous reads), data generation, reference result and cycle
// measurements.  Pulse go with n and mode set (mode 0: small integers, exact
// sums; mode 1: random doubles, relative tolerance); idle rises when the
// run has been checked.
module alg3_env
  import mm_pkg::*;
#(
  parameter int unsigned P       = 2,
  parameter int unsigned SQRT_M  = 4,
  parameter int unsigned N       = 8,
  parameter int unsigned LAT_MUL = 3,
  parameter int unsigned LAT_ADD = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  input  int   n,
  input  int   mode,
  output logic idle,
  output int   checks,
  output int   errors,
  output int   t_done,      // cycles from first slot in PE 0 to done
  output int   t_lastgen,   // cycle of the last final result of the last PE
  output int   buf_uses,    // cycles in which some CoutBuffer took a word
  output int   bank_swaps   // B row banks switched while computing
);
  localparam int unsigned AW = $clog2(N*N);

  fp_t A [N*N];
  fp_t B [N*N];
  fp_t C [N*N];

  logic start, busy, done;
  logic a_rd_en, b_rd_en, c_wr_en;
  logic [AW-1:0] a_rd_addr, b_rd_addr, c_wr_addr;
  fp_t a_rd_data, b_rd_data, c_wr_data;

  alg3_array #(.P(P), .SQRT_M(SQRT_M), .N(N), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD)) dut (
    .clk, .rst_n, .start, .cfg_n(idx_t'(n)), .busy, .done,
    .a_rd_en, .a_rd_addr, .a_rd_data,
    .b_rd_en, .b_rd_addr, .b_rd_data,
    .c_wr_en, .c_wr_addr, .c_wr_data
  );

  always_ff @(posedge clk) begin
    if (a_rd_en) a_rd_data <= A[a_rd_addr];
    if (b_rd_en) b_rd_data <= B[b_rd_addr];
    if (c_wr_en) C[c_wr_addr] <= c_wr_data;
  end

  int cyc, t0;
  logic seen, last_bank;
  logic [P-1:0] park;
  for (genvar k = 0; k < P; k++) begin : g_mon
    assign park[k] = dut.g_pe[k].u_pe.push_v[0];
  end
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
    if (!seen && dut.g_pe[0].u_pe.rr.valid) begin
      seen <= 1'b1;
      t0 <= cyc;
    end
    if (dut.g_pe[P-1].u_pe.fin) t_lastgen <= cyc - t0 + 1;
    if (park != '0) buf_uses <= buf_uses + 1;
    if (dut.g_pe[0].u_pe.issue) begin
      last_bank <= dut.g_pe[0].u_pe.rr.a_bank;
      if (dut.g_pe[0].u_pe.rr.a_bank != last_bank) bank_swaps <= bank_swaps + 1;
    end
    end
  end

  function automatic real relerr(real x, real y);
    real d, m;
    d = (x > y) ? x - y : y - x;
    m = (y < 0.0) ? -y : y;
    if (m < 1.0) m = 1.0;
    return d / m;
  endfunction

  initial begin
    cyc = 0; seen = 0; t0 = 0; t_lastgen = 0; buf_uses = 0; bank_swaps = 0; last_bank = 0;
    idle = 1; checks = 0; errors = 0; t_done = 0; start = 0;
    forever begin
      @(posedge clk iff go);
      idle = 0; checks = 0; errors = 0;
      for (int r = 0; r < int'(N); r++)
        for (int c = 0; c < int'(N); c++) begin
          if (mode == 0) begin
            A[r*N+c] = $realtobits(real'($signed($urandom_range(16)) - 8));
            B[r*N+c] = $realtobits(real'($signed($urandom_range(16)) - 8));
          end else begin
            A[r*N+c] = $realtobits((real'($urandom) / 4294967296.0) * 2.0 - 1.0);
            B[r*N+c] = $realtobits((real'($urandom) / 4294967296.0) * 2.0 - 1.0);
          end
          C[r*N+c] = 64'h7FF8_DEAD_0000_0000;
        end
      seen = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      @(posedge clk iff done);
      t_done = cyc - t0 + 1;
      @(negedge clk);
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          real ref_v, got;
          ref_v = 0.0;
          for (int k = 0; k < n; k++)
            ref_v += $bitstoreal(A[r*N+k]) * $bitstoreal(B[k*N+c]);
          got = $bitstoreal(C[r*N+c]);
          checks++;
          if ((mode == 0 && got != ref_v) || (mode != 0 && relerr(got, ref_v) > 1e-9)) begin
            errors++;
            if (errors < 10)
              $display("alg3_env P=%0d SQRT_M=%0d n=%0d: C[%0d][%0d] = %f, expected %f",
                       P, SQRT_M, n, r, c, got, ref_v);
          end
        end
      idle = 1;
    end
  end

endmodule
