// Test environment for one Algorithm 1/2 linear array: external memory
// model (synchronous read, one cycle), data generation, reference result and
// cycle measurements.  Used by the array and top-level testbenches.
//
// Pulse go with n and mode set; the environment fills A and B (mode 0:
// small integers, so every sum is exact; mode 1: random doubles in [-1, 1),
// checked to a relative tolerance), starts the array, waits for done and
// compares all of C.  When finished, idle goes high with the counts.
module mm_env
  import mm_pkg::*;
#(
  parameter int unsigned R       = 1,
  parameter int unsigned N       = 4,
  parameter int unsigned S       = 2,
  parameter int unsigned LAT_MUL = 2,
  parameter int unsigned LAT_ADD = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  input  int   n,
  input  int   mode,
  output logic idle,
  output int   checks,
  output int   errors,
  output int   t_done,      // cycles from first B in PE 0 to done
  output int   t_lastgen,   // cycle of the last final result of the last PE
  output int   buf_uses     // cycles in which a CoutBuffer took a word
);
  localparam int unsigned AW = $clog2(N*N);
  localparam int unsigned NPE = (N/R)*(N/R)/S;

  fp_t A [N*N];
  fp_t B [N*N];
  fp_t C [N*N];

  logic start;
  logic busy, done;
  logic a_rd_en, b_rd_en;
  logic [AW-1:0] a_rd_addr [R], b_rd_addr [R], c_wr_addr [R];
  fp_t a_rd_data [R], b_rd_data [R], c_wr_data [R];
  logic [R-1:0] c_wr_en;

  mm_array #(.R(R), .N(N), .S(S), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD)) dut (
    .clk, .rst_n, .start, .cfg_n(idx_t'(n)), .busy, .done,
    .a_rd_en, .a_rd_addr, .a_rd_data,
    .b_rd_en, .b_rd_addr, .b_rd_data,
    .c_wr_en, .c_wr_addr, .c_wr_data
  );

  always_ff @(posedge clk) begin
    for (int g = 0; g < int'(R); g++) begin
      if (a_rd_en) a_rd_data[g] <= A[a_rd_addr[g]];
      if (b_rd_en) b_rd_data[g] <= B[b_rd_addr[g]];
      if (c_wr_en[g]) C[c_wr_addr[g]] <= c_wr_data[g];
    end
  end

  // cycle bookkeeping
  int cyc, t0;
  logic seen_b;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
    if (!seen_b && dut.g_pe[0].u_pe.rr_b[0].valid) begin
      seen_b <= 1'b1;
      t0 <= cyc;
    end
    if (dut.g_pe[NPE-1].u_pe.fin) t_lastgen <= cyc - t0 + 1;
    end
  end

  // CoutBuffer activity: count words parked by any PE (lane 0).
  logic [NPE-1:0] park;
  for (genvar l = 0; l < NPE; l++) begin : g_mon
    assign park[l] = |dut.g_pe[l].u_pe.g_lane[0].push_v;
  end
  always_ff @(posedge clk) if (rst_n && park != '0) buf_uses <= buf_uses + 1;

  function automatic real relerr(real x, real y);
    real d, m;
    d = (x > y) ? x - y : y - x;
    m = (y < 0.0) ? -y : y;
    if (m < 1.0) m = 1.0;
    return d / m;
  endfunction

  initial begin
    cyc = 0; seen_b = 0; t0 = 0; t_lastgen = 0; buf_uses = 0;
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
      seen_b = 0;
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
          if ((mode == 0 && got != ref_v) || (mode != 0 && relerr(got, ref_v) > 1e-12)) begin
            errors++;
            if (errors < 10)
              $display("mm_env R=%0d N=%0d n=%0d: C[%0d][%0d] = %f, expected %f",
                       R, N, n, r, c, got, ref_v);
          end
        end
      idle = 1;
    end
  end

endmodule
