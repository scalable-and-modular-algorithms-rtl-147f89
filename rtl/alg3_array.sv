// Algorithm 3 linear array: stream controller plus P processing elements.
//
// Multiplies n x n double-precision matrices (n a multiple of SQRT_M, at
// most N) with P PEs and a total local storage of M = SQRT_M^2 words, by
// block matrix multiplication with sqrt(M) x sqrt(M) blocks.  The PEs form a
// line: slots of A/B data move right, final C elements move left, and PE 0
// talks to the controller, which owns the external-memory port.  On average
// the array reads two words and writes one every sqrt(M)/p cycles, the
// bandwidth that the storage lower bound allows for this M and p.
//
// Defaults follow the Cray XD1 configuration: p = 8 PEs, M = 1024^2 words,
// n = 1024, least-compliant floating-point units (8-stage multiplier,
// 11-stage adder).  The streaming part of a run lasts
// sqrt(M) + n^3/p cycles; see alg3_ctrl and alg3_pe for the details.
module alg3_array
  import mm_pkg::*;
#(
  parameter int unsigned P       = 8,
  parameter int unsigned SQRT_M  = 1024,
  parameter int unsigned N       = 1024,
  parameter int unsigned LAT_MUL = 8,
  parameter int unsigned LAT_ADD = 11,
  localparam int unsigned AW = $clog2(N*N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  idx_t          cfg_n,
  output logic          busy,
  output logic          done,
  output logic          a_rd_en,
  output logic [AW-1:0] a_rd_addr,
  input  fp_t           a_rd_data,
  output logic          b_rd_en,
  output logic [AW-1:0] b_rd_addr,
  input  fp_t           b_rd_data,
  output logic          c_wr_en,
  output logic [AW-1:0] c_wr_addr,
  output fp_t           c_wr_data
);

  slot_t    s_w [P+1];
  c3_word_t c_w [P+1];

  assign c_w[P] = '0;

  alg3_ctrl #(.P(P), .SQRT_M(SQRT_M), .N(N)) u_ctrl (
    .clk, .rst_n, .start, .cfg_n, .busy, .done,
    .a_rd_en, .a_rd_addr, .a_rd_data,
    .b_rd_en, .b_rd_addr, .b_rd_data,
    .c_wr_en, .c_wr_addr, .c_wr_data,
    .s_first (s_w[0]),
    .c_last  (c_w[0])
  );

  for (genvar k = 0; k < P; k++) begin : g_pe
    alg3_pe #(.P(P), .SQRT_M(SQRT_M), .IDX(k), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD)) u_pe (
      .clk, .rst_n,
      .s_in  (s_w[k]),
      .s_out (s_w[k+1]),
      .c_in  (c_w[k+1]),
      .c_out (c_w[k])
    );
  end

  initial assert (N % SQRT_M == 0 && N < (1 << IDX_W))
    else $error("alg3_array: N must be a multiple of SQRT_M and fit the index tags");

endmodule
