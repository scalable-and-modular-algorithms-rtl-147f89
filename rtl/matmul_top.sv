// Top level: the three floating-point matrix multipliers side by side.
//
//   alg1_*  Algorithm 1: a line of (N/1)^2/S PEs with one multiplier-adder
//           each; optimal Theta(n^2) latency with 3 words of I/O per cycle.
//           Default N = 20, S = 20: 20 PEs, the largest Algorithm 1 array
//           reported for the target FPGA with least-compliant units.
//   alg2_*  Algorithm 2: the same line with r = 2 lanes and 4 MACs per PE;
//           about 1/r of the latency for 3r words of I/O per cycle.
//           Default N = 24, r = 2, S = 12: 12 PEs (N/r must exceed the
//           11-stage adder, see the README).
//   alg3_*  Algorithm 3: p = 8 PEs multiplying sqrt(M) x sqrt(M) blocks with
//           M = 1024^2 words of storage; Theta(n^3/p) latency with the
//           least memory bandwidth for that storage.
//
// The three arrays are independent; each has its own start/done handshake,
// run-time problem size and external-memory ports (row-major matrices with
// the build's N as row pitch, one-cycle synchronous reads).  All use the
// least-compliant double-precision units (8-stage multiplier, 11-stage
// adder).  Only neighbouring PEs are connected in every array.
module matmul_top
  import mm_pkg::*;
#(
  parameter int unsigned ALG1_N      = 20,
  parameter int unsigned ALG1_S      = 20,
  parameter int unsigned ALG2_N      = 24,
  parameter int unsigned ALG2_R      = 2,
  parameter int unsigned ALG2_S      = 12,
  parameter int unsigned ALG3_P      = 8,
  parameter int unsigned ALG3_SQRT_M = 1024,
  parameter int unsigned ALG3_N      = 1024,
  parameter int unsigned LAT_MUL     = 8,
  parameter int unsigned LAT_ADD     = 11,
  localparam int unsigned AW1 = $clog2(ALG1_N*ALG1_N),
  localparam int unsigned AW2 = $clog2(ALG2_N*ALG2_N),
  localparam int unsigned AW3 = $clog2(ALG3_N*ALG3_N)
) (
  input  logic           clk,
  input  logic           rst_n,
  // Algorithm 1
  input  logic           alg1_start,
  input  idx_t           alg1_n,
  output logic           alg1_busy,
  output logic           alg1_done,
  output logic           alg1_a_rd_en,
  output logic [AW1-1:0] alg1_a_rd_addr,
  input  fp_t            alg1_a_rd_data,
  output logic           alg1_b_rd_en,
  output logic [AW1-1:0] alg1_b_rd_addr,
  input  fp_t            alg1_b_rd_data,
  output logic           alg1_c_wr_en,
  output logic [AW1-1:0] alg1_c_wr_addr,
  output fp_t            alg1_c_wr_data,
  // Algorithm 2 (ALG2_R ports of each kind)
  input  logic              alg2_start,
  input  idx_t              alg2_n,
  output logic              alg2_busy,
  output logic              alg2_done,
  output logic              alg2_a_rd_en,
  output logic [AW2-1:0]    alg2_a_rd_addr [ALG2_R],
  input  fp_t               alg2_a_rd_data [ALG2_R],
  output logic              alg2_b_rd_en,
  output logic [AW2-1:0]    alg2_b_rd_addr [ALG2_R],
  input  fp_t               alg2_b_rd_data [ALG2_R],
  output logic [ALG2_R-1:0] alg2_c_wr_en,
  output logic [AW2-1:0]    alg2_c_wr_addr [ALG2_R],
  output fp_t               alg2_c_wr_data [ALG2_R],
  // Algorithm 3
  input  logic           alg3_start,
  input  idx_t           alg3_n,
  output logic           alg3_busy,
  output logic           alg3_done,
  output logic           alg3_a_rd_en,
  output logic [AW3-1:0] alg3_a_rd_addr,
  input  fp_t            alg3_a_rd_data,
  output logic           alg3_b_rd_en,
  output logic [AW3-1:0] alg3_b_rd_addr,
  input  fp_t            alg3_b_rd_data,
  output logic           alg3_c_wr_en,
  output logic [AW3-1:0] alg3_c_wr_addr,
  output fp_t            alg3_c_wr_data
);

  logic [AW1-1:0] a1_addr [1], b1_addr [1], c1_addr [1];
  fp_t            a1_data [1], b1_data [1], c1_data [1];

  assign a1_data[0]     = alg1_a_rd_data;
  assign b1_data[0]     = alg1_b_rd_data;
  assign alg1_a_rd_addr = a1_addr[0];
  assign alg1_b_rd_addr = b1_addr[0];
  assign alg1_c_wr_addr = c1_addr[0];
  assign alg1_c_wr_data = c1_data[0];

  mm_array #(.R(1), .N(ALG1_N), .S(ALG1_S), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD)) u_alg1 (
    .clk, .rst_n,
    .start    (alg1_start),
    .cfg_n    (alg1_n),
    .busy     (alg1_busy),
    .done     (alg1_done),
    .a_rd_en  (alg1_a_rd_en),
    .a_rd_addr(a1_addr),
    .a_rd_data(a1_data),
    .b_rd_en  (alg1_b_rd_en),
    .b_rd_addr(b1_addr),
    .b_rd_data(b1_data),
    .c_wr_en  (alg1_c_wr_en),
    .c_wr_addr(c1_addr),
    .c_wr_data(c1_data)
  );

  mm_array #(.R(ALG2_R), .N(ALG2_N), .S(ALG2_S), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD)) u_alg2 (
    .clk, .rst_n,
    .start    (alg2_start),
    .cfg_n    (alg2_n),
    .busy     (alg2_busy),
    .done     (alg2_done),
    .a_rd_en  (alg2_a_rd_en),
    .a_rd_addr(alg2_a_rd_addr),
    .a_rd_data(alg2_a_rd_data),
    .b_rd_en  (alg2_b_rd_en),
    .b_rd_addr(alg2_b_rd_addr),
    .b_rd_data(alg2_b_rd_data),
    .c_wr_en  (alg2_c_wr_en),
    .c_wr_addr(alg2_c_wr_addr),
    .c_wr_data(alg2_c_wr_data)
  );

  alg3_array #(.P(ALG3_P), .SQRT_M(ALG3_SQRT_M), .N(ALG3_N),
               .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD)) u_alg3 (
    .clk, .rst_n,
    .start    (alg3_start),
    .cfg_n    (alg3_n),
    .busy     (alg3_busy),
    .done     (alg3_done),
    .a_rd_en  (alg3_a_rd_en),
    .a_rd_addr(alg3_a_rd_addr),
    .a_rd_data(alg3_a_rd_data),
    .b_rd_en  (alg3_b_rd_en),
    .b_rd_addr(alg3_b_rd_addr),
    .b_rd_data(alg3_b_rd_data),
    .c_wr_en  (alg3_c_wr_en),
    .c_wr_addr(alg3_c_wr_addr),
    .c_wr_data(alg3_c_wr_data)
  );

endmodule
