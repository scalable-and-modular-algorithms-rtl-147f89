// End-to-end testbench of matmul_top at reduced sizes, with the document's
// 8-stage multiplier and 11-stage adder:
//   Algorithm 1: N = 16, s = 16 -> 16 PEs; second run n = 12
//   Algorithm 2: N = 28, r = 2, s = 14 -> 14 PEs; second run n = 24
//   Algorithm 3: p = 2, sqrt(M) = 16, N = 32 (2 x 2 x 2 block products);
//                second run n = 16
// The common body (tb/matmul_top_tb_body.svh) describes the checks.
module tb_matmul_top;
  import mm_pkg::*;
  localparam int ALG1_N = 16, ALG1_S = 16;
  localparam int ALG2_N = 28, ALG2_R = 2, ALG2_S = 14;
  localparam int ALG3_P = 2, ALG3_SM = 16, ALG3_N = 32;
  localparam int LM = 8, LA = 11;
  localparam int RUN2_1 = 12, RUN2_2 = 24, RUN2_3 = 16;
  localparam int SAMPLE3 = 0;
  localparam int ALG3_WINDOW = 0;
  localparam int WATCHDOG = 200000;

  `include "matmul_top_tb_body.svh"

  matmul_top #(
    .ALG1_N(ALG1_N), .ALG1_S(ALG1_S),
    .ALG2_N(ALG2_N), .ALG2_R(ALG2_R), .ALG2_S(ALG2_S),
    .ALG3_P(ALG3_P), .ALG3_SQRT_M(ALG3_SM), .ALG3_N(ALG3_N),
    .LAT_MUL(LM), .LAT_ADD(LA)
  ) dut (.*);
endmodule
