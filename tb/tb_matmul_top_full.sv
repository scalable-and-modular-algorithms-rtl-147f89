// End-to-end testbench of matmul_top as built by default (no parameter
// changed): Algorithm 1 with n = 20 on 20 PEs, Algorithm 2 with n = 24, r = 2
// on 12 PEs, Algorithm 3 with p = 8, sqrt(M) = 1024, n = 1024, all with the
// 8-stage multiplier and 11-stage adder, all started in the same cycle.
// Algorithms 1 and 2 run to completion and are checked in full, including
// the cycle of their last result.  A whole Algorithm 3 run takes
// sqrt(M) + n^3/p, about 134 million cycles, so it is followed for the
// first ALG3_WINDOW cycles: the B-row preload, the slot stream, the bank
// alternation and every update of the checked local-storage words, each
// compared with the partial sum it must hold.
module tb_matmul_top_full;
  import mm_pkg::*;
  localparam int ALG1_N = 20, ALG1_S = 20;
  localparam int ALG2_N = 24, ALG2_R = 2, ALG2_S = 12;
  localparam int ALG3_P = 8, ALG3_SM = 1024, ALG3_N = 1024;
  localparam int LM = 8, LA = 11;
  localparam int RUN2_1 = 0, RUN2_2 = 0, RUN2_3 = 0;
  localparam int SAMPLE3 = 0;
  localparam int ALG3_WINDOW = 3000000;
  localparam int WATCHDOG = 4000000;

  `include "matmul_top_tb_body.svh"

  matmul_top dut (.*);
endmodule
