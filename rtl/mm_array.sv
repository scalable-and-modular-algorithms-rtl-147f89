// Linear array for Algorithm 1 (R = 1) and Algorithm 2 (R = r > 1):
// stream controller plus a chain of NPE processing elements.
//
// Computes C = A x B for n x n double-precision matrices held in external
// memory.  NPE = (N/R)^2 / S PEs are connected in a line; only neighbours
// talk.  A and B enter at PE 0 and move right one PE per cycle; each PE keeps
// the B elements of its column and updates its S*R*R elements of C as the
// matching A elements pass; final C elements move left, one word per lane
// per cycle, and PE 0 hands them to the controller, which writes them back.
// The I/O bandwidth is 3R words per cycle (R of A, R of B, R of C).
//
// Parameters: N is the largest problem size the build supports (the
// run-time size cfg_n may be smaller, see mm_ctrl), S the words of storage
// per MAC, R the number of lanes (r of Algorithm 2; R = 1 is Algorithm 1),
// LAT_MUL/LAT_ADD the floating-point pipeline depths.  Defaults: N = 20,
// S = 20, R = 1, the 20-PE least-compliant Algorithm 1 configuration.
//
// Timing, cycles counted from the first cycle a B element is in PE 0's
// register (cycle 1): a_ik reaches PE l at cycle d + k*d + i + l + 1
// (d = n/R) and the final value of the last C element is on its PE's adder
// output at cycle n*d + NPE + d - 1 + LAT_MUL + LAT_ADD when every PE is used.
// All results have left PE 0 once n*n words have drained through the R
// result lanes.  The data-hazard rule requires d > LAT_ADD.
module mm_array
  import mm_pkg::*;
#(
  parameter int unsigned R       = 1,
  parameter int unsigned N       = 20,
  parameter int unsigned S       = 20,
  parameter int unsigned LAT_MUL = 8,
  parameter int unsigned LAT_ADD = 11,
  localparam int unsigned AW  = $clog2(N*N),
  localparam int unsigned D   = N / R,
  localparam int unsigned RG  = D / S,
  localparam int unsigned NPE = D * D / S
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  idx_t          cfg_n,
  output logic          busy,
  output logic          done,
  output logic          a_rd_en,
  output logic [AW-1:0] a_rd_addr [R],
  input  fp_t           a_rd_data [R],
  output logic          b_rd_en,
  output logic [AW-1:0] b_rd_addr [R],
  input  fp_t           b_rd_data [R],
  output logic [R-1:0]  c_wr_en,
  output logic [AW-1:0] c_wr_addr [R],
  output fp_t           c_wr_data [R]
);

  a_word_t a_w [NPE+1][R];
  b_word_t b_w [NPE+1][R];
  c_word_t c_w [NPE+1][R];
  idx_t    col_w [NPE+1];
  idx_t    grp_w [NPE+1];
  idx_t    cfg_d;

  assign col_w[0] = '0;
  assign grp_w[0] = '0;
  for (genvar g = 0; g < R; g++) begin : g_end
    assign c_w[NPE][g] = '0;
  end

  mm_ctrl #(.R(R), .N(N)) u_ctrl (
    .clk, .rst_n, .start, .cfg_n, .busy, .done, .cfg_d,
    .a_rd_en, .a_rd_addr, .a_rd_data,
    .b_rd_en, .b_rd_addr, .b_rd_data,
    .c_wr_en, .c_wr_addr, .c_wr_data,
    .a_first (a_w[0]),
    .b_first (b_w[0]),
    .c_last  (c_w[0])
  );

  for (genvar l = 0; l < NPE; l++) begin : g_pe
    mm_pe #(.R(R), .S(S), .RG(RG), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD)) u_pe (
      .clk, .rst_n,
      .cfg_d,
      .cfg_col_in (col_w[l]),
      .cfg_grp_in (grp_w[l]),
      .cfg_col_out(col_w[l+1]),
      .cfg_grp_out(grp_w[l+1]),
      .a_in  (a_w[l]),
      .b_in  (b_w[l]),
      .a_out (a_w[l+1]),
      .b_out (b_w[l+1]),
      .c_in  (c_w[l+1]),
      .c_out (c_w[l])
    );
  end

  initial begin
    assert (N % R == 0 && D % S == 0 && NPE >= 1)
      else $error("mm_array: N must be a multiple of R and N/R of S");
  end

  // Element index tags are IDX_W bits wide.
  initial assert (N < (1 << IDX_W)) else $error("mm_array: N too large");

endmodule
