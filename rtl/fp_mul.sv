// Double-precision floating-point multiplier, "least-compliant" flavour.
//
// Computes a*b for IEEE-754 binary64 operands with these simplifications,
// which are the ones listed for the least-compliant units: the only rounding
// mode is round toward zero (the 106-bit significand product is truncated),
// denormal inputs are read as zero and denormal results are flushed to zero,
// no exception flags are produced and NaN/infinity are not handled (an
// operand with the all-ones exponent is treated as an ordinary large number;
// a result that overflows saturates to the largest finite magnitude, which is
// what round toward zero gives).
//
// Interface: in_valid/a/b are sampled every cycle; out_valid/y appear LAT
// cycles later (LAT = 8 by default, the pipeline depth given for the
// least-compliant multiplier).  The arithmetic is done in the first stage and
// the remaining LAT-1 register stages are a plain delay line, left for
// register retiming by synthesis; how the stages are cut is this design's
// choice.  Fully pipelined: one new operation per cycle.
module fp_mul
  import mm_pkg::*;
#(
  parameter int unsigned LAT = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fp_t  a,
  input  fp_t  b,
  output logic out_valid,
  output fp_t  y
);

  logic        sa, sb;
  logic [10:0] ea, eb;
  logic [52:0] ma, mb;
  logic [105:0] prod;
  logic signed [13:0] exp_sum;
  logic signed [13:0] exp_n;
  logic [51:0] frac_n;
  fp_t res;

  always_comb begin
    sa = a[63];
    sb = b[63];
    ea = a[62:52];
    eb = b[62:52];
    ma = {1'b1, a[51:0]};
    mb = {1'b1, b[51:0]};
    prod = ma * mb;
    exp_sum = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 14'sd1023;
    if (prod[105]) begin
      exp_n  = exp_sum + 14'sd1;
      frac_n = prod[104:53];
    end else begin
      exp_n  = exp_sum;
      frac_n = prod[103:52];
    end
    if (ea == 11'd0 || eb == 11'd0 || exp_n <= 14'sd0) begin
      res = {sa ^ sb, 63'd0};                        // zero / flush to zero
    end else if (exp_n >= 14'sd2047) begin
      res = {sa ^ sb, 11'h7FE, {52{1'b1}}};          // saturate (RZ overflow)
    end else begin
      res = {sa ^ sb, exp_n[10:0], frac_n};
    end
  end

  logic [LAT-1:0] v_q;
  fp_t            d_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    d_q[0] <= res;
    for (int s = 1; s < LAT; s++) d_q[s] <= d_q[s-1];
  end

  assign out_valid = v_q[LAT-1];
  assign y         = d_q[LAT-1];

  initial assert (LAT >= 2) else $error("fp_mul: LAT must be at least 2");

endmodule
