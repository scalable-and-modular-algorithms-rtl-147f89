// Double-precision floating-point adder, "least-compliant" flavour.
//
// Computes a+b for IEEE-754 binary64 operands.  As for the least-compliant
// units, the only rounding mode is round toward zero, denormal inputs are
// read as zero and denormal results are flushed to zero, no exception flags
// are produced and NaN/infinity are not handled (overflow saturates to the
// largest finite magnitude, the round-toward-zero result).
//
// How it works: the operands are ordered by magnitude, the smaller
// significand is aligned with guard, round and sticky bits (the sticky bit
// collects everything shifted out), the significands are added or
// subtracted, the result is normalised with a leading-zero count and the
// bits below the 53-bit significand are dropped.  Exact cancellation gives
// +0.
//
// Interface: in_valid/a/b sampled every cycle; out_valid/y appear LAT cycles
// later (LAT = 11 by default, the depth given for the least-compliant
// adder).  The arithmetic is done in the first stage; the other stages are a
// delay line left for register retiming, which is this design's choice.
module fp_add
  import mm_pkg::*;
#(
  parameter int unsigned LAT = 11
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fp_t  a,
  input  fp_t  b,
  output logic out_valid,
  output fp_t  y
);

  fp_t res;

  always_comb begin
    logic        sx, sy, eff_sub;
    logic [10:0] ex, ey;
    logic [52:0] mx, my;
    logic [11:0] d;
    logic [5:0]  sh;
    logic [55:0] xe, ye, ysh, keep;
    logic [56:0] sum;
    logic [5:0]  lz;
    logic signed [13:0] e_r;
    logic [55:0] norm;
    logic        x_zero, y_zero, swap;

    // Order operands so that |x| >= |y|.
    swap = (b[62:0] > a[62:0]);
    sx = swap ? b[63] : a[63];
    sy = swap ? a[63] : b[63];
    ex = swap ? b[62:52] : a[62:52];
    ey = swap ? a[62:52] : b[62:52];
    mx = {1'b1, swap ? b[51:0] : a[51:0]};
    my = {1'b1, swap ? a[51:0] : b[51:0]};
    x_zero = (ex == 11'd0);
    y_zero = (ey == 11'd0);
    eff_sub = sx ^ sy;

    d  = {1'b0, ex} - {1'b0, ey};
    xe = {mx, 3'b000};
    ye = {my, 3'b000};
    // Align y; bits shifted out fold into the sticky bit.  A distance of
    // 56 or more shifts everything out.
    // The shifter is built from six fixed-distance steps, like the
    // normaliser below.
    sh   = (d >= 12'd56) ? 6'd56 : d[5:0];
    ysh  = ye;
    keep = {56{1'b1}};
    for (int st = 5; st >= 0; st--)
      if (sh[st]) begin
        ysh  = ysh >> (1 << st);
        keep = keep << (1 << st);
      end
    ysh[0] = ysh[0] | ((ye & ~keep) != 56'd0);

    sum = eff_sub ? ({1'b0, xe} - {1'b0, ysh}) : ({1'b0, xe} + {1'b0, ysh});

    // Leading-zero count and left shift in six halving steps.
    norm = sum[55:0];
    lz   = 6'd0;
    if (norm[55:24] == '0) begin norm = norm << 32; lz[5] = 1'b1; end
    if (norm[55:40] == '0) begin norm = norm << 16; lz[4] = 1'b1; end
    if (norm[55:48] == '0) begin norm = norm << 8;  lz[3] = 1'b1; end
    if (norm[55:52] == '0) begin norm = norm << 4;  lz[2] = 1'b1; end
    if (norm[55:54] == '0) begin norm = norm << 2;  lz[1] = 1'b1; end
    if (norm[55]    == '0) begin norm = norm << 1;  lz[0] = 1'b1; end

    if (sum[56]) begin
      norm = sum[56:1];
      e_r  = $signed({3'b000, ex}) + 14'sd1;
    end else begin
      e_r  = $signed({3'b000, ex}) - $signed({8'd0, lz});
    end

    if (x_zero && y_zero) begin
      res = {a[63] & b[63], 63'd0};
    end else if (y_zero) begin
      res = {sx, ex, mx[51:0]};                    // y is zero: result is x
    end else if (sum == 57'd0) begin
      res = 64'd0;                                 // exact cancellation
    end else if (e_r <= 14'sd0) begin
      res = {sx, 63'd0};                           // flush to zero
    end else if (e_r >= 14'sd2047) begin
      res = {sx, 11'h7FE, {52{1'b1}}};             // saturate
    end else begin
      res = {sx, e_r[10:0], norm[54:3]};           // truncate (RZ)
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

  initial assert (LAT >= 2) else $error("fp_add: LAT must be at least 2");

endmodule
