// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// One of the two arithmetic operators of a row lane of the matrix
// multiplication core (the other is fp_add). The product of the two 24-bit
// significands is formed exactly (48 bits), normalised by at most one place,
// and rounded to nearest, ties to even. Exponent is biased sum less the bias.
//
// Number handling is this design's own choice, since the original design uses a
// vendor floating-point operator without describing it:
//   * subnormal inputs are read as zero and subnormal results are flushed to
//     a signed zero (flush-to-zero, as common FPGA floating-point operators do);
//   * overflow gives a signed infinity;
//   * any NaN input, or infinity times zero, gives the quiet NaN 0x7FC00000.
//
// Interface: a, b in, p out, all float32. No clock: the caller registers the
// result (mmult_lane does so in its product stage).
module fp_mul
  import mmult_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t p
);

  logic        sa, sb, sp;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;       // 24-bit significand before rounding
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;     // after rounding, one carry bit
  logic signed [10:0] exp_n;
  logic signed [10:0] exp_r;

  always_comb begin
    sa = a[31];  ea = a[30:23];  fa = a[22:0];
    sb = b[31];  eb = b[30:23];  fb = b[22:0];
    sp = sa ^ sb;

    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);

    prod  = {1'b1, fa} * {1'b1, fb};
    exp_n = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'(FP_BIAS);

    // Normalise: the product of two values in [1,2) lies in [1,4).
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_n  = exp_n + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end

    // Round to nearest, ties to even.
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    exp_r    = exp_n;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_r + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      p = FP_QNAN;
    end else if (a_inf || b_inf) begin
      p = {sp, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      p = {sp, 31'd0};
    end else if (exp_r >= 11'sd255) begin
      p = {sp, 8'hFF, 23'd0};
    end else if (exp_r <= 11'sd0) begin
      p = {sp, 31'd0};
    end else begin
      p = {sp, exp_r[7:0], mant_r[22:0]};
    end
  end

endmodule
