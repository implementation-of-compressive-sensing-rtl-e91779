// fp_add: combinational IEEE-754 single-precision adder.
//
// The accumulating operator of a row lane of the matrix multiplication core.
// The operand of larger magnitude is kept as is; the other is aligned to it by
// a right shift that folds the bits shifted out into a sticky bit. Both
// significands carry three extra bits (guard, round, sticky). After the add
// or subtract the sum is normalised (one place right, or left by the leading
// zero count) and rounded to nearest, ties to even.
//
// Number handling is this design's own choice, since the original design uses a
// vendor floating-point operator without describing it:
//   * subnormal inputs are read as zero, subnormal results flush to a zero
//     that keeps the sign of the result;
//   * an exact cancellation gives +0; (-0) + (-0) gives -0;
//   * overflow gives a signed infinity;
//   * any NaN input, or the sum of opposite infinities, gives 0x7FC00000.
//
// Interface: a, b in, s out, all float32. No clock.
module fp_add
  import mmult_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t s
);

  // Operands ordered so that x has the larger magnitude.
  float32_t    x, y;
  logic        sx, sy, sub;
  logic [7:0]  ex, ey;
  logic        x_zero, y_zero, a_inf, b_inf, a_nan, b_nan;
  logic [7:0]  d;                 // exponent difference
  logic [26:0] mx, my, my_sh;     // {hidden, 23 fraction, guard, round, sticky}
  logic        sh_sticky;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic signed [10:0] exp_n;
  logic [26:0] norm;
  logic        round_up;
  logic [24:0] mant_r;
  logic        found;

  always_comb begin
    a_inf = (a[30:23] == 8'hFF) && (a[22:0] == '0);
    b_inf = (b[30:23] == 8'hFF) && (b[22:0] == '0);
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != '0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != '0);

    // Flush subnormal inputs to zero before ordering.
    x = (a[30:23] == 8'd0) ? {a[31], 31'd0} : a;
    y = (b[30:23] == 8'd0) ? {b[31], 31'd0} : b;
    if (y[30:0] > x[30:0]) begin
      x = (b[30:23] == 8'd0) ? {b[31], 31'd0} : b;
      y = (a[30:23] == 8'd0) ? {a[31], 31'd0} : a;
    end

    sx = x[31];  ex = x[30:23];
    sy = y[31];  ey = y[30:23];
    x_zero = (ex == 8'd0);
    y_zero = (ey == 8'd0);
    sub    = sx ^ sy;

    mx = {~x_zero, x[22:0], 3'b000};
    my = {~y_zero, y[22:0], 3'b000};
    d  = ex - ey;

    // Align y: right shift by d, bits shifted out collapse into the sticky bit.
    if (d >= 8'd27) begin
      my_sh     = '0;
      sh_sticky = (my != '0);
    end else begin
      my_sh     = my >> d;
      sh_sticky = ((my & ((27'd1 << d) - 27'd1)) != '0);
    end
    my_sh[0] = my_sh[0] | sh_sticky;

    exp_n = 11'(signed'({3'b000, ex}));
    if (sub) sum = {1'b0, mx} - {1'b0, my_sh};
    else     sum = {1'b0, mx} + {1'b0, my_sh};

    // Normalise.
    lz    = '0;
    found = 1'b0;
    if (sum[27]) begin
      norm  = sum[27:1];
      norm[0] = norm[0] | sum[0];
      exp_n = exp_n + 11'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      norm  = sum[26:0] << lz;
      exp_n = exp_n - 11'(lz);
    end

    // Round to nearest, ties to even.
    round_up = norm[2] && (norm[1] || norm[0] || norm[3]);
    mant_r   = {1'b0, norm[26:3]} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_n  = exp_n + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]))) begin
      s = FP_QNAN;
    end else if (a_inf) begin
      s = a;
    end else if (b_inf) begin
      s = b;
    end else if (x_zero && y_zero) begin
      s = {sx & sy, 31'd0};
    end else if (y_zero) begin
      s = x;
    end else if (sum == '0) begin
      s = 32'd0;
    end else if (exp_n >= 11'sd255) begin
      s = {sx, 8'hFF, 23'd0};
    end else if (exp_n <= 11'sd0) begin
      s = {sx, 31'd0};
    end else begin
      s = {sx, exp_n[7:0], mant_r[22:0]};
    end
  end

endmodule
