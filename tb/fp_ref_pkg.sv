// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are widened to double precision, combined with the simulator's own
// real arithmetic and rounded back to single precision by to_f32 below, with
// the same flush-to-zero and special-value rules the RTL uses. A double
// product of two singles is exact; a double sum rounded again to single is
// still correctly rounded because 53 >= 2*24+2. So these results are
// independent of the RTL's shift/normalise/round datapath.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic bit is_nan(logic [31:0] v);
    return (v[30:23] == 8'hFF) && (v[22:0] != 0);
  endfunction

  function automatic bit is_inf(logic [31:0] v);
    return (v[30:23] == 8'hFF) && (v[22:0] == 0);
  endfunction

  function automatic bit is_zero(logic [31:0] v);
    return v[30:23] == 8'd0;   // zero or subnormal (read as zero)
  endfunction

  // Single to double; subnormals read as a signed zero.
  function automatic real to_real(logic [31:0] v);
    logic [63:0] d;
    if (is_zero(v)) d = {v[31], 63'd0};
    else            d = {v[31], 11'(int'(v[30:23]) + 896), v[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Double to single, round to nearest even, flush below 2^-126, saturate to
  // infinity above the largest finite value.
  function automatic logic [31:0] to_f32(real r);
    logic [63:0] d;
    logic [52:0] sig;
    logic [24:0] m;
    int          e;
    bit          g, st;
    d = $realtobits(r);
    if (d[62:52] == 0) return {d[63], 31'd0};
    sig = {1'b1, d[51:0]};
    e   = int'(d[62:52]) - 1023 + 127;
    m   = {1'b0, sig[52:29]};
    g   = sig[28];
    st  = |sig[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    logic s;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_inf(b) && is_zero(a))) return QNAN;
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 23'd0};
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    return to_f32(to_real(a) * to_real(b));
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    real r;
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(b)) return (a[31] == b[31]) ? a : QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a) && is_zero(b)) return {a[31] & b[31], 31'd0};
    if (is_zero(a)) return b;
    if (is_zero(b)) return a;
    r = to_real(a) + to_real(b);
    if (r == 0.0) return 32'd0;
    return to_f32(r);
  endfunction

  // Random normal number with an exponent field in [elo, ehi].
  function automatic logic [31:0] rand_f32(int elo, int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
