// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Works through the simulator's double-precision `real`: a single-precision
// operand converts to double exactly, the exact sum or product of two
// single-precision values is rounded once to double, and is then rounded to
// single precision (nearest, ties to even) here. Rounding twice this way
// equals rounding once for + and *, because double carries more than twice
// the single-precision significand plus two bits. The conventions match the
// arithmetic under test: subnormals read as zero and are flushed to a
// signed zero, overflow gives infinity, invalid operations give 7FC00000.
package fp_ref_pkg;

  function automatic logic is_nan(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 23'd0);
  endfunction

  function automatic logic is_inf(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 23'd0);
  endfunction

  function automatic logic is_zero(logic [31:0] x);
    return x[30:23] == 8'd0;
  endfunction

  // single (normal or zero) to double
  function automatic real sp_to_real(logic [31:0] x);
    logic [63:0] d;
    if (is_zero(x)) d = {x[31], 63'd0};
    else d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // double to single, nearest-even, flush-to-zero, overflow to infinity
  function automatic logic [31:0] real_to_sp(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      e = e + 1;
      m = m >> 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && a[31] != b[31]))
      return 32'h7FC0_0000;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    return real_to_sp(sp_to_real(a) + sp_to_real(b));
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_inf(b) && is_zero(a)))
      return 32'h7FC0_0000;
    if (is_inf(a) || is_inf(b)) return {a[31] ^ b[31], 8'hFF, 23'd0};
    return real_to_sp(sp_to_real(a) * sp_to_real(b));
  endfunction

  // random normal number with a biased exponent in [emin, emax]
  function automatic logic [31:0] rand_sp(int emin, int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // a float that is exactly a small integer (for readable directed tests)
  function automatic logic [31:0] sp_of(real r);
    return real_to_sp(r);
  endfunction

endpackage
