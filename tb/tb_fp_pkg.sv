// tb_fp_pkg: reference conversions between IEEE-754 single-precision bit
// patterns and the simulator's double-precision 'real', for the testbenches.
// fp32_to_real reads subnormals as zero (as the design does); real_to_fp32
// rounds to nearest, ties to even, flushes results below the normal range to
// signed zero and saturates to infinity above it. Because the product of two
// single-precision numbers is exact in double precision, rounding the real
// product with real_to_fp32 gives the correctly rounded single result.
package tb_fp_pkg;

  function automatic real fp32_to_real(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_fp32(real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 24'd1;
    if (m[23]) begin
      e = e + 1;
      m = 24'd0;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Random normal single with exponent field in [emin, emax].
  function automatic logic [31:0] rand_fp32(int emin, int emax);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // Distance in units in the last place between two singles of the same sign.
  function automatic int ulp_diff(logic [31:0] a, logic [31:0] b);
    int d;
    if (a[31] != b[31]) return (a[30:0] == 0 && b[30:0] == 0) ? 0 : 1000000;
    d = int'(a[30:0]) - int'(b[30:0]);
    return d < 0 ? -d : d;
  endfunction

endpackage
