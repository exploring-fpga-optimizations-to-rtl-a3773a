// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are carried as IEEE-754 bit patterns and converted exactly to and
// from double precision. An operation is computed in double and rounded once
// to single precision, to nearest, ties to even. For +, -, * and / of two
// singles this double rounding gives the correctly rounded single result,
// since double carries more than 2*24+2 significand bits. Denormal results
// are flushed to zero, matching the units under test.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
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
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Random normal single with exponent field in [elo, ehi].
  function automatic logic [31:0] rand_f(int elo, int ehi);
    logic [7:0] e;
    e = 8'(elo + int'($urandom_range(0, ehi - elo)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
