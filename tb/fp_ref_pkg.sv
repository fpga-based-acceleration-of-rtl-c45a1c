// fp_ref_pkg: reference binary32 arithmetic for the testbenches.
//
// Operands are widened to double precision, the operation is done in
// double, and the result is rounded back to binary32 (nearest, ties to
// even) by bit manipulation of the double. For +, - and * on binary32
// operands this double rounding gives the correctly rounded binary32
// result. Results below the normal range are flushed to zero, as the
// hardware does. This path shares no code with the RTL.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [23:0] mt;
    logic [24:0] mr;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'd0) return 32'd0;
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    mt = m[52:29];
    g  = m[28];
    st = (m[27:0] != 0);
    mr = {1'b0, mt} + 25'(g && (st || mt[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e <= 0)   return 32'd0;
    if (e >= 255) return {s, 8'hff, 23'd0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] ref_sub(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] ref_abs(logic [31:0] a);
    return {1'b0, a[30:0]};
  endfunction

  // Equal as values: identical bits, or both zero whatever their signs.
  function automatic bit f32_same(logic [31:0] a, logic [31:0] b);
    return (a == b) || (a[30:0] == 0 && b[30:0] == 0);
  endfunction

  // Random binary32 with an exponent in [elo, ehi] (biased) and random sign
  // when neg is set.
  function automatic logic [31:0] rand_f32(int elo, int ehi, bit neg);
    logic [31:0] f;
    f[22:0]  = 23'($urandom);
    f[30:23] = 8'(elo + int'($urandom_range(0, ehi - elo)));
    f[31]    = neg ? 1'($urandom) : 1'b0;
    return f;
  endfunction

  // Binary32 nearest to a real value (for building stimuli).
  function automatic logic [31:0] real_to_f32(real r);
    return r2f(r);
  endfunction

endpackage
