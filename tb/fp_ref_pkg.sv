// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are converted to the simulator's double precision, the operation is
// carried out there, and the double result is rounded to single precision to
// nearest even by bit manipulation of the double. Because a double holds more
// than twice the bits of a single, this gives the correctly rounded single
// result of +, -, *, / and sqrt. Subnormals are flushed to zero on input and
// output, the same convention as the arithmetic units under test.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});
    if (f[30:23] == 8'hff) d = {f[31], 11'h7ff, f[22:0], 29'd0};
    else d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        up;
    d = $realtobits(r);
    if (d[62:52] == 11'h7ff) return (d[51:0] != 0) ? 32'h7fc0_0000 : {d[63], 31'h7f80_0000};
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    up = d[28] & ((|d[27:0]) | d[29]);
    m  = {2'b01, d[51:29]} + {24'd0, up};
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 31'h7f80_0000};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    if (a[30:0] == 0 && b[30:0] == 0 || a[30:23] == 0 && b[30:23] == 0)
      return {a[31] & b[31], 31'd0};
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return fadd(a, {~b[31], b[30:0]});
  endfunction
  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] fdiv(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) / f2r(b));
  endfunction
  function automatic logic [31:0] fsqrt(logic [31:0] a);
    if (a[30:23] == 0) return {a[31], 31'd0};
    return r2f($sqrt(f2r(a)));
  endfunction

  // Random normal number with exponent field in [emin, emax] and random sign.
  function automatic logic [31:0] rnd_fp(int emin, int emax);
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(emin + ($urandom % (emax - emin + 1)));
    return r;
  endfunction

endpackage
