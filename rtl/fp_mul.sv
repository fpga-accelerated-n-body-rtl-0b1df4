// fp_mul: single-precision floating-point multiplier, y = a * b.
//
// Combinational. The 24x24-bit mantissa product (48 bits) is normalised by
// at most one position, the low bits fold into guard/round/sticky, and the
// result is rounded to nearest even (fp32_pkg). Exponents are added with the
// bias removed; overflow gives infinity, underflow flushes to zero.
// 0 * inf is NaN. Only the precision comes from the report.
module fp_mul
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  fp_unpacked_t ua, ub;
  logic         s;
  logic [47:0]  p;
  logic [26:0]  mn;
  logic signed [11:0] e;

  always_comb begin
    ua = fp_unpack(a);
    ub = fp_unpack(b);
    s  = ua.sign ^ ub.sign;
    p  = ua.mant * ub.mant;
    e  = 12'(ua.exp) + 12'(ub.exp) - 12'sd127;
    if (p[47]) begin
      mn = {p[47:22], |p[21:0]};
      e  = e + 12'sd1;
    end else begin
      mn = {p[46:21], |p[20:0]};
    end

    if (ua.is_nan || ub.is_nan)                        y = QNAN;
    else if ((ua.is_inf && ub.is_zero) || (ub.is_inf && ua.is_zero)) y = QNAN;
    else if (ua.is_inf || ub.is_inf)                   y = {s, 31'h7f80_0000};
    else if (ua.is_zero || ub.is_zero)                 y = {s, 31'd0};
    else                                               y = fp_round_pack(s, e, mn);
  end

endmodule
