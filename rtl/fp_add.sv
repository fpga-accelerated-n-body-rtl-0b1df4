// fp_add: single-precision floating-point adder, y = a + b (or a - b).
//
// Combinational. The operand of larger magnitude is taken as the base; the
// other mantissa is shifted right into three extra guard/round/sticky bits,
// added or subtracted, renormalised with a leading-zero count, then rounded
// to nearest even (fp32_pkg). Subtraction is addition with the sign of b
// flipped, selected by `sub`. An exact zero sum is +0 unless both operands
// are -0. Subnormals are flushed to zero as described in fp32_pkg.
// The report states only that the kernel computes in single precision;
// the structure of the unit is this design's own.
module fp_add
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);

  fp_unpacked_t ua, ub, bgr, sml;
  logic         sb_eff;
  logic [7:0]   d;
  logic [27:0]  mb_sh;     // 24 mantissa bits + 3 guard bits, one carry bit on top
  logic [27:0]  mbig;
  logic [27:0]  s;
  logic [4:0]   lz;
  logic signed [11:0] e;
  logic [26:0]  mn;
  logic         sticky;

  always_comb begin
    sticky = 1'b0;
    ua = fp_unpack(a);
    ub = fp_unpack(b);
    sb_eff = b[31] ^ sub;
    ub.sign = sb_eff;
    if ({ub.exp, ub.mant} > {ua.exp, ua.mant}) begin
      bgr = ub; sml = ua;
    end else begin
      bgr = ua; sml = ub;
    end
    d = bgr.exp - sml.exp;
    mbig = {1'b0, bgr.mant, 3'b000};
    if (sml.is_zero) begin
      mb_sh = 28'd0;
    end else if (d >= 8'd27) begin
      mb_sh = 28'd1;                                  // only the sticky bit survives
    end else begin
      mb_sh  = {1'b0, sml.mant, 3'b000} >> d;
      sticky = |(({1'b0, sml.mant, 3'b000}) & ((28'd1 << d) - 28'd1));
      mb_sh[0] = mb_sh[0] | sticky;
    end
    if (bgr.sign == sml.sign) s = mbig + mb_sh;
    else                        s = mbig - mb_sh;
    lz = lzc28(s);
    e  = 12'(bgr.exp);
    mn = 27'd0;
    if (s[27]) begin
      mn = {s[27:2], s[1] | s[0]};
      e  = e + 12'sd1;
    end else begin
      mn = 27'(s << (lz - 5'd1));
      e  = e - 12'(lz - 5'd1);
    end

    if (ua.is_nan || ub.is_nan)                       y = QNAN;
    else if (ua.is_inf && ub.is_inf)                  y = (ua.sign == ub.sign) ? {ua.sign, 31'h7f80_0000} : QNAN;
    else if (ua.is_inf)                               y = {ua.sign, 31'h7f80_0000};
    else if (ub.is_inf)                               y = {ub.sign, 31'h7f80_0000};
    else if (ua.is_zero && ub.is_zero)                y = {ua.sign & ub.sign, 31'd0};
    else if (s == 28'd0)                              y = 32'd0;
    else                                              y = fp_round_pack(bgr.sign, e, mn);
  end

endmodule
