// fp_div: single-precision floating-point divider, y = a / b.
//
// Combinational. A restoring division of the two 24-bit mantissas produces
// 28 quotient bits (one integer bit and 27 fraction bits, i.e. the dividend
// shifted left by 27 places over the divisor); the quotient has 27 or 28
// significant bits and a non-zero final remainder sets the sticky bit, so
// rounding to nearest even (fp32_pkg) is exact. x/0 is a signed infinity, 0/0 and inf/inf are NaN.
// The kernel uses it once per particle pair to form G*m/r^3. Only the
// precision comes from the report; a synthesis flow would pipeline or
// iterate this divider.
module fp_div
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  fp_unpacked_t ua, ub;
  logic         s;
  logic [27:0]  q;
  logic [25:0]  r;

  // Restoring division: one quotient bit per step, a 26-bit partial remainder.
  function automatic logic [53:0] mant_div(logic [23:0] n, logic [23:0] d);
    logic [25:0] rm;
    logic [27:0] qq;
    rm = {2'b00, n};
    qq = '0;
    for (int i = 27; i >= 0; i--) begin
      if (rm >= {2'b00, d}) begin
        rm = rm - {2'b00, d};
        qq[i] = 1'b1;
      end
      rm = {rm[24:0], 1'b0};
    end
    return {rm, qq};
  endfunction

  logic [26:0]  mn;
  logic signed [11:0] e;

  always_comb begin
    ua  = fp_unpack(a);
    ub  = fp_unpack(b);
    s   = ua.sign ^ ub.sign;
    if (ub.is_zero) begin
      q = 28'd0;
      r = 26'd0;
    end else begin
      {r, q} = mant_div(ua.mant, ub.mant);
    end
    e = 12'(ua.exp) - 12'(ub.exp) + 12'sd127;
    if (q[27]) begin
      mn = {q[27:2], (|q[1:0]) | (|r)};
    end else begin
      mn = {q[26:1], q[0] | (|r)};
      e  = e - 12'sd1;
    end

    if (ua.is_nan || ub.is_nan)                         y = QNAN;
    else if ((ua.is_inf && ub.is_inf) || (ua.is_zero && ub.is_zero)) y = QNAN;
    else if (ua.is_inf || ub.is_zero)                   y = {s, 31'h7f80_0000};
    else if (ua.is_zero || ub.is_inf)                   y = {s, 31'd0};
    else                                                y = fp_round_pack(s, e, mn);
  end

endmodule
