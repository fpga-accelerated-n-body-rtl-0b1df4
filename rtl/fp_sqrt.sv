// fp_sqrt: single-precision floating-point square root, y = sqrt(a).
//
// Combinational. The mantissa is placed in a 54-bit radicand, shifted by 29
// or 30 places so that the unbiased exponent becomes even, and a
// digit-by-digit (restoring) integer square root gives a 27-bit root; a
// non-zero remainder sets the sticky bit, so rounding to nearest even is
// exact. sqrt(-0) = -0, sqrt of a negative number is NaN, sqrt(inf) = inf.
// Only the precision comes from the report.
module fp_sqrt
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  output logic [31:0] y
);

  fp_unpacked_t ua;
  logic signed [11:0] eu;     // unbiased exponent
  logic signed [11:0] e;
  logic [53:0]  rad;
  logic [26:0]  root;
  logic [29:0]  rem;
  logic [26:0]  mn;

  // Restoring square root: 27 result bits, two radicand bits per step.
  function automatic logic [56:0] isqrt54(logic [53:0] x);
    logic [26:0] q;
    logic [29:0] rm;
    logic [29:0] t;
    q  = 27'd0;
    rm = 30'd0;
    for (int i = 26; i >= 0; i--) begin
      rm = {rm[27:0], x[2*i+1], x[2*i]};
      t  = {1'b0, q, 2'b01};
      if (rm >= t) begin
        rm = rm - t;
        q  = {q[25:0], 1'b1};
      end else begin
        q  = {q[25:0], 1'b0};
      end
    end
    return {rm, q};
  endfunction

  always_comb begin
    ua  = fp_unpack(a);
    eu  = 12'(ua.exp) - 12'sd127;
    rad = eu[0] ? ({30'd0, ua.mant} << 30) : ({30'd0, ua.mant} << 29);
    {rem, root} = isqrt54(rad);
    e   = (eu >>> 1) + 12'sd127;
    mn  = {root[26:1], root[0] | (|rem)};

    if (ua.is_nan)                    y = QNAN;
    else if (ua.is_zero)              y = {ua.sign, 31'd0};
    else if (ua.sign)                 y = QNAN;
    else if (ua.is_inf)               y = 32'h7f80_0000;
    else                              y = fp_round_pack(1'b0, e, mn);
  end

endmodule
