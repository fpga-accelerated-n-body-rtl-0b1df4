// fp32_pkg: helpers shared by the single-precision arithmetic units.
//
// The units work on IEEE-754 binary32 with round-to-nearest-even. Subnormal
// numbers are not supported: a subnormal operand is read as zero of the same
// sign and a result that would be subnormal is flushed to zero. Infinities
// are propagated and every invalid operation returns the quiet NaN
// 0x7fc00000. This is the usual reduced form of floating point on FPGAs; the
// report only asks for single precision, the rest is this design's choice.
package fp32_pkg;

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  typedef struct packed {
    logic        sign;
    logic        is_zero;   // zero or subnormal
    logic        is_inf;
    logic        is_nan;
    logic [7:0]  exp;       // biased exponent
    logic [23:0] mant;      // with the hidden bit at position 23
  } fp_unpacked_t;

  function automatic fp_unpacked_t fp_unpack(logic [31:0] a);
    fp_unpacked_t u;
    u.sign    = a[31];
    u.exp     = a[30:23];
    u.is_zero = (a[30:23] == 8'd0);
    u.is_inf  = (a[30:23] == 8'hff) && (a[22:0] == 23'd0);
    u.is_nan  = (a[30:23] == 8'hff) && (a[22:0] != 23'd0);
    u.mant    = u.is_zero ? 24'd0 : {1'b1, a[22:0]};
    return u;
  endfunction

  // Round and pack. mant is normalised (bit 26 set) with bits 2..0 being the
  // guard, round and sticky bits; exp is the biased exponent of bit 26,
  // wide and signed so that overflow and underflow can be seen.
  function automatic logic [31:0] fp_round_pack(logic sign, logic signed [11:0] exp,
                                                 logic [26:0] mant);
    logic        up;
    logic [24:0] mr;
    logic signed [11:0] e;
    up = mant[2] & (mant[1] | mant[0] | mant[3]);
    mr = {1'b0, mant[26:3]} + {24'd0, up};
    e  = exp;
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 12'sd1;
    end
    if (e >= 12'sd255)     return {sign, 8'hff, 23'd0};
    else if (e <= 12'sd0)  return {sign, 31'd0};
    else                   return {sign, e[7:0], mr[22:0]};
  endfunction

  // Number of leading zeros of a 28-bit value (28 when it is zero).
  function automatic logic [4:0] lzc28(logic [27:0] v);
    logic [4:0] n;
    n = 5'd28;
    for (int i = 0; i < 28; i++)
      if (v[i]) n = 5'(27 - i);
    return n;
  endfunction

endpackage
