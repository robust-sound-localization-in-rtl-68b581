// fp_mul: floating-point multiplier for the 32-bit word format of tdoa_pkg
// (sign, 6-bit exponent, 25-bit mantissa with a hidden one).
//
// Combinational: the 26x26-bit significand product lies in [1,4) and is
// normalised by at most one right shift; the exponents add and lose one bias.
// Results below the smallest normal flush to zero, above the largest saturate.
// The result is truncated. The document counts four floating-point
// multipliers, all used by the FFT butterfly; the rounding, underflow and
// overflow rules here are this design's own.
module fp_mul
  import tdoa_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t p
);
  logic [MAN_W:0]     sa, sb;
  logic [2*MAN_W+1:0] prod;
  int                 e;

  always_comb begin
    sa   = {1'b1, a.man};
    sb   = {1'b1, b.man};
    prod = sa * sb;
    e    = int'(a.exp) + int'(b.exp) - int'(EXP_BIAS);
    p    = FP_ZERO;
    if (a.exp != '0 && b.exp != '0) begin
      p.sign = a.sign ^ b.sign;
      if (prod[2*MAN_W+1]) begin
        e     = e + 1;
        p.man = prod[2*MAN_W -: MAN_W];
      end else begin
        p.man = prod[2*MAN_W-1 -: MAN_W];
      end
      if (e <= 0) begin
        p = FP_ZERO;
      end else if (e >= (1 << EXP_W)) begin
        p.exp = '1;
        p.man = '1;
      end else begin
        p.exp = EXP_W'(e);
      end
    end
  end
endmodule
