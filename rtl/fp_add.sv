// fp_add: floating-point adder/subtractor for the 32-bit word format of
// tdoa_pkg. Computes s = a + b, or a - b when sub is 1.
//
// Combinational: the operand of smaller magnitude is shifted right to the
// larger exponent (three guard bits kept), the significands are added or
// subtracted, and the result is renormalised by a leading-one search.
// Results are truncated, underflow flushes to zero and overflow saturates.
// The document names complex addition/subtraction units in the butterfly; the
// internals are this design's own.
module fp_add
  import tdoa_pkg::*;
(
  input  fp_t  a,
  input  fp_t  b,
  input  logic sub,
  output fp_t  s
);
  localparam int SW = MAN_W + 5;  // carry + hidden one + mantissa + 3 guard bits

  fp_t           hi, lo;
  logic          bsign;
  logic          lo_sign;
  logic [SW-1:0] mb, ms, sum;
  int            d, e, msb;

  always_comb begin
    e     = 0;
    msb   = -1;
    bsign = b.sign ^ sub;
    if ({a.exp, a.man} >= {b.exp, b.man}) begin
      hi   = a;  lo = b;  lo_sign = bsign;
    end else begin
      hi   = b;  hi.sign = bsign;  lo = a;  lo_sign = a.sign;
    end
    mb  = (hi.exp   == '0) ? '0 : {2'b01, hi.man, 3'b000};
    ms  = (lo.exp == '0) ? '0 : {2'b01, lo.man, 3'b000};
    d   = int'(hi.exp) - int'(lo.exp);
    ms  = (d >= SW) ? '0 : (ms >> d);
    sum = (hi.sign == lo_sign) ? (mb + ms) : (mb - ms);
    msb = -1;
    for (int i = 0; i < SW; i++)
      if (sum[i]) msb = i;
    s = FP_ZERO;
    if (msb >= 0) begin
      // leading one belongs at bit SW-2 for an unchanged exponent
      e   = int'(hi.exp) + msb - (SW - 2);
      sum = sum << (SW - 1 - msb);        // leading one to bit SW-1
      s.sign = hi.sign;
      s.man  = sum[SW-2 -: MAN_W];
      if (hi.exp == '0) begin
        s = FP_ZERO;
      end else if (e <= 0) begin
        s = FP_ZERO;
      end else if (e >= (1 << EXP_W)) begin
        s.exp = '1;
        s.man = '1;
      end else begin
        s.exp = EXP_W'(e);
      end
    end
  end
endmodule
