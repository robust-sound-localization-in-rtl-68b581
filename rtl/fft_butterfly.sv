// fft_butterfly: radix-2 decimation-in-time butterfly,
//   x = a + w*b,   y = a - w*b,
// on complex floating-point operands (tdoa_pkg word format).
//
// Built as in the document from one complex multiplier (four fp_mul and two
// fp_add) followed by two complex add/subtract units (four fp_add).
// Purely combinational; the FFT engine registers its operands and results.
module fft_butterfly
  import tdoa_pkg::*;
(
  input  fp_t ar, ai,
  input  fp_t br, bi,
  input  fp_t wr, wi,
  output fp_t xr, xi,
  output fp_t yr, yi
);
  fp_t p_rr, p_ii, p_ri, p_ir;
  fp_t tr, ti;

  // complex multiplier t = w * b
  fp_mul u_m0 (.a(wr), .b(br), .p(p_rr));
  fp_mul u_m1 (.a(wi), .b(bi), .p(p_ii));
  fp_mul u_m2 (.a(wr), .b(bi), .p(p_ri));
  fp_mul u_m3 (.a(wi), .b(br), .p(p_ir));
  fp_add u_a0 (.a(p_rr), .b(p_ii), .sub(1'b1), .s(tr));
  fp_add u_a1 (.a(p_ri), .b(p_ir), .sub(1'b0), .s(ti));

  // complex add and subtract
  fp_add u_a2 (.a(ar), .b(tr), .sub(1'b0), .s(xr));
  fp_add u_a3 (.a(ai), .b(ti), .sub(1'b0), .s(xi));
  fp_add u_a4 (.a(ar), .b(tr), .sub(1'b1), .s(yr));
  fp_add u_a5 (.a(ai), .b(ti), .sub(1'b1), .s(yi));
endmodule
