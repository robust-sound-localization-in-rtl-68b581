// hanning_window: Hanning window coefficient for sample k of an N-sample
// segment, w(k) = (1 - cos(2*pi*k/N)) / 2, as an unsigned Q30 fraction
// (2**30 = 1.0).
//
// Combinational: k is scaled to the 1024-step circle of cos_table
// (m = k * 1024/N) and the coefficient formed by one subtraction and a shift.
// The segment length is chosen by win_sel (256, 512 or 1024 samples, from the
// document). The document specifies a Hanning window; the periodic form and
// the Q30 precision are this design's choice.
module hanning_window
  import tdoa_pkg::*;
(
  input  win_sel_e          win_sel,
  input  logic [ADDR_W-1:0] k,
  output logic [30:0]       w
);
  logic        [ADDR_W-1:0] m;
  logic signed [31:0]       c;
  logic signed [32:0]       diff;

  always_comb m = k << (ADDR_W - log2_n(win_sel));

  cos_table u_cos (.m(m), .c(c));

  always_comb begin
    diff = 33'sd1073741824 - 33'(c);   // 1 - cos, in Q30, range 0..2**31
    w    = diff[31:1];
  end
endmodule
