// tdoa_pkg: types, constants and helper functions shared by the PHAT time-delay
// estimator.
//
// Number format. Samples and FFT terms are held as 32-bit floating-point words:
// one sign bit, a 6-bit exponent and a 25-bit mantissa, the split used for the
// chip's memory words. The bit order, the hidden leading one, the exponent bias
// of 31, "exponent 0 means zero", truncation and saturation are this design's
// own choices; the document gives only the field widths.
//
// Angles. Phases, phase differences and CORDIC angles are binary angles of AW
// bits: the full 2*pi circle is 2**AW, so wrap-around of the subtraction is the
// modulo-2*pi reduction for free.
//
// Tables. The quarter-wave cosine table used for FFT twiddles and the Hanning
// window is computed at elaboration by cos_q30(), an integer CORDIC, so no
// data file is needed: cos_q30(m) = round(2**30 * cos(2*pi*m/1024)).
package tdoa_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned SAMPLE_W  = 8;     // ADC resolution (document)
  localparam int unsigned MAN_W     = 25;    // mantissa bits (document)
  localparam int unsigned EXP_W     = 6;     // exponent bits (document)
  localparam int unsigned WORD_W    = 1 + EXP_W + MAN_W;  // 32 (document)
  localparam int unsigned EXP_BIAS  = 31;    // assumed
  localparam int unsigned N_MAX     = 1024;  // largest segment / buffer depth (document)
  localparam int unsigned ADDR_W    = 10;    // log2(N_MAX)
  localparam int unsigned AW        = 24;    // binary-angle width (assumed)
  localparam int unsigned NUM_BETA  = 601;   // candidate delays (document)
  localparam int          BETA_MIN  = -300;  // first candidate, in 0.1-sample units
  localparam int unsigned BETA_W    = 10;    // index 0..600
  localparam int unsigned LANES     = 4;     // parallel likelihood evaluations (document)
  localparam int unsigned CORDIC_N  = 20;    // rotations per CORDIC evaluation (document)
  localparam int unsigned COS_FRAC  = 16;    // cosine output: 1.0 = 2**COS_FRAC (assumed)
  localparam int unsigned COS_W     = 20;    // cosine datapath width (assumed)
  localparam int unsigned LIK_W     = 32;    // likelihood accumulator width (assumed)

  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic               sign;
    logic [EXP_W-1:0]   exp;   // biased; 0 encodes zero
    logic [MAN_W-1:0]   man;   // fraction bits after the hidden one
  } fp_t;

  localparam fp_t FP_ZERO = '0;

  typedef logic [AW-1:0] angle_t;

  // Segment length chosen at power up (document: 256, 512 or 1024 samples).
  typedef enum logic [1:0] {
    WIN_256  = 2'd0,
    WIN_512  = 2'd1,
    WIN_1024 = 2'd2
  } win_sel_e;

  // One single-port memory access: address, write enable, write data.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic              we;
    logic [WORD_W-1:0] wdata;
  } mem_req_t;

  // ---------------------------------------------------------------- helpers
  function automatic int unsigned log2_n(input win_sel_e sel);
    case (sel)
      WIN_256:  return 8;
      WIN_512:  return 9;
      default:  return 10;
    endcase
  endfunction

  // atan(2**-i) in binary-angle units where 2**32 is a full turn.
  function automatic longint atan32(input int i);
    case (i)
      0: return 536870912;  1: return 316933406;  2: return 167458907;
      3: return 85004756;   4: return 42667331;   5: return 21354465;
      6: return 10679838;   7: return 5340245;    8: return 2670163;
      9: return 1335087;   10: return 667544;    11: return 333772;
     12: return 166886;    13: return 83443;     14: return 41722;
     15: return 20861;     16: return 10430;     17: return 5215;
     18: return 2608;      19: return 1304;      20: return 652;
     21: return 326;       22: return 163;       23: return 81;
     24: return 41;        25: return 20;        26: return 10;
     27: return 5;         28: return 3;         29: return 1;
     30: return 1;
     default: return 0;
    endcase
  endfunction

  // atan(2**-i) as an AW-bit binary angle (rounded).
  function automatic angle_t atan_aw(input int i);
    longint v;
    v = (atan32(i) + (longint'(1) <<< (31 - AW))) >>> (32 - AW);
    return angle_t'(v);
  endfunction

  // round(2**30 * cos(2*pi*m/1024)) for m = 0..256, by 32 CORDIC rotations
  // on 64-bit integers (elaboration-time use).
  function automatic int cos_q30(input int m);
    longint x, y, z, xn;
    x = 652032874;                  // 2**30 / CORDIC gain
    y = 0;
    z = longint'(m) <<< 22;         // m/1024 of a turn in 2**32 units
    for (int i = 0; i < 31; i++) begin
      if (z >= 0) begin
        xn = x - (y >>> i);
        y  = y + (x >>> i);
        z  = z - atan32(i);
      end else begin
        xn = x + (y >>> i);
        y  = y - (x >>> i);
        z  = z + atan32(i);
      end
      x = xn;
    end
    if (m == 256) return 0;
    if (x > 64'sd1073741824) x = 64'sd1073741824;
    return int'(x);
  endfunction

  // Signed fixed-point value v * 2**-frac to the word format (truncating).
  function automatic fp_t fix_to_fp(input logic signed [47:0] v, input int frac);
    fp_t                r;
    logic        [47:0] mag;
    int                 msb;
    int                 e;
    logic        [47:0] norm;
    r   = FP_ZERO;
    mag = v[47] ? 48'(-v) : 48'(v);
    msb = -1;
    for (int i = 0; i < 48; i++)
      if (mag[i]) msb = i;
    if (msb >= 0) begin
      e    = msb - frac + int'(EXP_BIAS);
      norm = mag << (47 - msb);          // leading one at bit 47
      r.sign = v[47];
      if (e <= 0) begin
        r = FP_ZERO;
      end else if (e >= (1 << EXP_W)) begin
        r.exp = '1;
        r.man = '1;
      end else begin
        r.exp = EXP_W'(e);
        r.man = norm[46 -: MAN_W];
      end
    end
    return r;
  endfunction

  // Reverse the low `bits` bits of a, result right-aligned.
  function automatic logic [ADDR_W-1:0] bit_reverse(input logic [ADDR_W-1:0] a,
                                                    input int unsigned bits);
    logic [ADDR_W-1:0] r;
    for (int i = 0; i < ADDR_W; i++) r[ADDR_W-1-i] = a[i];
    return r >> (ADDR_W - bits);
  endfunction

endpackage
