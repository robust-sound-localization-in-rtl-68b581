// cordic_vectoring: phase of a complex floating-point value (x + j*y) by the
// CORDIC vectoring iterations
//   x' = x - d*y*2^-i,  y' = y + d*x*2^-i,  z' = z - d*atan(2^-i),
//   d = +1 if y < 0, else -1,
// which rotate the vector onto the x axis while z collects the angle.
//
// Twenty rotations, two per clock, as in the document; each clock uses two
// add/subtract triples and four shifters. Before the iterations the two
// floating-point inputs are aligned to their common (larger) exponent and
// turned into 30-bit fixed point, and a vector in the left half-plane is first
// turned by +/-90 degrees (z starts at -/+90 degrees) so the iterations
// converge. The alignment and the pre-rotation are this design's own choices.
//
// Timing: start is taken in one clock (load), the rotations take 10 clocks,
// and done pulses with phase valid 11 clocks after start. phase is an AW-bit
// binary angle (2**AW = one turn); the magnitude is discarded.
module cordic_vectoring
  import tdoa_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fp_t    x_in,
  input  fp_t    y_in,
  output logic   busy,
  output logic   done,
  output angle_t phase
);
  localparam int XW = 30;

  logic signed [XW-1:0] x, y;
  angle_t               z;
  logic [3:0]           step;     // 0..9, two rotations each
  logic                 run;

  // fixed-point alignment of the two inputs to the larger exponent
  logic [EXP_W-1:0]     emax;
  logic signed [XW-1:0] fx, fy;

  function automatic logic signed [XW-1:0] align(input fp_t v, input logic [EXP_W-1:0] e);
    logic [XW-1:0] m;
    int            d;
    if (v.exp == '0) return '0;
    d = int'(e) - int'(v.exp);
    m = (d >= XW) ? '0 : ({{(XW-MAN_W-1){1'b0}}, 1'b1, v.man} >> d);
    m = m >> 3;                       // headroom for the CORDIC gain and sign
    return v.sign ? -$signed(m) : $signed(m);
  endfunction

  always_comb begin
    emax = (x_in.exp > y_in.exp) ? x_in.exp : y_in.exp;
    fx   = align(x_in, emax);
    fy   = align(y_in, emax);
  end

  // two successive rotations
  logic signed [XW-1:0] x1, y1, x2, y2;
  angle_t               z1, z2;
  int                   i0, i1;

  always_comb begin
    i0 = 2 * int'(step);
    i1 = i0 + 1;
    if (y[XW-1]) begin  // d = +1
      x1 = x - (y >>> i0);  y1 = y + (x >>> i0);  z1 = z - atan_aw(i0);
    end else begin
      x1 = x + (y >>> i0);  y1 = y - (x >>> i0);  z1 = z + atan_aw(i0);
    end
    if (y1[XW-1]) begin
      x2 = x1 - (y1 >>> i1); y2 = y1 + (x1 >>> i1); z2 = z1 - atan_aw(i1);
    end else begin
      x2 = x1 + (y1 >>> i1); y2 = y1 - (x1 >>> i1); z2 = z1 + atan_aw(i1);
    end
  end

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0;
      step  <= '0;
      run   <= 1'b0;
      done  <= 1'b0;
      phase <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run  <= 1'b1;
        step <= '0;
        if (fx[XW-1]) begin
          if (!fy[XW-1]) begin x <= fy;  y <= -fx; z <= angle_t'(1) << (AW-2);  end
          else           begin x <= -fy; y <= fx;  z <= -(angle_t'(1) << (AW-2)); end
        end else begin
          x <= fx; y <= fy; z <= '0;
        end
      end else if (run) begin
        x <= x2; y <= y2; z <= z2;
        step <= step + 1'b1;
        if (32'(step) == CORDIC_N/2 - 1) begin
          run   <= 1'b0;
          done  <= 1'b1;
          phase <= z2;
        end
      end
    end
  end

endmodule
