// cordic_cos: cosine of a binary angle by the CORDIC rotation iterations
//   x' = x - d*y*2^-i,  y' = y + d*x*2^-i,  z' = z - d*atan(2^-i),
//   d = -1 if z < 0, else +1,
// which turn the vector (x0, 0) by the angle z0 until z reaches zero, leaving
// x = cos(theta) and y = sin(theta).
//
// As in the document: twenty rotations, two per clock, and the CORDIC gain
// compensated by the start value x0 = 1/K. The input is first folded into
// [-90, +90] degrees by adding 180 degrees and negating the result, so the
// iterations always converge; that folding is this design's own choice.
//
// Interface: theta is an AW-bit binary angle (2**AW = one turn); cos_out is
// signed with 1.0 = 2**COS_FRAC; the iterations keep four more
// fraction bits than the output. Timing: start is taken in one clock, done
// pulses with cos_out valid 11 clocks after start.
module cordic_cos
  import tdoa_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  angle_t                     theta,
  output logic                       busy,
  output logic                       done,
  output logic signed [COS_W-1:0]    cos_out
);
  // The iterations carry GB extra fraction bits, rounded off at the output.
  localparam int unsigned GB = 4;
  localparam int unsigned CW = COS_W + GB;
  // round(2**(COS_FRAC+GB) / K) for 20 rotations, K = prod sqrt(1 + 2^-2i)
  localparam logic signed [CW-1:0] X0 = CW'(636751);

  logic signed [CW-1:0]    x, y, x1, y1, x2, y2, xr;
  angle_t                  z, z1, z2;
  logic [3:0]              step;
  logic                    run, neg;
  int                      i0, i1;

  always_comb begin
    i0 = 2 * int'(step);
    i1 = i0 + 1;
    if (!z[AW-1]) begin  // d = +1
      x1 = x - (y >>> i0);  y1 = y + (x >>> i0);  z1 = z - atan_aw(i0);
    end else begin
      x1 = x + (y >>> i0);  y1 = y - (x >>> i0);  z1 = z + atan_aw(i0);
    end
    if (!z1[AW-1]) begin
      x2 = x1 - (y1 >>> i1); y2 = y1 + (x1 >>> i1); z2 = z1 - atan_aw(i1);
    end else begin
      x2 = x1 + (y1 >>> i1); y2 = y1 - (x1 >>> i1); z2 = z1 + atan_aw(i1);
    end
  end

  assign xr   = x2 + CW'(1 << (GB - 1));   // round to COS_FRAC bits
  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0;
      step    <= '0;
      run     <= 1'b0;
      neg     <= 1'b0;
      done    <= 1'b0;
      cos_out <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run  <= 1'b1;
        step <= '0;
        x    <= X0;
        y    <= '0;
        // quadrants 2 and 3: cos(t) = -cos(t + 180 deg)
        neg  <= theta[AW-1] ^ theta[AW-2];
        z    <= (theta[AW-1] ^ theta[AW-2]) ? (theta ^ (angle_t'(1) << (AW-1))) : theta;
      end else if (run) begin
        x <= x2; y <= y2; z <= z2;
        step <= step + 1'b1;
        if (32'(step) == CORDIC_N/2 - 1) begin
          run     <= 1'b0;
          done    <= 1'b1;
          cos_out <= COS_W'((neg ? -xr : xr) >>> GB);
        end
      end
    end
  end
endmodule
