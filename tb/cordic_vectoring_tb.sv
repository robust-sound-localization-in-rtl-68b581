// cordic_vectoring_tb: phases of random vectors in all four quadrants, with
// random exponents, checked against $atan2 (error below 2e-5 of a turn), and
// the 11-clock latency from start to done.
module cordic_vectoring_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  logic   clk = 0, rst_n = 0, start = 0, busy, done;
  fp_t    x_in, y_in;
  angle_t phase;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_vectoring dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rx, ry, ref_t, got_t, err;
    int  lat;
    x_in = '0; y_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      rx = rand_real(-6, 10);
      ry = (i % 5 == 0) ? rx * rand_real(-12, -4) : rand_real(-6, 10);
      @(negedge clk);
      x_in = real_to_fp(rx); y_in = real_to_fp(ry); start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      ref_t = $atan2(fp_to_real(y_in), fp_to_real(x_in)) / 6.283185307179586;
      got_t = real'($signed(phase)) / real'(1 << AW);
      err   = got_t - ref_t;
      if (err > 0.5) err = err - 1.0;
      if (err < -0.5) err = err + 1.0;
      checks++;
      if (fabs(err) > 2.0e-5) begin
        failures++;
        $display("FAIL phase x=%g y=%g got %f expected %f (turns)", rx, ry, got_t, ref_t);
      end
      checks++;
      if (lat != 11) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
