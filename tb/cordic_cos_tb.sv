// cordic_cos_tb: cosines of random angles and of the quadrant boundaries,
// checked against $cos (error below 1e-4), and the 11-clock latency.
module cordic_cos_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  logic                    clk = 0, rst_n = 0, start = 0, busy, done;
  angle_t                  theta;
  logic signed [COS_W-1:0] cos_out;
  int                      checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_cos dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_c, got_c;
    int  lat;
    theta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i < 8) theta = angle_t'(i) << (AW - 3);     // multiples of 45 degrees
      else       theta = angle_t'($urandom);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      ref_c = $cos(6.283185307179586 * real'(theta) / real'(1 << AW));
      got_c = real'(cos_out) / real'(1 << COS_FRAC);
      checks++;
      if (fabs(got_c - ref_c) > 1.0e-4) begin
        failures++;
        $display("FAIL theta=%h got %f expected %f", theta, got_c, ref_c);
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
