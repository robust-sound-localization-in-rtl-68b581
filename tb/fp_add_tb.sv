// fp_add_tb: random sums and differences checked against real arithmetic
// (error below 2**-22 of the larger operand), plus cancellation to zero and
// zero operands.
module fp_add_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  fp_t  a, b, s;
  logic sub;
  int   checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .s(s));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%g b=%g sub=%0d s=%g", what, fp_to_real(a), fp_to_real(b), sub,
               fp_to_real(s));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb, ref_s, big;
    for (int i = 0; i < 3000; i++) begin
      ra  = rand_real(-8, 8);
      rb  = (i % 4 == 0) ? ra * (1.0 + rand_real(-20, -10)) : rand_real(-8, 8);
      a   = real_to_fp(ra);
      b   = real_to_fp(rb);
      sub = 1'($urandom_range(0, 1));
      #1;
      ref_s = sub ? fp_to_real(a) - fp_to_real(b) : fp_to_real(a) + fp_to_real(b);
      big   = (fabs(fp_to_real(a)) > fabs(fp_to_real(b))) ? fabs(fp_to_real(a)) : fabs(fp_to_real(b));
      check("random", fabs(fp_to_real(s) - ref_s) <= big * $pow(2.0, real'(-22)));
    end
    a = real_to_fp(5.25); b = a; sub = 1'b1; #1;
    check("cancel", s == FP_ZERO);
    a = '0; b = real_to_fp(-7.0); sub = 1'b1; #1;
    check("zero a", fp_to_real(s) == 7.0);
    a = real_to_fp(1.0); b = real_to_fp(1.0); sub = 1'b0; #1;
    check("carry", fp_to_real(s) == 2.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
