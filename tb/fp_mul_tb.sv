// fp_mul_tb: random products checked against real arithmetic (relative error
// below 2**-23), plus zero operands, underflow to zero and overflow saturation.
module fp_mul_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  fp_t a, b, p;
  int  checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%g b=%g p=%g", what, fp_to_real(a), fp_to_real(b), fp_to_real(p));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb, ref_p;
    for (int i = 0; i < 2000; i++) begin
      ra = rand_real(-12, 12);
      rb = rand_real(-12, 12);
      a = real_to_fp(ra);
      b = real_to_fp(rb);
      #1;
      ref_p = fp_to_real(a) * fp_to_real(b);
      check("random", fabs(fp_to_real(p) - ref_p) <= fabs(ref_p) * $pow(2.0, real'(-23)));
    end
    a = real_to_fp(3.5); b = '0; #1;
    check("zero", p == FP_ZERO);
    a = real_to_fp($pow(2.0, -20.0)); b = real_to_fp($pow(2.0, -20.0)); #1;
    check("underflow", p == FP_ZERO);
    a = real_to_fp($pow(2.0, 20.0)); b = real_to_fp(-$pow(2.0, real'(20))); #1;
    check("overflow", p.exp == 6'h3f && p.sign);
    a = real_to_fp(-1.5); b = real_to_fp(-2.0); #1;
    check("exact", fp_to_real(p) == 3.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
