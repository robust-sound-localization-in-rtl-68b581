// fft_butterfly_tb: random complex operands; x = a + w*b and y = a - w*b are
// checked against real arithmetic with a tolerance of 2**-20 of the operand
// scale.
module fft_butterfly_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  fp_t ar, ai, br, bi, wr, wi, xr, xi, yr, yi;
  int  checks = 0, failures = 0;

  fft_butterfly dut (.*);

  task automatic check(input string what, input real got, input real exp_v, input real scale);
    checks++;
    if (fabs(got - exp_v) > scale * $pow(2.0, real'(-20))) begin
      failures++;
      $display("FAIL %s: got %g expected %g", what, got, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, tr, ti, sc;
    for (int i = 0; i < 1000; i++) begin
      ar = real_to_fp(rand_real(-4, 6));
      ai = real_to_fp(rand_real(-4, 6));
      br = real_to_fp(rand_real(-4, 6));
      bi = real_to_fp(rand_real(-4, 6));
      th = 6.283185307179586 * real'($urandom_range(0, 1023)) / 1024.0;
      wr = real_to_fp($cos(th));
      wi = real_to_fp(-$sin(th));
      #1;
      tr = fp_to_real(wr) * fp_to_real(br) - fp_to_real(wi) * fp_to_real(bi);
      ti = fp_to_real(wr) * fp_to_real(bi) + fp_to_real(wi) * fp_to_real(br);
      sc = fabs(fp_to_real(ar)) + fabs(fp_to_real(ai)) + fabs(fp_to_real(br)) + fabs(fp_to_real(bi));
      check("xr", fp_to_real(xr), fp_to_real(ar) + tr, sc);
      check("xi", fp_to_real(xi), fp_to_real(ai) + ti, sc);
      check("yr", fp_to_real(yr), fp_to_real(ar) - tr, sc);
      check("yi", fp_to_real(yi), fp_to_real(ai) - ti, sc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
