// hanning_window_tb: every coefficient of the three window lengths checked
// against 0.5 - 0.5*cos(2*pi*k/N) (error below 1e-8).
module hanning_window_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  win_sel_e          win_sel;
  logic [ADDR_W-1:0] k;
  logic [30:0]       w;
  int                checks = 0, failures = 0;

  hanning_window dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  n;
    real ref_w;
    for (int s = 0; s < 3; s++) begin
      win_sel = win_sel_e'(s);
      n = 256 << s;
      for (int i = 0; i < n; i++) begin
        k = ADDR_W'(i);
        #1;
        ref_w = 0.5 - 0.5 * $cos(6.283185307179586 * real'(i) / real'(n));
        checks++;
        if (fabs(real'(w) / real'(1 << 30) - ref_w) > 1.0e-8) begin
          failures++;
          $display("FAIL N=%0d k=%0d got %f expected %f", n, i, real'(w) / real'(1 << 30), ref_w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
