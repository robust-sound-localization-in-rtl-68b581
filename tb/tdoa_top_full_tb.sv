// tdoa_top_full_tb: the chip at its default parameters (16 MHz clock,
// 20 kHz sampling, 1 MHz serial ADC clock) with 1024-sample segments, the
// longest the document offers. White noise reaches microphone 2 four samples
// after microphone 1. Two segments are processed back to back: each estimate
// must be +40 tenths of a sample within 0.2 sample, and no segment may be
// dropped, i.e. the DSP core must finish each estimate before the next
// segment has been acquired (51.2 ms).
module tdoa_top_full_tb;
  import tdoa_pkg::*;

  logic                    clk = 0, rst_n = 0;
  win_sel_e                win_sel = WIN_1024;
  logic                    adc_cs_n, adc_sclk, tdoa_valid, overrun, dsp_busy;
  logic [1:0]              adc_sdata;
  logic signed [BETA_W:0]  tdoa;
  logic signed [LIK_W-1:0] tdoa_lik;
  logic [7:0]              code1 = 8'h80, code2 = 8'h80;
  int                      checks = 0, failures = 0, n_overrun = 0;
  int                      hist [4096];
  int                      idx = 0;
  localparam int           D = 4;

  always #31.25ns clk = ~clk;   // 16 MHz

  tdoa_top dut (.*);
  adc_model u_a1 (.cs_n(adc_cs_n), .sclk(adc_sclk), .code(code1), .sdata(adc_sdata[0]));
  adc_model u_a2 (.cs_n(adc_cs_n), .sclk(adc_sclk), .code(code2), .sdata(adc_sdata[1]));

  always @(negedge adc_cs_n) begin
    #1ns;
    idx++;
    hist[idx % 4096] = $urandom_range(0, 200) - 100;
    code1 = 8'(hist[idx % 4096] + 128);
    code2 = 8'(hist[(idx - D + 4096) % 4096] + 128);
  end

  always @(posedge clk) if (rst_n && overrun) n_overrun++;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      @(posedge clk iff tdoa_valid);
      checks++;
      if (tdoa - 10 * D > 2 || 10 * D - tdoa > 2) begin
        failures++;
        $display("FAIL result %0d: tdoa %0d expected %0d", r, tdoa, 10 * D);
      end
      $display("result %0d at %t: tdoa %0d tenths, likelihood %0d", r, $realtime, tdoa, tdoa_lik);
    end
    checks++;
    if (n_overrun != 0) begin
      failures++;
      $display("FAIL %0d segments dropped at the default rate", n_overrun);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
