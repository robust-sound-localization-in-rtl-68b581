// tdoa_top_tb: end-to-end test of the chip through its serial ADC pins. Two
// ADC models deliver white noise, microphone 2 delayed by D samples behind
// microphone 1. Sampling is sped up (100 clocks per sample) so that the DSP
// core cannot keep up and segments are dropped. Every reported delay must
// equal 10*D tenths of a sample within 0.2 sample. The test counts how often
// each mechanism occurred and fails if one never did: buffer swaps
// (seg_ready), dropped segments (overrun), results, and a change of segment
// length at reset (256, then 512 samples); every segment must have the
// length selected at reset.
module tdoa_top_tb;
  import tdoa_pkg::*;

  logic                    clk = 0, rst_n = 0;
  win_sel_e                win_sel = WIN_256;
  logic                    adc_cs_n, adc_sclk, tdoa_valid, overrun, dsp_busy;
  logic [1:0]              adc_sdata;
  logic signed [BETA_W:0]  tdoa;
  logic signed [LIK_W-1:0] tdoa_lik;
  logic [7:0]              code1 = 8'h80, code2 = 8'h80;
  int                      checks = 0, failures = 0;
  int                      n_swap = 0, n_overrun = 0, n_result = 0, n_sizes = 0;
  int                      delay = 5;
  int                      hist [4096];
  int                      idx = 0;

  always #5 clk = ~clk;

  tdoa_top #(.CLKS_PER_SAMPLE(100), .SCLK_HALF(2)) dut (.*);
  adc_model u_a1 (.cs_n(adc_cs_n), .sclk(adc_sclk), .code(code1), .sdata(adc_sdata[0]));
  adc_model u_a2 (.cs_n(adc_cs_n), .sclk(adc_sclk), .code(code2), .sdata(adc_sdata[1]));

  // noise source: the code for the next conversion is set after each start
  always @(negedge adc_cs_n) begin
    #1;
    idx++;
    hist[idx % 4096] = $urandom_range(0, 200) - 100;
    // a negative delay is made by delaying microphone 1 instead
    code1 = 8'(hist[(idx - (delay < 0 ? -delay : 0) + 4096) % 4096] + 128);
    code2 = 8'(hist[(idx - (delay > 0 ? delay : 0) + 4096) % 4096] + 128);
  end

  // segment length seen by the front end: samples between segment ends
  int       seg_samples = 0, seg_len = 256;
  always @(posedge clk) begin
    if (!rst_n) seg_samples = 0;
    else begin
      if (dut.sample_valid) seg_samples++;
      if (dut.seg_ready) n_swap++;
      if (overrun) n_overrun++;
      if (dut.seg_ready || overrun) begin
        checks++;
        if (seg_samples != seg_len) begin
          failures++;
          $display("FAIL segment of %0d samples, expected %0d", seg_samples, seg_len);
        end
        seg_samples = 0;
      end
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input win_sel_e ws, input int d, input int results);
    rst_n   = 0;
    win_sel = ws;
    delay   = d;
    seg_len = 256 << int'(ws);
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    win_sel = WIN_1024;     // taken at reset only: must not matter now
    for (int r = 0; r < results; r++) begin
      @(posedge clk iff tdoa_valid);
      n_result++;
      check($sformatf("window %0d: tdoa %0d expected %0d", ws, tdoa, 10 * d),
            tdoa - 10 * d <= 2 && 10 * d - tdoa <= 2);
    end
    n_sizes++;
  endtask

  initial begin
    run(WIN_256, 5, 3);
    run(WIN_512, -9, 1);
    check($sformatf("buffer swaps %0d", n_swap), n_swap >= 4);
    check($sformatf("dropped segments %0d", n_overrun), n_overrun >= 1);
    check($sformatf("results %0d", n_result), n_result == 4);
    check($sformatf("segment lengths %0d", n_sizes), n_sizes == 2);
    $display("mechanisms: swaps=%0d overruns=%0d results=%0d sizes=%0d",
             n_swap, n_overrun, n_result, n_sizes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
