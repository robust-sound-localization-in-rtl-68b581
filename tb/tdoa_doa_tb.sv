// tdoa_doa_tb: the direction-of-arrival scenario of the measurements: two
// microphones 20 cm apart, a broadband source at -90, -60, ..., +90 degrees
// and a second, uncorrelated noise source straight in front (equal at both
// microphones), at signal-to-noise ratios of 50, 40, 30, 20, 9, 6, 3 and
// 0 dB. Sampling at 20 kHz, 1024-sample segments,
// speed of sound 343 m/s, so the delays are fractional: d*sin(angle)/v*Fs,
// up to 11.66 samples. The source is a sum of 300 random tones up to 10 kHz,
// evaluated at the exact (delayed) sample times. Each segment is windowed and
// loaded into the memory blocks, and the DSP core estimates the delay.
// Checks, at 20 dB and above: delay within 0.15 sample of the true one at
// every angle, and direction within 5 degrees (the measurement's "abnormal"
// limit) wherever the true direction is within +/-60 degrees. For every SNR it
// prints, as the measurements do, the number of abnormal estimates (direction
// error over 5 degrees; estimates beyond +/-90 degrees are discarded) and the
// RMS direction error of the others.
module tdoa_doa_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  localparam int    N   = 1024;
  localparam int    LG  = 10;
  localparam int    NT  = 300;
  localparam real   PI2 = 6.283185307179586;
  localparam real   FS  = 20000.0, DIST = 0.20, VS = 343.0;

  logic                    clk = 0, rst_n = 0, seg_ready = 0, busy;
  win_sel_e                win_sel = WIN_1024;
  logic                    fill_bank = 0, fe_we = 0;
  logic [ADDR_W-1:0]       fe_addr = '0;
  fp_t                     fe_wdata1 = '0, fe_wdata2 = '0;
  mem_req_t                c1_req, c2_req, sh_req;
  logic                    c1_en, c2_en, sh_en;
  logic [WORD_W-1:0]       c1_rdata, c2_rdata, sh_rdata;
  logic                    tdoa_valid;
  logic signed [BETA_W:0]  tdoa;
  logic signed [LIK_W-1:0] tdoa_lik;
  real                     f [NT], ph [NT], fn [NT], pn [NT];
  int                      checks = 0, failures = 0;

  always #5 clk = ~clk;

  dsp_core u_dut (.*);
  mem_subsystem u_mem (.*);

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(input int k, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if ((k & (1 << i)) != 0) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic real tone_sum(input real t, input bit noise);
    real v = 0.0;
    for (int i = 0; i < NT; i++)
      v += noise ? $cos(PI2 * fn[i] * t + pn[i]) : $cos(PI2 * f[i] * t + ph[i]);
    return v;
  endfunction

  function automatic real rnd();
    return real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  initial begin
    real tau, t, w, m1, m2, est, doa_est, err, sq;
    real gain_n;
    int  cnt, abnormal, discarded;
    automatic int snrs [8] = '{50, 40, 30, 20, 9, 6, 3, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (snrs[si]) begin
      gain_n = $pow(10.0, -real'(snrs[si]) / 20.0);
      sq = 0.0; cnt = 0; abnormal = 0; discarded = 0;
      for (int a = -90; a <= 90; a += 30) begin
        for (int i = 0; i < NT; i++) begin
          f[i]  = 10000.0 * rnd();  ph[i] = PI2 * rnd();
          fn[i] = 10000.0 * rnd();  pn[i] = PI2 * rnd();
        end
        tau = DIST * $sin(real'(a) * PI2 / 360.0) / VS * FS;   // mic 2 behind mic 1
        for (int k = 0; k < N; k++) begin
          t  = real'(k) / FS;
          w  = 0.5 - 0.5 * $cos(PI2 * real'(k) / real'(N));
          m1 = tone_sum(t, 1'b0) + gain_n * tone_sum(t, 1'b1);
          m2 = tone_sum(t - tau / FS, 1'b0) + gain_n * tone_sum(t, 1'b1);
          // scale to the ADC's 8-bit range and quantise as the ADC would
          m1 = $floor(m1 * 100.0 / $sqrt(real'(NT) * (1.0 + gain_n * gain_n)) / 3.0 + 0.5);
          m2 = $floor(m2 * 100.0 / $sqrt(real'(NT) * (1.0 + gain_n * gain_n)) / 3.0 + 0.5);
          if (m1 > 127.0) m1 = 127.0;
          if (m1 < -128.0) m1 = -128.0;
          if (m2 > 127.0) m2 = 127.0;
          if (m2 < -128.0) m2 = -128.0;
          @(negedge clk);
          fe_we = 1;
          fe_addr = ADDR_W'(bitrev(k, LG));
          fe_wdata1 = real_to_fp(m1 * w);
          fe_wdata2 = real_to_fp(m2 * w);
        end
        @(negedge clk);
        fe_we = 0;
        fill_bank = ~fill_bank;
        seg_ready = 1;
        @(negedge clk);
        seg_ready = 0;
        @(posedge clk iff tdoa_valid);
        est = real'(tdoa) / 10.0;
        t = est * VS / FS / DIST;
        if (t > 1.0 || t < -1.0) begin
          discarded++;
          doa_est = (t > 0.0) ? 90.0 : -90.0;
        end else begin
          doa_est = $asin(t) * 360.0 / PI2;
          err = doa_est - real'(a);
          if (fabs(err) > 5.0) abnormal++;
          else begin
            sq += err * err;
            cnt++;
          end
        end
        if (snrs[si] >= 20) begin
          checks++;
          if (fabs(est - tau) > 0.15) begin
            failures++;
            $display("FAIL %0d dB, angle %0d: delay %f samples, expected %f", snrs[si], a, est, tau);
          end
          if (a >= -60 && a <= 60) begin
            checks++;
            if (fabs(doa_est - real'(a)) > 5.0) begin
              failures++;
              $display("FAIL %0d dB, angle %0d: direction %f", snrs[si], a, doa_est);
            end
          end
        end
        $display("%2d dB, angle %3d deg: delay %6.2f samples (true %7.3f), direction %7.2f deg",
                 snrs[si], a, est, tau, doa_est);
      end
      $display("%2d dB: %0d of 7 abnormal, %0d discarded, RMS error of the rest %f deg",
               snrs[si], abnormal, discarded, (cnt > 0) ? $sqrt(sq / real'(cnt)) : 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
