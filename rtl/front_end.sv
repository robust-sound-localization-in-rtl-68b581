// front_end: preprocessing front end. Each incoming pair of samples is
// multiplied by the Hanning window coefficient of its position k in the
// segment, converted to the 32-bit floating-point word and written into the
// input-buffer memory block of each microphone.
//
// Samples are stored at the bit-reversed address of k, so the in-place
// decimation-in-time FFT finds them in the order it needs (this design's
// choice; the document only says the FFT is in place). After the N-th sample
// (N = 256, 512 or 1024 by win_sel) the buffer is full: if the DSP core is
// idle, fill_bank toggles (the two dedicated blocks of each microphone swap
// roles, as in the document) and seg_ready pulses. If the DSP core is still
// busy, the segment is dropped, overrun pulses and the same buffer is
// refilled; this overrun rule is this design's own.
//
// The window product is an 8-bit by 31-bit fixed-point multiply, not a
// floating-point one (this design's choice). Timing: the memory write occurs
// the clock after sample_valid; the bank swap one clock after the last write.
module front_end
  import tdoa_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  win_sel_e                   win_sel,
  input  logic                       sample_valid,
  input  logic signed [SAMPLE_W-1:0] sample1,
  input  logic signed [SAMPLE_W-1:0] sample2,
  input  logic                       dsp_busy,
  output logic                       fe_we,
  output logic [ADDR_W-1:0]          fe_addr,
  output fp_t                        fe_wdata1,
  output fp_t                        fe_wdata2,
  output logic                       fill_bank,
  output logic                       seg_ready,
  output logic                       overrun
);
  logic [ADDR_W-1:0]   k;
  logic [30:0]         w;
  logic signed [47:0]  p1, p2;
  logic                last_q;
  int unsigned         lg;

  assign lg = log2_n(win_sel);

  hanning_window u_win (.win_sel(win_sel), .k(k), .w(w));

  always_comb begin
    p1 = 48'(sample1) * $signed({17'd0, w});
    p2 = 48'(sample2) * $signed({17'd0, w});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k         <= '0;
      fe_we     <= 1'b0;
      fe_addr   <= '0;
      fe_wdata1 <= FP_ZERO;
      fe_wdata2 <= FP_ZERO;
      fill_bank <= 1'b0;
      seg_ready <= 1'b0;
      overrun   <= 1'b0;
      last_q    <= 1'b0;
    end else begin
      fe_we     <= 1'b0;
      seg_ready <= 1'b0;
      overrun   <= 1'b0;
      last_q    <= 1'b0;
      if (sample_valid) begin
        fe_we     <= 1'b1;
        fe_addr   <= bit_reverse(k, lg);
        fe_wdata1 <= fix_to_fp(p1, 30);
        fe_wdata2 <= fix_to_fp(p2, 30);
        if (32'(k) == (32'd1 << lg) - 1) begin
          k      <= '0;
          last_q <= 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
      if (last_q) begin
        if (dsp_busy) overrun <= 1'b1;
        else begin
          fill_bank <= ~fill_bank;
          seg_ready <= 1'b1;
        end
      end
    end
  end
endmodule
