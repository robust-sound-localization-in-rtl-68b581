// tdoa_top: the time-delay-of-arrival chip. Two microphone channels are
// sampled by serial ADCs, windowed and buffered by the front end in
// ping-pong memory blocks, and each full segment is processed by the DSP core
// (FFT, CORDIC phase, phase difference, four-lane maximum-likelihood search
// with the phase transform) while the next segment is being acquired.
//
// Interface: win_sel selects the segment length (256/512/1024 samples) and is
// taken while rst_n is low ("selected at power up"). adc_* is the serial ADC
// interface. Each finished segment gives one tdoa_valid pulse with tdoa, the
// delay of microphone 2 behind microphone 1 in tenths of a sample
// (-300..+300, a range of +/-30 samples, which covers ~50 cm of microphone
// spacing at 20 kHz), and its likelihood tdoa_lik (1.0 = 2**16 per frequency
// point). overrun pulses when a segment had to be dropped because the DSP core
// was still busy. The default timing assumes a 16 MHz clock.
// win_sel is loaded synchronously while rst_n is low, so rst_n is used both as
// asynchronous reset (in the blocks) and as a load enable (here), on purpose.
module tdoa_top
  import tdoa_pkg::*;
#(
  parameter int unsigned CLKS_PER_SAMPLE = 800,
  parameter int unsigned SCLK_HALF       = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  win_sel_e                 win_sel,
  output logic                     adc_cs_n,
  output logic                     adc_sclk,
  input  logic [1:0]               adc_sdata,
  output logic                     tdoa_valid,
  output logic signed [BETA_W:0]   tdoa,
  output logic signed [LIK_W-1:0]  tdoa_lik,
  output logic                     overrun,
  output logic                     dsp_busy
);
  win_sel_e win_q;

  always_ff @(posedge clk) begin
    if (!rst_n) win_q <= win_sel;
  end

  logic                       sample_valid;
  logic signed [SAMPLE_W-1:0] s1, s2;
  logic                       fe_we, fill_bank, seg_ready;
  logic [ADDR_W-1:0]          fe_addr;
  fp_t                        fe_wdata1, fe_wdata2;
  mem_req_t                   c1_req, c2_req, sh_req;
  logic                       c1_en, c2_en, sh_en;
  logic [WORD_W-1:0]          c1_rdata, c2_rdata, sh_rdata;

  adc_serial_if #(.CLKS_PER_SAMPLE(CLKS_PER_SAMPLE), .SCLK_HALF(SCLK_HALF)) u_adc (
    .clk, .rst_n, .adc_cs_n, .adc_sclk, .adc_sdata,
    .sample_valid, .sample1(s1), .sample2(s2)
  );

  front_end u_fe (
    .clk, .rst_n, .win_sel(win_q), .sample_valid, .sample1(s1), .sample2(s2),
    .dsp_busy, .fe_we, .fe_addr, .fe_wdata1, .fe_wdata2,
    .fill_bank, .seg_ready, .overrun
  );

  mem_subsystem u_mem (
    .clk, .fill_bank, .fe_we, .fe_addr, .fe_wdata1, .fe_wdata2,
    .c1_req, .c1_en, .c1_rdata, .c2_req, .c2_en, .c2_rdata,
    .sh_req, .sh_en, .sh_rdata
  );

  dsp_core u_dsp (
    .clk, .rst_n, .win_sel(win_q), .seg_ready, .busy(dsp_busy),
    .c1_req, .c1_en, .c1_rdata, .c2_req, .c2_en, .c2_rdata,
    .sh_req, .sh_en, .sh_rdata,
    .tdoa_valid, .tdoa, .tdoa_lik
  );
endmodule
