// dsp_core: the custom DSP core. For every segment handed over by the front
// end (seg_ready) it runs, in the order of the document's timeline:
//   1. FFT of microphone 1 (real: its computational block, imaginary: shared),
//   2. phase of microphone 1's points 0..N/4 (frees the shared block),
//   3. FFT of microphone 2, 4. phase of microphone 2,
//   5. phase difference, written into microphone 1's block,
//   6. maximum-likelihood search over the 601 candidate delays.
// It then presents the estimate: tdoa is the delay of microphone 2 behind
// microphone 1 in tenths of a sample (-300..+300), with its likelihood.
//
// Only one engine is active at a time, so the three memory ports are simply
// switched to whichever engine the sequencer runs. busy is high from
// seg_ready until the result, and tells the front end whether it may hand
// over the next segment. The sequence is the document's; the handshake is
// this design's.
// rst_n also disables the start assertion below, so lint sees it used both
// as an asynchronous reset and as a plain signal; that is intended.
module dsp_core
  import tdoa_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  win_sel_e                  win_sel,
  input  logic                      seg_ready,
  output logic                      busy,
  output mem_req_t                  c1_req,
  output logic                      c1_en,
  input  logic [WORD_W-1:0]         c1_rdata,
  output mem_req_t                  c2_req,
  output logic                      c2_en,
  input  logic [WORD_W-1:0]         c2_rdata,
  output mem_req_t                  sh_req,
  output logic                      sh_en,
  input  logic [WORD_W-1:0]         sh_rdata,
  output logic                      tdoa_valid,
  output logic signed [BETA_W:0]    tdoa,
  output logic signed [LIK_W-1:0]   tdoa_lik
);
  typedef enum logic [2:0] {
    S_IDLE, S_FFT1, S_PH1, S_FFT2, S_PH2, S_DIFF, S_ML
  } state_e;

  state_e state;
  logic   go;      // one-clock start for the engine of the new state

  // engine ports
  mem_req_t fft_re, fft_im, ph_re, ph_im, pd_c1, pd_c2, ml_rd;
  logic     fft_re_en, fft_im_en, ph_re_en, ph_im_en, pd_c1_en, pd_c2_en, ml_en;
  logic     fft_busy, fft_done, ph_busy, ph_done, pd_busy, pd_done, ml_busy, ml_done;
  fp_t      re_rdata;
  logic [BETA_W-1:0]       best_idx;
  logic signed [LIK_W-1:0] best_lik;

  assign re_rdata = (state == S_FFT2 || state == S_PH2) ? fp_t'(c2_rdata) : fp_t'(c1_rdata);

  fft_engine u_fft (
    .clk, .rst_n, .start(go && (state == S_FFT1 || state == S_FFT2)), .win_sel,
    .busy(fft_busy), .done(fft_done),
    .re_req(fft_re), .re_en(fft_re_en), .re_rdata(re_rdata),
    .im_req(fft_im), .im_en(fft_im_en), .im_rdata(fp_t'(sh_rdata))
  );

  phase_calc u_phase (
    .clk, .rst_n, .start(go && (state == S_PH1 || state == S_PH2)), .win_sel,
    .busy(ph_busy), .done(ph_done),
    .re_req(ph_re), .re_en(ph_re_en), .re_rdata(re_rdata),
    .im_req(ph_im), .im_en(ph_im_en), .im_rdata(fp_t'(sh_rdata))
  );

  phase_diff u_diff (
    .clk, .rst_n, .start(go && state == S_DIFF), .win_sel,
    .busy(pd_busy), .done(pd_done),
    .c1_req(pd_c1), .c1_en(pd_c1_en), .c1_rdata(c1_rdata),
    .c2_req(pd_c2), .c2_en(pd_c2_en), .c2_rdata(c2_rdata)
  );

  ml_engine u_ml (
    .clk, .rst_n, .start(go && state == S_ML), .win_sel,
    .busy(ml_busy), .done(ml_done),
    .rd_req(ml_rd), .rd_en(ml_en), .rd_data(c1_rdata),
    .best_idx(best_idx), .best_lik(best_lik)
  );

  // memory port switching
  always_comb begin
    c1_req = '0; c1_en = 1'b0;
    c2_req = '0; c2_en = 1'b0;
    sh_req = '0; sh_en = 1'b0;
    case (state)
      S_FFT1: begin c1_req = fft_re; c1_en = fft_re_en; sh_req = fft_im; sh_en = fft_im_en; end
      S_FFT2: begin c2_req = fft_re; c2_en = fft_re_en; sh_req = fft_im; sh_en = fft_im_en; end
      S_PH1:  begin c1_req = ph_re;  c1_en = ph_re_en;  sh_req = ph_im;  sh_en = ph_im_en;  end
      S_PH2:  begin c2_req = ph_re;  c2_en = ph_re_en;  sh_req = ph_im;  sh_en = ph_im_en;  end
      S_DIFF: begin c1_req = pd_c1;  c1_en = pd_c1_en;  c2_req = pd_c2;  c2_en = pd_c2_en;  end
      S_ML:   begin c1_req = ml_rd;  c1_en = ml_en; end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      go         <= 1'b0;
      tdoa_valid <= 1'b0;
      tdoa       <= '0;
      tdoa_lik   <= '0;
    end else begin
      go         <= 1'b0;
      tdoa_valid <= 1'b0;
      case (state)
        S_IDLE: if (seg_ready) begin state <= S_FFT1; go <= 1'b1; end
        S_FFT1: if (fft_done) begin state <= S_PH1;  go <= 1'b1; end
        S_PH1:  if (ph_done)  begin state <= S_FFT2; go <= 1'b1; end
        S_FFT2: if (fft_done) begin state <= S_PH2;  go <= 1'b1; end
        S_PH2:  if (ph_done)  begin state <= S_DIFF; go <= 1'b1; end
        S_DIFF: if (pd_done)  begin state <= S_ML;   go <= 1'b1; end
        S_ML:   if (ml_done) begin
          state      <= S_IDLE;
          tdoa_valid <= 1'b1;
          tdoa       <= $signed({1'b0, best_idx}) + (BETA_W+1)'(BETA_MIN);
          tdoa_lik   <= best_lik;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // an engine is only ever started from idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    go |-> !(fft_busy || ph_busy || pd_busy || ml_busy));
endmodule
