// phase_calc: converts the FFT points n = 0..N/4 of one microphone to polar
// form and keeps only the phase.
//
// A finite-state machine reads the real part (computational block) and the
// imaginary part (shared block) of point n, runs cordic_vectoring on them and
// writes the phase back over the real part at address n, as an AW-bit binary
// angle sign-extended to the 32-bit word. The magnitude is discarded, which
// frees the shared block for the other microphone, as the document describes.
// Only the points the likelihood search uses (0..N/4, Eq. 8) are converted;
// that restriction is this design's choice.
//
// Timing: per point one read clock, one load clock, 11 CORDIC clocks and one
// write clock (14 clocks); done pulses once, 14*(N/4+1) + 1 clocks after
// start.
// The shared-block port only reads; its write fields are always zero.
module phase_calc
  import tdoa_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  win_sel_e win_sel,
  output logic     busy,
  output logic     done,
  output mem_req_t re_req,
  output logic     re_en,
  input  fp_t      re_rdata,
  output mem_req_t im_req,
  output logic     im_en,
  input  fp_t      im_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_LOAD, S_WAIT, S_WR} state_e;

  state_e            state;
  logic [ADDR_W-1:0] n, last;
  logic              c_start, c_busy, c_done;
  angle_t            c_phase, phase_q;

  assign last = ADDR_W'(1) << (log2_n(win_sel) - 2);   // N/4

  cordic_vectoring u_cordic (
    .clk, .rst_n, .start(c_start), .x_in(re_rdata), .y_in(im_rdata),
    .busy(c_busy), .done(c_done), .phase(c_phase)
  );

  always_comb begin
    re_req  = '0;
    im_req  = '0;
    re_en   = 1'b0;
    im_en   = 1'b0;
    c_start = (state == S_LOAD);
    case (state)
      S_RD: begin re_en = 1'b1; im_en = 1'b1; re_req.addr = n; im_req.addr = n; end
      S_WR: begin
        re_en  = 1'b1;
        re_req = '{addr: n, we: 1'b1,
                   wdata: {{(WORD_W-AW){phase_q[AW-1]}}, phase_q}};
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      n       <= '0;
      done    <= 1'b0;
      phase_q <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin n <= '0; state <= S_RD; end
        S_RD:   state <= S_LOAD;
        S_LOAD: state <= S_WAIT;
        S_WAIT: if (c_done) begin phase_q <= c_phase; state <= S_WR; end
        S_WR: begin
          if (n == last) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            n     <= n + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
