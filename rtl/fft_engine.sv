// fft_engine: in-place radix-2 decimation-in-time FFT of N = 256, 512 or
// 1024 points (win_sel), real parts in one memory block, imaginary parts in
// another.
//
// As in the document, a finite-state machine reads two data from memory,
// passes them through the butterfly and writes the results back to the same
// two addresses, generating all addresses itself. Input must already be in
// bit-reversed order (the front end stores it that way) and purely real: in
// the first stage the imaginary memory is not read but taken as zero, so the
// shared block needs no clearing. Output is in natural order.
//
// Timing: five clocks per butterfly (read a, read b, latch b, write a, write
// b), so one transform takes 5 * N/2 * log2(N) clocks; done is seen one
// clock later, for one clock. Memories are single-port with one-cycle read
// latency. Twiddles w = cos(2*pi*k/N) - j*sin(2*pi*k/N) come from cos_table.
// The five-clock schedule and the zero-imaginary first stage are this
// design's own choices.
module fft_engine
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
  typedef enum logic [2:0] {S_IDLE, S_RD_A, S_RD_B, S_LAT_B, S_WR_A, S_WR_B} state_e;

  state_e            state;
  logic [3:0]        stage;
  logic [ADDR_W-2:0] bfly;            // butterfly index within a stage
  fp_t               ar, ai, br, bi;
  fp_t               yr_q, yi_q;
  fp_t               xr, xi, yr, yi;
  fp_t               wr, wi;
  logic [ADDR_W-1:0] top, bot, half, j, tw_m;
  logic signed [31:0] c_cos, c_sin;
  int unsigned       lg;

  always_comb begin
    lg   = log2_n(win_sel);
    half = ADDR_W'(1) << stage;
    j    = ADDR_W'(bfly) & (half - 1'b1);
    top  = ((ADDR_W'(bfly) >> stage) << (stage + 1)) | j;
    bot  = top | half;
    tw_m = j << (ADDR_W - 1 - int'(stage));                 // k*1024/N on the table
  end

  cos_table u_cos (.m(tw_m),                 .c(c_cos));
  cos_table u_sin (.m(tw_m - ADDR_W'(256)),  .c(c_sin));   // sin = cos(. - pi/2)

  always_comb begin
    wr = fix_to_fp(48'(c_cos), 30);
    wi = fix_to_fp(-48'(c_sin), 30);
  end

  fft_butterfly u_bf (
    .ar(ar), .ai(ai), .br(br), .bi(bi), .wr(wr), .wi(wi),
    .xr(xr), .xi(xi), .yr(yr), .yi(yi)
  );

  always_comb begin
    re_req = '0;
    im_req = '0;
    re_en  = 1'b0;
    im_en  = 1'b0;
    case (state)
      S_RD_A: begin re_en = 1'b1; im_en = 1'b1; re_req.addr = top; im_req.addr = top; end
      S_RD_B: begin re_en = 1'b1; im_en = 1'b1; re_req.addr = bot; im_req.addr = bot; end
      S_WR_A: begin
        re_en = 1'b1; im_en = 1'b1;
        re_req = '{addr: top, we: 1'b1, wdata: xr};
        im_req = '{addr: top, we: 1'b1, wdata: xi};
      end
      S_WR_B: begin
        re_en = 1'b1; im_en = 1'b1;
        re_req = '{addr: bot, we: 1'b1, wdata: yr_q};
        im_req = '{addr: bot, we: 1'b1, wdata: yi_q};
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      stage <= '0;
      bfly  <= '0;
      done  <= 1'b0;
      ar <= FP_ZERO; ai <= FP_ZERO; br <= FP_ZERO; bi <= FP_ZERO;
      yr_q <= FP_ZERO; yi_q <= FP_ZERO;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          stage <= '0;
          bfly  <= '0;
          state <= S_RD_A;
        end
        S_RD_A: state <= S_RD_B;
        S_RD_B: begin
          ar    <= re_rdata;
          ai    <= (stage == 0) ? FP_ZERO : im_rdata;
          state <= S_LAT_B;
        end
        S_LAT_B: begin
          br    <= re_rdata;
          bi    <= (stage == 0) ? FP_ZERO : im_rdata;
          state <= S_WR_A;
        end
        S_WR_A: begin
          yr_q  <= yr;
          yi_q  <= yi;
          state <= S_WR_B;
        end
        S_WR_B: begin
          state <= S_RD_A;
          if (ADDR_W'(bfly) == (ADDR_W'(1) << (lg - 1)) - 1'b1) begin
            bfly <= '0;
            if (32'(stage) == lg - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              stage <= stage + 1'b1;
            end
          end else begin
            bfly <= bfly + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
