// ml_engine: maximum-likelihood delay search of the PHAT estimator (Eq. 8),
//   beta* = argmax_beta  sum_{n=0..N/4} cos( d(n) - 2*pi*n*beta/N ),
// over NUM_BETA = 601 candidate delays beta = -30.0 .. +30.0 samples in steps
// of 0.1 sample, where d(n) is the phase difference stored by phase_diff.
//
// As in the document, LANES = 4 likelihoods are evaluated in parallel, each by
// its own CORDIC cosine evaluator and accumulator, and no multiplier is used:
// the per-frequency angle 2*pi*n*beta/N of each lane is a running sum that
// grows by 2*pi*beta/N per point, and the lane steps 2*pi*beta/N themselves
// start at 2*pi*beta_min/N and grow by 2*pi*0.1/N per candidate. Those angles
// are kept in PW = 40 bits (one turn = 2**40), so their rounding error stays
// far below the 0.1-sample resolution. After all points of a pass, each
// lane's sum is compared with the running maximum, which is kept together
// with its candidate index (on a tie the smaller delay is kept).
//
// Interface: one read port onto the block holding d(n) (AW-bit binary angle in
// the low bits of each word). best_idx is the winning candidate, 0..600,
// i.e. beta = (best_idx - 300) / 10 samples; best_lik is its sum with
// 1.0 = 2**COS_FRAC. Timing: per point one read clock, one launch clock and 11
// CORDIC clocks (13 clocks); per pass one set-up and one compare clock; 151
// passes. done pulses for one clock when the search ends.
// The memory port only reads; its write fields are always zero, and only the
// low AW bits of each word are used.
module ml_engine
  import tdoa_pkg::*;
#(
  parameter int unsigned NBETA  = NUM_BETA,
  parameter int unsigned NLANES = LANES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  win_sel_e                  win_sel,
  output logic                      busy,
  output logic                      done,
  output mem_req_t                  rd_req,
  output logic                      rd_en,
  input  logic [WORD_W-1:0]         rd_data,
  output logic [BETA_W-1:0]         best_idx,
  output logic signed [LIK_W-1:0]   best_lik
);
  localparam int unsigned PW      = 40;
  localparam int unsigned NPASS   = (NBETA + NLANES - 1) / NLANES;
  localparam longint      TURN    = longint'(1) <<< PW;
  // 2*pi*0.1/N in PW-bit angle units, rounded
  localparam logic [PW-1:0] DS_256  = PW'((TURN + 5 * 256)  / (10 * 256));
  localparam logic [PW-1:0] DS_512  = PW'((TURN + 5 * 512)  / (10 * 512));
  localparam logic [PW-1:0] DS_1024 = PW'((TURN + 5 * 1024) / (10 * 1024));

  typedef enum logic [2:0] {S_IDLE, S_PASS, S_RD, S_LOAD, S_WAIT, S_CMP} state_e;

  state_e                  state;
  logic [PW-1:0]           dstep, s_base;
  logic [PW-1:0]           s_l   [NLANES];
  logic [PW-1:0]           acc_l [NLANES];
  logic signed [LIK_W-1:0] lik_l [NLANES];
  angle_t                  theta [NLANES];
  logic signed [COS_W-1:0] cos_l [NLANES];
  logic [NLANES-1:0]       c_done;
  logic [NLANES-1:0]       c_busy;
  logic [ADDR_W-1:0]       n, last;
  logic [BETA_W-1:0]       pass_base;     // candidate index of lane 0
  logic [$clog2(NPASS+1)-1:0] pass;
  logic                    have_best;

  always_comb begin
    case (win_sel)
      WIN_256: dstep = DS_256;
      WIN_512: dstep = DS_512;
      default: dstep = DS_1024;
    endcase
    last = ADDR_W'(1) << (log2_n(win_sel) - 2);
  end

  for (genvar l = 0; l < NLANES; l++) begin : g_lane
    always_comb theta[l] = rd_data[AW-1:0] - acc_l[l][PW-1 -: AW];
    cordic_cos u_cos (
      .clk, .rst_n, .start(state == S_LOAD), .theta(theta[l]),
      .busy(c_busy[l]), .done(c_done[l]), .cos_out(cos_l[l])
    );
  end

  always_comb begin
    rd_req      = '0;
    rd_en       = (state == S_RD);
    rd_req.addr = n;
  end

  assign busy = (state != S_IDLE);

  // running-maximum comparison over the lanes of one pass
  logic signed [LIK_W-1:0] cmp_lik;
  logic [BETA_W-1:0]       cmp_idx;
  logic                    cmp_have;

  always_comb begin
    cmp_lik  = best_lik;
    cmp_idx  = best_idx;
    cmp_have = have_best;
    for (int l = 0; l < NLANES; l++) begin
      if (32'(pass_base) + l < NBETA) begin
        if (!cmp_have || lik_l[l] > cmp_lik) begin
          cmp_lik  = lik_l[l];
          cmp_idx  = pass_base + BETA_W'(l);
          cmp_have = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      s_base    <= '0;
      n         <= '0;
      pass      <= '0;
      pass_base <= '0;
      have_best <= 1'b0;
      best_idx  <= '0;
      best_lik  <= '0;
      for (int l = 0; l < NLANES; l++) begin
        s_l[l] <= '0; acc_l[l] <= '0; lik_l[l] <= '0;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          s_base    <= PW'(BETA_MIN) * dstep;   // 2*pi*beta_min/N, set-up only
          pass      <= '0;
          pass_base <= '0;
          have_best <= 1'b0;
          state     <= S_PASS;
        end
        S_PASS: begin
          for (int l = 0; l < NLANES; l++) begin
            s_l[l]   <= s_base + PW'(l) * dstep;
            acc_l[l] <= '0;
            lik_l[l] <= '0;
          end
          n     <= '0;
          state <= S_RD;
        end
        S_RD:   state <= S_LOAD;
        S_LOAD: begin
          for (int l = 0; l < NLANES; l++) acc_l[l] <= acc_l[l] + s_l[l];
          state <= S_WAIT;
        end
        S_WAIT: if (c_done[0]) begin
          for (int l = 0; l < NLANES; l++) lik_l[l] <= lik_l[l] + LIK_W'(cos_l[l]);
          if (n == last) state <= S_CMP;
          else begin
            n     <= n + 1'b1;
            state <= S_RD;
          end
        end
        S_CMP: begin
          best_lik  <= cmp_lik;
          best_idx  <= cmp_idx;
          have_best <= cmp_have;
          s_base    <= s_base + PW'(NLANES) * dstep;
          pass_base <= pass_base + BETA_W'(NLANES);
          pass      <= pass + 1'b1;
          if (32'(pass) == NPASS - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_PASS;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
