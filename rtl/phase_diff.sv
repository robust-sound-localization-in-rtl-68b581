// phase_diff: phase difference of the two microphones for n = 0..N/4,
//   d(n) = phase1(n) - phase2(n)   (modulo one turn),
// written back over phase1(n) in microphone 1's computational block.
//
// A finite-state machine reads both computational blocks at the same address
// in one clock, subtracts the AW-bit binary angles (wrap-around gives the
// modulo) and writes the result back: three clocks per point, done seen
// 3*(N/4+1) + 1 clocks after start. This follows the
// document; the three-clock schedule is this design's own.
// Microphone 2's port only reads; its write fields are always zero. Only the
// low AW bits of each word are used.
module phase_diff
  import tdoa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  win_sel_e            win_sel,
  output logic                busy,
  output logic                done,
  output mem_req_t            c1_req,
  output logic                c1_en,
  input  logic [WORD_W-1:0]   c1_rdata,
  output mem_req_t            c2_req,
  output logic                c2_en,
  input  logic [WORD_W-1:0]   c2_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_LAT, S_WR} state_e;

  state_e            state;
  logic [ADDR_W-1:0] n, last;
  angle_t            d_q;

  assign last = ADDR_W'(1) << (log2_n(win_sel) - 2);

  always_comb begin
    c1_req = '0;
    c2_req = '0;
    c1_en  = 1'b0;
    c2_en  = 1'b0;
    case (state)
      S_RD: begin c1_en = 1'b1; c2_en = 1'b1; c1_req.addr = n; c2_req.addr = n; end
      S_WR: begin
        c1_en  = 1'b1;
        c1_req = '{addr: n, we: 1'b1, wdata: {{(WORD_W-AW){d_q[AW-1]}}, d_q}};
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n     <= '0;
      done  <= 1'b0;
      d_q   <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin n <= '0; state <= S_RD; end
        S_RD:   state <= S_LAT;
        S_LAT: begin
          d_q   <= c1_rdata[AW-1:0] - c2_rdata[AW-1:0];
          state <= S_WR;
        end
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
