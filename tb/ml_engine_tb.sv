// ml_engine_tb: fills the phase-difference memory with d(n) = 2*pi*n*b0/N
// plus random phase noise for a known delay b0, runs the search and checks:
// the chosen candidate has the largest likelihood within 0.01 among the 601
// candidates (reference likelihoods computed with $cos from the same memory
// contents), best_lik matches the reference likelihood of that candidate, the
// estimate is within 0.2 sample of b0, and the run takes
// 151 * (2 + 13*(N/4+1)) + 1 clocks. Cases include b0 at the +30-sample end
// of the range, which the last, partly used, pass of the four lanes handles.
module ml_engine_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  logic                    clk = 0, rst_n = 0, start = 0, busy, done;
  win_sel_e                win_sel = WIN_256;
  mem_req_t                rd_req;
  logic                    rd_en;
  logic [WORD_W-1:0]       rd_data;
  logic [BETA_W-1:0]       best_idx;
  logic signed [LIK_W-1:0] best_lik;
  logic [WORD_W-1:0]       mem [1024];
  real                     lref [NUM_BETA];
  int                      checks = 0, failures = 0;

  always #5 clk = ~clk;

  ml_engine dut (.*);

  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_req.addr];

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

  task automatic run(input int lg, input int b0);   // b0 in tenths of a sample
    int  n = 1 << lg, np, cycles, a;
    real ph, best_ref, pi2 = 6.283185307179586;
    np = n / 4 + 1;
    for (int k = 0; k < np; k++) begin
      ph = pi2 * real'(k) * real'(b0) / 10.0 / real'(n)
         + (real'($urandom_range(0, 1000)) / 1000.0 - 0.5) * 1.2;
      a  = $rtoi(ph / pi2 * real'(1 << AW)) & ((1 << AW) - 1);
      mem[k] = 32'(a);
      mem[k][31:AW] = {(32-AW){mem[k][AW-1]}};
    end
    best_ref = -1.0e9;
    for (int b = 0; b < NUM_BETA; b++) begin
      lref[b] = 0.0;
      for (int k = 0; k < np; k++)
        lref[b] += $cos(pi2 * real'($signed(mem[k][AW-1:0])) / real'(1 << AW)
                        - pi2 * real'(k) * real'(b + BETA_MIN) / 10.0 / real'(n));
      if (lref[b] > best_ref) best_ref = lref[b];
    end
    win_sel = win_sel_e'(lg - 8);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    check($sformatf("N=%0d b0=%0d run time %0d", n, b0, cycles),
          cycles == 151 * (2 + 13 * np) + 1);
    check($sformatf("N=%0d b0=%0d chosen %0d is a maximum", n, b0, best_idx),
          lref[best_idx] >= best_ref - 0.01);
    check($sformatf("N=%0d b0=%0d likelihood %f vs %f", n, b0,
                    real'(best_lik) / 65536.0, lref[best_idx]),
          fabs(real'(best_lik) / 65536.0 - lref[best_idx]) < 0.01);
    check($sformatf("N=%0d b0=%0d estimate %0d", n, b0, int'(best_idx) + BETA_MIN),
          (int'(best_idx) + BETA_MIN - b0) <= 2 && (b0 - int'(best_idx) - BETA_MIN) <= 2);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8, 123);
    run(9, -287);
    run(8, 300);
    run(8, -300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
