// dsp_core_tb: the DSP core with its memory blocks. The testbench writes a
// windowed white-noise segment for microphone 1 and the same noise delayed by
// D samples for microphone 2 (bit-reversed addresses, through the front-end
// port), swaps the banks and pulses seg_ready. The core must report
// tdoa = 10*D (tenths of a sample) within 0.2 sample, keep busy high until
// the result, and finish within one segment time at 20 kHz and 16 MHz
// (N * 800 clocks), the real-time budget.
module dsp_core_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  logic                    clk = 0, rst_n = 0, seg_ready = 0, busy;
  win_sel_e                win_sel = WIN_256;
  logic                    fill_bank = 0, fe_we = 0;
  logic [ADDR_W-1:0]       fe_addr = '0;
  fp_t                     fe_wdata1 = '0, fe_wdata2 = '0;
  mem_req_t                c1_req, c2_req, sh_req;
  logic                    c1_en, c2_en, sh_en;
  logic [WORD_W-1:0]       c1_rdata, c2_rdata, sh_rdata;
  logic                    tdoa_valid;
  logic signed [BETA_W:0]  tdoa;
  logic signed [LIK_W-1:0] tdoa_lik;
  real                     s [-64:1023];
  int                      checks = 0, failures = 0;

  always #5 clk = ~clk;

  dsp_core u_dut (.*);
  mem_subsystem u_mem (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(input int k, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (k & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int lg, input int d);
    int  n = 1 << lg, cycles, busy_cycles;
    real w;
    for (int k = -64; k < n; k++) s[k] = real'($urandom_range(0, 200)) - 100.0;
    win_sel = win_sel_e'(lg - 8);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      w = 0.5 - 0.5 * $cos(6.283185307179586 * real'(k) / real'(n));
      fe_we = 1;
      fe_addr = ADDR_W'(bitrev(k, lg));
      fe_wdata1 = real_to_fp(s[k] * w);
      fe_wdata2 = real_to_fp(s[k - d] * w);
    end
    @(negedge clk);
    fe_we = 0;
    fill_bank = ~fill_bank;
    seg_ready = 1;
    @(negedge clk);
    seg_ready = 0;
    cycles = 1; busy_cycles = 0;
    while (!tdoa_valid) begin
      busy_cycles += busy;
      @(negedge clk);
      cycles++;
    end
    check($sformatf("N=%0d D=%0d: tdoa %0d expected %0d", n, d, tdoa, 10 * d),
          tdoa - 10 * d <= 2 && 10 * d - tdoa <= 2);
    check($sformatf("N=%0d busy until result", n), busy_cycles == cycles - 1);
    check($sformatf("N=%0d time %0d clocks within segment time %0d", n, cycles, n * 800),
          cycles < n * 800);
    @(negedge clk);
    check("idle after result", !busy);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8, 7);
    run(8, -12);
    run(9, 25);
    run(10, -3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
