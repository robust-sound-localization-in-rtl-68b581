// fft_engine_tb: loads random real data in bit-reversed order (and garbage in
// the imaginary memory, which the first stage must ignore), runs the FFT for
// N = 256, 512 and 1024 and compares every output point with a direct DFT
// computed in real arithmetic. Also checks the run time of
// 5 * N/2 * log2(N) + 1 clocks from start to done.
module fft_engine_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  logic     clk = 0, rst_n = 0, start = 0, busy, done;
  win_sel_e win_sel = WIN_256;
  mem_req_t re_req, im_req;
  logic     re_en, im_en;
  fp_t      re_rdata, im_rdata;
  fp_t      re_mem [1024];
  fp_t      im_mem [1024];
  real      x [1024];
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_engine dut (.*);

  // single-port memories with one-clock read latency
  always_ff @(posedge clk) begin
    if (re_en) begin
      if (re_req.we) re_mem[re_req.addr] <= fp_t'(re_req.wdata);
      else           re_rdata <= re_mem[re_req.addr];
    end
    if (im_en) begin
      if (im_req.we) im_mem[im_req.addr] <= fp_t'(im_req.wdata);
      else           im_rdata <= im_mem[im_req.addr];
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(input int k, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (k & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic run(input int lg);
    int  n = 1 << lg;
    int  cycles;
    real sr, si, tol, scale;
    scale = 0.0;
    for (int k = 0; k < n; k++) begin
      x[k] = real'($urandom_range(0, 2000)) / 10.0 - 100.0;
      re_mem[bitrev(k, lg)] = real_to_fp(x[k]);
      im_mem[k] = fp_t'($urandom);
      scale += fabs(x[k]);
    end
    win_sel = win_sel_e'(lg - 8);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 5 * (n / 2) * lg + 1) begin
      failures++;
      $display("FAIL N=%0d run time %0d clocks, expected %0d", n, cycles, 5 * (n / 2) * lg + 1);
    end
    tol = scale * 2.0e-6;
    for (int m = 0; m < n; m++) begin
      sr = 0.0; si = 0.0;
      for (int k = 0; k < n; k++) begin
        sr += x[k] * $cos(6.283185307179586 * real'((k * m) % n) / real'(n));
        si -= x[k] * $sin(6.283185307179586 * real'((k * m) % n) / real'(n));
      end
      checks++;
      if (fabs(fp_to_real(re_mem[m]) - sr) > tol || fabs(fp_to_real(im_mem[m]) - si) > tol) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d X[%0d] = (%f, %f) expected (%f, %f)", n, m,
                   fp_to_real(re_mem[m]), fp_to_real(im_mem[m]), sr, si);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8);
    run(9);
    run(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
