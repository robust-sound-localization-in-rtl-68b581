// phase_calc_tb: fills the two memories with random complex points, runs the
// phase conversion for each segment length and checks that points 0..N/4 were
// replaced by their phase ($atan2 reference, error below 2e-5 of a turn),
// that the points above N/4 are untouched, and the run time of 14 clocks per
// point.
module phase_calc_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  logic     clk = 0, rst_n = 0, start = 0, busy, done;
  win_sel_e win_sel = WIN_256;
  mem_req_t re_req, im_req;
  logic     re_en, im_en;
  fp_t      re_rdata, im_rdata;
  fp_t      re_mem [1024];
  fp_t      im_mem [1024];
  fp_t      re_ref [1024];
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_calc dut (.*);

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int lg);
    int  n = 1 << lg, np, cycles;
    real ref_t, got_t, err;
    np = n / 4 + 1;
    for (int k = 0; k < 1024; k++) begin
      re_mem[k] = real_to_fp(rand_real(-4, 12));
      im_mem[k] = real_to_fp(rand_real(-4, 12));
      re_ref[k] = re_mem[k];
    end
    re_mem[0] = '0; re_ref[0] = '0;            // x = 0 on the imaginary axis
    win_sel = win_sel_e'(lg - 8);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 14 * np + 1) begin
      failures++;
      $display("FAIL N=%0d run time %0d, expected %0d", n, cycles, 14 * np + 1);
    end
    for (int k = 0; k < 1024; k++) begin
      checks++;
      if (k < np) begin
        ref_t = $atan2(fp_to_real(im_mem[k]), fp_to_real(re_ref[k])) / 6.283185307179586;
        got_t = real'($signed(re_mem[k][AW-1:0])) / real'(1 << AW);
        err   = got_t - ref_t;
        if (err > 0.5) err -= 1.0;
        if (err < -0.5) err += 1.0;
        if (fabs(err) > 2.0e-5 || re_mem[k][31:AW] != {(32-AW){re_mem[k][AW-1]}}) begin
          failures++;
          $display("FAIL N=%0d phase[%0d] got %f expected %f", n, k, got_t, ref_t);
        end
      end else if (re_mem[k] != re_ref[k]) begin
        failures++;
        $display("FAIL N=%0d point %0d above N/4 was overwritten", n, k);
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
