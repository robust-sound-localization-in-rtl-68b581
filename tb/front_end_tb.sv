// front_end_tb: feeds random sample pairs and checks every memory write:
// bit-reversed address of the sample position, and value sample*w(k) with
// w the Hanning window (reference from $cos). For each of the three segment
// lengths it checks the bank swap and seg_ready at the end of a segment; for
// N = 256 it also checks that a segment ending while the DSP is busy is
// dropped (overrun, no swap).
module front_end_tb;
  import tdoa_pkg::*;
  import tb_fp_pkg::*;

  logic                       clk = 0, rst_n = 0;
  win_sel_e                   win_sel = WIN_256;
  logic                       sample_valid = 0, dsp_busy = 0;
  logic signed [SAMPLE_W-1:0] sample1 = '0, sample2 = '0;
  logic                       fe_we, fill_bank, seg_ready, overrun;
  logic [ADDR_W-1:0]          fe_addr;
  fp_t                        fe_wdata1, fe_wdata2;
  int                         checks = 0, failures = 0;

  always #5 clk = ~clk;

  front_end dut (.*);

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

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one segment; busy_at_end holds dsp_busy during the last sample
  task automatic segment(input int lg, input bit busy_at_end);
    int  n = 1 << lg;
    real w, e1, e2;
    logic bank0;
    int  readies = 0, overruns = 0;
    bank0 = fill_bank;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      sample1 = 8'($urandom); sample2 = 8'($urandom);
      sample_valid = 1;
      dsp_busy = busy_at_end && (k == n - 1);
      @(negedge clk);
      sample_valid = 0;
      check("write strobe", fe_we);
      check("bank stable during segment", fill_bank == bank0);
      w  = 0.5 - 0.5 * $cos(6.283185307179586 * real'(k) / real'(n));
      e1 = real'(sample1) * w;
      e2 = real'(sample2) * w;
      check($sformatf("address k=%0d", k), int'(fe_addr) == bitrev(k, lg));
      check($sformatf("value1 k=%0d", k), fabs(fp_to_real(fe_wdata1) - e1) <= 1.0e-5);
      check($sformatf("value2 k=%0d", k), fabs(fp_to_real(fe_wdata2) - e2) <= 1.0e-5);
      repeat (2) begin
        @(negedge clk);
        readies += seg_ready; overruns += overrun;
      end
    end
    dsp_busy = 0;
    if (busy_at_end) begin
      check("overrun pulse", overruns == 1 && readies == 0);
      check("no swap on overrun", fill_bank == bank0);
    end else begin
      check("seg_ready pulse", readies == 1 && overruns == 0);
      check("bank swapped", fill_bank != bank0);
    end
  endtask

  initial begin
    for (int s = 0; s < 3; s++) begin
      rst_n = 0;
      win_sel = win_sel_e'(s);
      repeat (3) @(posedge clk);
      rst_n = 1;
      segment(8 + s, 1'b0);
      if (s == 0) begin
        segment(8, 1'b1);
        segment(8, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
