// adc_serial_if_tb: two ADC models deliver random codes; each sample pair must
// come out as two's complement (code - 128) once per CLKS_PER_SAMPLE clocks.
module adc_serial_if_tb;
  import tdoa_pkg::*;

  localparam int unsigned CPS = 200;

  logic       clk = 0, rst_n = 0;
  logic       adc_cs_n, adc_sclk, sample_valid;
  logic [1:0] adc_sdata;
  logic signed [7:0] sample1, sample2;
  logic [7:0] code1, code2, exp1, exp2;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_serial_if #(.CLKS_PER_SAMPLE(CPS), .SCLK_HALF(4)) dut (.*);
  adc_model u_a1 (.cs_n(adc_cs_n), .sclk(adc_sclk), .code(code1), .sdata(adc_sdata[0]));
  adc_model u_a2 (.cs_n(adc_cs_n), .sclk(adc_sclk), .code(code2), .sdata(adc_sdata[1]));

  // a new code is presented whenever a conversion starts
  always @(negedge adc_cs_n) begin
    exp1 = code1; exp2 = code2;
    #1;
    code1 = 8'($urandom); code2 = 8'($urandom);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_t, t, n;
    code1 = 8'h00; code2 = 8'hff;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0; last_t = -1; t = 0;
    while (n < 300) begin
      @(posedge clk); t++;
      if (sample_valid) begin
        checks++;
        if (sample1 !== $signed(exp1 - 8'd128) || sample2 !== $signed(exp2 - 8'd128)) begin
          failures++;
          $display("FAIL sample %0d: got %0d %0d expected codes %h %h", n, sample1, sample2, exp1, exp2);
        end
        if (last_t >= 0) begin
          checks++;
          if (t - last_t != CPS) begin
            failures++;
            $display("FAIL sample period %0d", t - last_t);
          end
        end
        last_t = t;
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
