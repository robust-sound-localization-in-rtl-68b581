// sram_block_tb: fills the 1024-word block with random data, reads every word
// back (one-clock read latency), then checks that a disabled or write cycle
// leaves rdata unchanged and that a write with en low stores nothing.
module sram_block_tb;
  logic        clk = 0, en = 0, we = 0;
  logic [9:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [1024];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_block dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    logic [31:0] held;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 10'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      en = 1; we = 0; addr = 10'(1023 - i);
      @(negedge clk);
      en = 0;
      check("read", rdata, model[1023 - i]);
    end
    held = rdata;
    @(negedge clk); en = 1; we = 1; addr = 10'd5; wdata = ~model[5]; model[5] = wdata;
    @(negedge clk); en = 0; we = 1; addr = 10'd6; wdata = ~model[6];
    @(negedge clk); check("hold", rdata, held);
    en = 1; we = 0; addr = 10'd5;
    @(negedge clk); check("write", rdata, model[5]);
    addr = 10'd6;
    @(negedge clk); check("no write when disabled", rdata, model[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
