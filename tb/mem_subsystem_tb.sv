// mem_subsystem_tb: checks the ping-pong switching of the memory blocks.
// With fill_bank = 0 the front end fills block A of both microphones while
// the DSP ports write block B; after the swap the DSP ports must read what the
// front end wrote, and the front end's new writes must not disturb it. The
// shared block is checked on its own.
module mem_subsystem_tb;
  import tdoa_pkg::*;

  logic              clk = 0, fill_bank = 0, fe_we = 0;
  logic [ADDR_W-1:0] fe_addr = '0;
  fp_t               fe_wdata1 = '0, fe_wdata2 = '0;
  mem_req_t          c1_req = '0, c2_req = '0, sh_req = '0;
  logic              c1_en = 0, c2_en = 0, sh_en = 0;
  logic [WORD_W-1:0] c1_rdata, c2_rdata, sh_rdata;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  mem_subsystem dut (.*);

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

  function automatic logic [31:0] pat(input int who, input int a);
    return 32'(who) << 28 | 32'(a * 7 + 3);
  endfunction

  task automatic fill_and_check(input logic bank);
    // front end writes pattern 1/2 + bank, DSP writes pattern 5/6 + bank
    fill_bank = bank;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      fe_we = 1; fe_addr = ADDR_W'(a);
      fe_wdata1 = fp_t'(pat(1 + 2 * bank, a)); fe_wdata2 = fp_t'(pat(2 + 2 * bank, a));
      c1_en = 1; c1_req = '{addr: ADDR_W'(a), we: 1'b1, wdata: pat(9 + bank, a)};
      c2_en = 1; c2_req = '{addr: ADDR_W'(a), we: 1'b1, wdata: pat(11 + bank, a)};
    end
    @(negedge clk);
    fe_we = 0; c1_en = 0; c2_en = 0;
    // swap: the DSP now sees what the front end wrote
    fill_bank = ~bank;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      c1_en = 1; c1_req = '{addr: ADDR_W'(a), we: 1'b0, wdata: '0};
      c2_en = 1; c2_req = '{addr: ADDR_W'(a), we: 1'b0, wdata: '0};
      // the front end writes the other block meanwhile
      fe_we = 1; fe_addr = ADDR_W'(a); fe_wdata1 = '1; fe_wdata2 = '1;
      @(negedge clk);
      c1_en = 0; c2_en = 0; fe_we = 0;
      check("ch1 after swap", c1_rdata, pat(1 + 2 * bank, a));
      check("ch2 after swap", c2_rdata, pat(2 + 2 * bank, a));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    fill_and_check(1'b0);
    fill_and_check(1'b1);
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); sh_en = 1; sh_req = '{addr: ADDR_W'(a), we: 1'b1, wdata: pat(13, a)};
    end
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); sh_en = 1; sh_req = '{addr: ADDR_W'(a), we: 1'b0, wdata: '0};
      @(negedge clk); sh_en = 0;
      check("shared", sh_rdata, pat(13, a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
