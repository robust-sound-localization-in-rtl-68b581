// phase_diff_tb: random phases in both computational memories; after the run
// memory 1 must hold phase1 - phase2 modulo one turn (sign-extended) for
// n = 0..N/4, memory 2 and the points above N/4 must be unchanged, and the
// run must take 3 clocks per point.
module phase_diff_tb;
  import tdoa_pkg::*;

  logic              clk = 0, rst_n = 0, start = 0, busy, done;
  win_sel_e          win_sel = WIN_256;
  mem_req_t          c1_req, c2_req;
  logic              c1_en, c2_en;
  logic [WORD_W-1:0] c1_rdata, c2_rdata;
  logic [WORD_W-1:0] m1 [1024], m2 [1024], r1 [1024], r2 [1024];
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_diff dut (.*);

  always_ff @(posedge clk) begin
    if (c1_en) begin
      if (c1_req.we) m1[c1_req.addr] <= c1_req.wdata;
      else           c1_rdata <= m1[c1_req.addr];
    end
    if (c2_en) begin
      if (c2_req.we) m2[c2_req.addr] <= c2_req.wdata;
      else           c2_rdata <= m2[c2_req.addr];
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int lg);
    int n = 1 << lg, np, cycles;
    int d;
    np = n / 4 + 1;
    for (int k = 0; k < 1024; k++) begin
      m1[k] = {{8{1'b0}}, 24'($urandom)}; m1[k][31:24] = {8{m1[k][23]}};
      m2[k] = {{8{1'b0}}, 24'($urandom)}; m2[k][31:24] = {8{m2[k][23]}};
      r1[k] = m1[k]; r2[k] = m2[k];
    end
    win_sel = win_sel_e'(lg - 8);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 3 * np + 1) begin
      failures++;
      $display("FAIL N=%0d run time %0d, expected %0d", n, cycles, 3 * np + 1);
    end
    for (int k = 0; k < 1024; k++) begin
      checks++;
      // independent reference: integer difference wrapped into [-2**23, 2**23)
      d = int'($signed(r1[k])) - int'($signed(r2[k]));
      if (d >= (1 << 23)) d -= (1 << 24);
      if (d < -(1 << 23)) d += (1 << 24);
      if (k < np ? ($signed(m1[k]) != d) : (m1[k] != r1[k])) begin
        failures++;
        $display("FAIL N=%0d point %0d: got %h", n, k, m1[k]);
      end
      checks++;
      if (m2[k] != r2[k]) begin
        failures++;
        $display("FAIL N=%0d memory 2 point %0d changed", n, k);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8);
    run(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
