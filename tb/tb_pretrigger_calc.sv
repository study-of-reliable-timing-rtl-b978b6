// tb_pretrigger_calc: self-checking test of the preparation-trigger delay.
//
// Feeds random main-trigger delays in both modes and compares with the two
// formulas worked out here in 64-bit integers: relative to the current main
// trigger, d_main_next - d_main_cur + 20 ms - 12 ms; relative to the pulse
// start, d_main_next + 20 ms - 12 ms (20 ms = 2,284,800 and 12 ms = 1,370,880
// event clocks of 8.75 ns). Negative results must raise `neg` and give 0.
// Checks the one-cycle latency too.
module tb_pretrigger_calc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        in_valid = 1'b0, mode = 1'b0;
  logic [31:0] d_main_cur = '0, d_main_next = '0;
  logic        out_valid, neg;
  logic [31:0] d_pre;

  pretrigger_calc dut (.*);

  localparam longint PULSE = 2_284_800, TCH = 1_370_880;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cur, nxt, exp;
    logic m;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      cur = longint'($urandom_range(2_284_799));
      nxt = longint'($urandom_range(2_284_799));
      if (n % 10 == 0) cur = 2_284_000;   // force some negative results
      if (n % 10 == 0) nxt = 1000;
      m   = n[0];
      exp = m ? nxt + PULSE - TCH : nxt - cur + PULSE - TCH;
      @(negedge clk);
      in_valid = 1'b1; mode = m; d_main_cur = 32'(cur); d_main_next = 32'(nxt);
      @(negedge clk);
      in_valid = 1'b0;
      check("valid after one cycle", out_valid, 1);
      check("neg", neg, exp < 0);
      check("d_pre", d_pre, (exp < 0) ? 0 : exp);
      @(negedge clk);
      check("valid is a pulse", out_valid, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
