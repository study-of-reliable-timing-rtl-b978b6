// tb_evg_mux_counter: self-checking test of the generator's multiplexed counter.
//
// For random divisors, measures the distance between ticks, which must equal
// the divisor (1 for divisors 0 and 1), and checks that after `sync` the first
// tick comes exactly `divisor` cycles later.
module tb_evg_mux_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] divisor = 32'd1;
  logic        sync = 1'b0, tick;

  evg_mux_counter #(.W(32)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, last, c;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      d = (r < 2) ? r : int'($urandom_range(2, 300));
      @(negedge clk);
      divisor = 32'(d);
      sync = 1;
      @(negedge clk);
      sync = 0;
      c = 0; last = 0;
      for (int t = 1; t <= 6 * ((d < 1) ? 1 : d); t++) begin
        @(negedge clk);
        c++;
        if (tick) begin
          check("period", c - last, (last == 0 && d <= 1) ? 1 : ((d < 1) ? 1 : d));
          last = c;
        end
      end
      check("ticks seen", (last > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
