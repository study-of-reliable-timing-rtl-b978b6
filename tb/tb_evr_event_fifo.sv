// tb_evr_event_fifo: self-checking test of the receiver's event FIFO.
//
// A queue in the testbench is the reference. Random pushes and pops check order
// and data; then the FIFO is filled until it refuses, which must happen after
// exactly 511 entries, set the sticky overflow flag and keep the data already
// stored. Finally the flag is cleared and the FIFO drained.
module tb_evr_event_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        push = 1'b0, pop = 1'b0, clear_overflow = 1'b0;
  logic [79:0] din = '0, dout;
  logic        empty, full, overflow;
  logic [9:0]  count;

  evr_event_fifo #(.W(80), .AW(9)) dut (.*);

  logic [79:0] q[$];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [79:0] rnd80();
    return {16'($urandom()), $urandom(), $urandom()};
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic do_push, do_pop;
    int accepted;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // random traffic
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      check("empty flag", empty, q.size() == 0);
      check("count", count, q.size());
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL dout order at %0d", n); end
      end
      do_push = ($urandom_range(2) != 0);
      do_pop  = ($urandom_range(2) != 0);
      push = do_push; pop = do_pop; din = rnd80();
      if (do_pop && q.size() > 0) void'(q.pop_front());
      if (do_push && q.size() < 511) q.push_back(din);
    end
    @(negedge clk);
    push = 0; pop = 0;
    // fill until refused
    while (q.size() > 0) begin
      pop = 1; void'(q.pop_front());
      @(negedge clk);
    end
    pop = 0;
    check("drained", empty, 1);
    accepted = 0;
    for (int k = 0; k < 520; k++) begin
      push = 1; din = 80'(k);
      @(negedge clk);
      if (!overflow) accepted++;
    end
    push = 0;
    check("capacity 511", accepted, 511);
    check("full", full, 1);
    check("overflow sticky", overflow, 1);
    check("count at full", count, 511);
    @(negedge clk);
    clear_overflow = 1;
    @(negedge clk);
    clear_overflow = 0;
    check("overflow cleared", overflow, 0);
    for (int k = 0; k < 511; k++) begin
      check("data kept", dout, k);
      pop = 1;
      @(negedge clk);
    end
    pop = 0;
    check("empty at end", empty, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
