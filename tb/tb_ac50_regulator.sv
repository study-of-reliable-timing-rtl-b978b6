// tb_ac50_regulator: self-checking test of the 50 Hz trigger regulator, at a
// scaled-down period (2000 clocks, tolerance 40, processing delay 5).
//
// The AC-line pulse train goes through four phases: a jittered but legal line,
// which must be passed with a constant latency and no mode change; a line that
// is too slow, which must send the regulator to asynchronous mode; a legal line
// again, to which it must return; and a sudden phase jump, which must again
// cause asynchronous mode and then a return. Throughout, every interval
// between two regulated outputs must lie inside the allowed window, and the
// beam-gate close output must equal the asynchronous-mode flag.
module tb_ac50_regulator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int P = 2000, TOL = 40, PD = 5, OW = 10;

  logic        ac_in = 1'b0;
  logic        ac_out, async_mode, pf_gate_close, ev_pulse;
  logic [31:0] last_interval;

  ac50_regulator #(.PERIOD(P), .TOL(TOL), .PROC_DELAY(PD), .OUT_W(OW), .CW(32)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // monitor: output edges, intervals, mode changes
  longint last_ac = -1, last_out = -1, latency = -1;
  logic   out_q = 1'b0, async_q = 1'b0;
  int     n_out = 0, n_async = 0, n_resync = 0, n_window_bad = 0;
  logic   check_latency = 1'b0;
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (pf_gate_close != async_mode) failures++;
      if (ac_out && !out_q) begin
        n_out++;
        if (last_out >= 0) begin
          checks++;
          if (cyc - last_out < P - TOL || cyc - last_out > P + TOL) begin
            failures++;
            n_window_bad++;
            $display("FAIL interval %0d outside window", cyc - last_out);
          end
        end
        if (check_latency && !async_mode) begin
          if (latency < 0) latency = cyc - last_ac;
          check("constant latency in synchronous mode", cyc - last_ac, latency);
        end
        last_out = cyc;
      end
      if (async_mode && !async_q) n_async++;
      if (!async_mode && async_q) n_resync++;
      out_q   <= ac_out;
      async_q <= async_mode;
    end
  end

  task automatic ac_pulse_after(input int gap);
    repeat (gap - 20) @(negedge clk);
    ac_in = 1'b1;
    last_ac = cyc;
    repeat (20) @(negedge clk);
    ac_in = 1'b0;
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a0, a1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: legal line with jitter
    ac_pulse_after(100);
    check_latency = 1'b1;
    for (int k = 0; k < 30; k++) ac_pulse_after(P - 30 + int'($urandom_range(60)));
    check_latency = 1'b0;
    check("no asynchronous mode on a legal line", n_async, 0);
    checks++;
    if (latency < PD || latency > PD + 4) begin
      failures++; $display("FAIL latency %0d", latency);
    end
    // phase 2: line too slow
    for (int k = 0; k < 8; k++) ac_pulse_after(P + 150);
    check("asynchronous after slow line", async_mode, 1);
    check("beam gate closed", pf_gate_close, 1);
    a0 = n_async;
    // phase 3: legal again, must come back
    for (int k = 0; k < 120 && async_mode; k++) ac_pulse_after(P);
    check("back to synchronous", async_mode, 0);
    for (int k = 0; k < 5; k++) ac_pulse_after(P);
    check_latency = 1'b1;
    for (int k = 0; k < 5; k++) ac_pulse_after(P);
    check_latency = 1'b0;
    // phase 4: phase jump (early edge)
    ac_pulse_after(P / 2);
    for (int k = 0; k < 3; k++) ac_pulse_after(P);
    a1 = n_async;
    check("asynchronous after phase jump", a1 > a0, 1);
    for (int k = 0; k < 120 && async_mode; k++) ac_pulse_after(P);
    check("back to synchronous after jump", async_mode, 0);
    checks++;
    if (n_resync < 2) begin failures++; $display("FAIL resyncs %0d", n_resync); end
    check("no interval outside the window", n_window_bad, 0);
    $display("outputs=%0d async_entries=%0d resyncs=%0d latency=%0d", n_out, n_async, n_resync, latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
