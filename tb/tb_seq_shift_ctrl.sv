// tb_seq_shift_ctrl: closed-loop test of the sequence-shift controller.
//
// The testbench models the machine around the controller in nanoseconds: a
// bucket selection cycle of 22,678,427 ns (the period for which 14 cycles are
// 2,502,020 ns shorter than 16 pulses of 20 ms and 16 cycles are 2,854,830 ns
// longer than 18 pulses), a 50 Hz AC line of 20,000,000 ns with a random
// phase, and 20 ms pulses that run from each sequence start. For every pulse
// whose AC edge falls inside the sequence the AC delay is computed from the
// model and handed to the controller as a TDC measurement; BSC ticks are
// handed over in time order. The controller's choice of the next sequence
// type is then fed back into the model.
//
// Checks: the decision equals E = delay + shift against T_REF = 9.85 ms; the
// model's delay in the next sequence equals the controller's estimate; the
// sequence starts on the right BSC tick; over 300 sequences, once the loop has
// settled from its random start (five sequences), every AC delay stays between
// 4.5 ms and 15 ms, so `race` never rises; both sequence types
// occur; and a measurement outside the limits raises `race`.
module tb_seq_shift_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        bsc_tick = 1'b0, ac_valid = 1'b0;
  logic [31:0] ac_delay = '0;
  logic        seq_start, seq_long, next_long, decision_valid, race;
  logic signed [33:0] estimate, drift;
  logic [4:0]  pulse_idx, seq_pulses;
  logic [31:0] seq_count;

  seq_shift_ctrl dut (.*);

  localparam longint T_BSC = 22_678_427, T_AC = 20_000_000, T_P = 20_000_000;
  localparam longint T_REF = 9_850_000;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int n_race = 0;
  always @(negedge clk) if (race) n_race++;

  task automatic tick_bsc(output logic started);
    @(negedge clk);
    bsc_tick = 1'b1;
    @(negedge clk);
    bsc_tick = 1'b0;
    started = seq_start;
  endtask

  task automatic measure(input longint d);
    @(negedge clk);
    ac_valid = 1'b1;
    ac_delay = 32'(d);
    @(negedge clk);
    ac_valid = 1'b0;
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint phase, s, len, d, est_prev, d_min, d_max;
    logic   cur_long, started, exp_next;
    int     nbsc, n_short = 0, n_long = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    phase = longint'($urandom_range(19_999_999));
    s = 0;                 // start time of the running sequence
    cur_long = 1'b0;       // first sequence is short
    est_prev = -1;
    d_min = T_P; d_max = 0;
    tick_bsc(started);
    check("first tick starts a sequence", started, 1);
    for (int q = 0; q < 300; q++) begin
      check("running type", seq_long, cur_long);
      check("nominal pulses", seq_pulses, cur_long ? 18 : 16);
      if (cur_long) n_long++; else n_short++;
      nbsc = cur_long ? 16 : 14;
      len  = nbsc * T_BSC;
      // AC delay in this sequence: AC edge after the sequence start
      d = ((phase - s) % T_AC + T_AC) % T_AC;
      // the model's BSC period is rounded to 1 ns: allow 2 ns
      if (est_prev >= 0) check("estimate matches the model", (d > est_prev + 2 || d < est_prev - 2), 0);
      // after a few sequences to converge from the random start phase
      if (q == 5) n_race = 0;
      if (q >= 5 && d < d_min) d_min = d;
      if (q >= 5 && d > d_max) d_max = d;
      // pulses and BSC ticks in time order
      for (int k = 0, b = 1; k * T_P + d < len || b < nbsc; ) begin
        if (k * T_P + d < len && (b >= nbsc || k * T_P + d < b * T_BSC)) begin
          measure(d);
          if (k == 0) begin
            exp_next = (d + (cur_long ? -2_854_830 : 2_502_020)) >= T_REF;
            check("decision valid", decision_valid, 1);
            check("decision", next_long, exp_next);
            est_prev = d + (cur_long ? -2_854_830 : 2_502_020);
            check("estimate", estimate, est_prev);
          end
          k++;
        end else begin
          tick_bsc(started);
          check("no start inside a sequence", started, 0);
          b++;
        end
      end
      tick_bsc(started);
      check("sequence starts after its BSC count", started, 1);
      s += len;
      cur_long = exp_next;
    end
    check("race never raised in closed loop", n_race, 0);
    checks++;
    if (d_min < 4_500_000 || d_max > 15_000_000) begin
      failures++;
      $display("FAIL AC delay range %0d .. %0d", d_min, d_max);
    end
    checks++;
    if (n_short == 0 || n_long == 0) begin failures++; $display("FAIL a type never used"); end
    // out-of-range measurement
    measure(3_000_000);
    @(negedge clk);
    check("race on a delay below the limit", n_race, 1);
    measure(16_000_000);
    @(negedge clk);
    check("race on a delay above the limit", n_race, 2);
    $display("short=%0d long=%0d delay range %0d..%0d ns", n_short, n_long, d_min, d_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
