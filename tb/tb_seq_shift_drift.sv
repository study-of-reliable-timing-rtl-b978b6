// tb_seq_shift_drift: AC-line drift workload for the sequence-shift controller.
//
// The machine around the controller is modelled in nanoseconds as in the
// controller's own testbench (BSC period 22,678,427 ns, 20 ms pulses running
// from each sequence start), but the AC line now runs at 20 ms + drift, so the
// AC arrival delay changes by `drift` from one pulse to the next. The AC edge
// starts 10 ms into the first pulse, as in the published drift study. Four
// runs with a fresh reset each:
//   drift = +40 us and -40 us: 300 sequences (about 100 s) with every AC delay
//     inside 4.5 .. 15 ms and `race` never raised;
//   drift = +60 us and -60 us: the delay leaves 4.5 .. 15 ms and `race` is
//     raised within 20 s.
// In every sequence the controller's decision is also checked against
// E = delay + shift >= T_REF. The limits follow the study of time to failure
// against drift (no failure up to 40 us, fast failure at 60 us); the exact
// failure time depends on the start phase and is not checked.
module tb_seq_shift_drift;
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

  localparam longint T_BSC = 22_678_427, T_P = 20_000_000, T_REF = 9_850_000;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int n_race = 0;
  always @(negedge clk) if (race) n_race++;

  task automatic tick_bsc();
    @(negedge clk);
    bsc_tick = 1'b1;
    @(negedge clk);
    bsc_tick = 1'b0;
  endtask

  task automatic measure(input longint d);
    @(negedge clk);
    ac_valid = 1'b1;
    ac_delay = 32'(d);
    @(negedge clk);
    ac_valid = 1'b0;
  endtask

  // Runs the closed loop with the given drift; returns the model time in ns of
  // the first pulse whose delay left the race limits, or -1.
  task automatic run(input longint ac_drift, input int nseq, output longint t_fail);
    longint t_ac, s, len, d, d0, t_pulse;
    logic   cur_long, exp_next;
    int     nbsc, npl;
    t_ac = T_P + ac_drift;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    n_race = 0;
    s = 0;
    cur_long = 1'b0;
    t_fail = -1;
    tick_bsc();
    for (int q = 0; q < nseq && t_fail < 0; q++) begin
      check("running type", seq_long, cur_long);
      nbsc = cur_long ? 16 : 14;
      npl  = cur_long ? 18 : 16;
      len  = nbsc * T_BSC;
      d0   = -1;
      for (int k = 0, b = 1; k < npl || b < nbsc; ) begin
        t_pulse = s + k * T_P;
        d = ((10_000_000 - t_pulse) % t_ac + t_ac) % t_ac;
        if (k < npl && (b >= nbsc || t_pulse + d < b * T_BSC)) begin
          measure(d);
          if (k == 0) d0 = d;
          if (t_fail < 0 && (d < 4_500_000 || d > 15_000_000)) t_fail = t_pulse;
          k++;
        end else begin
          tick_bsc();
          b++;
        end
      end
      exp_next = (d0 + (cur_long ? -2_854_830 : 2_502_020)) >= T_REF;
      check("decision", next_long, exp_next);
      tick_bsc();
      s += len;
      cur_long = exp_next;
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_fail;
    static longint drifts [4] = '{40_000, -40_000, 60_000, -60_000};
    foreach (drifts[i]) begin
      if (i < 2) begin
        run(drifts[i], 300, t_fail);
        check("no delay outside 4.5..15 ms", t_fail, -1);
        check("race never raised", n_race, 0);
        $display("drift %0d ns: no race over 300 sequences", drifts[i]);
      end else begin
        run(drifts[i], 60, t_fail);
        check("delay leaves 4.5..15 ms within 20 s", longint'(t_fail >= 0 && t_fail < 64'sd20_000_000_000), 1);
        check("race raised", n_race > 0, 1);
        $display("drift %0d ns: race after %0d ms", drifts[i], t_fail / 1_000_000);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
