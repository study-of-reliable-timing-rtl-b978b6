// tb_seq_shift_89: the 8/9-pulse sequence shift, without and with drift
// compensation, under strong AC drift.
//
// The controller is set to the shorter sequences: a short sequence is 7 BSC
// periods with 8 pulses (the AC delay steps 1,251,010 ns later), a long one 8
// BSC periods with 9 pulses (1,427,415 ns earlier), with drift compensation on.
// The closed-loop model is the one of tb_seq_shift_drift_comp. An 8-pulse
// sequence has fewer than nine measurements, so the drift value is only
// renewed after 9-pulse sequences; the testbench's own prediction follows
// that rule. Two controllers see the same inputs, one without and one with
// compensation, and each in turn closes the loop. Runs: drift = +/-40 us and
// +/-120 us per pulse (120 us is the extreme drift that once broke the
// 16/18-pulse scheme in operation), 300 sequences each (about 50 s), with every
// AC delay inside 4.5 .. 15 ms and `race` never raised; each decision is
// checked against E = delay + shift + pulses * drift. At +/-160 us the
// uncompensated loop must fail within 20 s: a sequence's step (1.43 ms over 9
// pulses, 1.25 ms over 8) is then smaller than the drift it has to undo, so
// no choice of sequence type can hold the delay.
module tb_seq_shift_89;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        bsc_tick = 1'b0, ac_valid = 1'b0;
  logic [31:0] ac_delay = '0;
  // index 0: without compensation, 1: with compensation
  logic [1:0]  seq_start, seq_long, next_long, decision_valid, race;
  logic signed [33:0] estimate [2], drift_o [2];
  logic [4:0]  pulse_idx [2], seq_pulses [2];
  logic [31:0] seq_count [2];
  logic        comp = 1'b0;  // which controller closes the loop

  for (genvar c = 0; c < 2; c++) begin : g_dut
    seq_shift_ctrl #(
      .N_BSC_SHORT(7), .N_BSC_LONG(8), .PULSES_SHORT(8), .PULSES_LONG(9),
      .SHIFT_SHORT(1_251_010), .SHIFT_LONG(-1_427_415), .DRIFT_COMP(1'(c))
    ) dut (
      .clk, .rst_n, .bsc_tick, .ac_valid, .ac_delay,
      .seq_start(seq_start[c]), .seq_long(seq_long[c]), .next_long(next_long[c]),
      .decision_valid(decision_valid[c]), .estimate(estimate[c]),
      .pulse_idx(pulse_idx[c]), .seq_pulses(seq_pulses[c]), .race(race[c]),
      .seq_count(seq_count[c]), .drift(drift_o[c])
    );
  end

  localparam longint T_BSC = 22_678_427, T_P = 20_000_000, T_REF = 9_850_000;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int n_race = 0;
  always @(negedge clk) if (race[comp]) n_race++;

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

  // Runs the closed loop with the given drift, the controller chosen by
  // `comp` deciding the sequence types; returns the model time in ns of
  // the first pulse whose delay left the race limits, or -1.
  task automatic run(input longint ac_drift, input int nseq, output longint t_fail);
    longint t_ac, s, len, d, d0, t_pulse, dr;
    longint h [9];
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
    dr = 0;
    tick_bsc();
    for (int q = 0; q < nseq && t_fail < 0; q++) begin
      check("running type", seq_long[comp], cur_long);
      nbsc = cur_long ? 8 : 7;
      npl  = cur_long ? 9 : 8;
      len  = nbsc * T_BSC;
      d0   = -1;
      for (int k = 0, b = 1; k < npl || b < nbsc; ) begin
        t_pulse = s + k * T_P;
        d = ((10_000_000 - t_pulse) % t_ac + t_ac) % t_ac;
        if (k < npl && (b >= nbsc || t_pulse + d < b * T_BSC)) begin
          measure(d);
          if (k == 0) d0 = d;
          for (int j = 8; j > 0; j--) h[j] = h[j-1];
          h[0] = d;
          if (t_fail < 0 && (d < 4_500_000 || d > 15_000_000)) t_fail = t_pulse;
          k++;
        end else begin
          tick_bsc();
          b++;
        end
      end
      exp_next = (d0 + (cur_long ? -1_427_415 : 1_251_010) + npl * dr) >= T_REF;
      check("decision", next_long[comp], exp_next);
      check("drift used", drift_o[comp], dr);
      // mean drift of this sequence, used from the next one on
      if (comp && npl >= 9) begin
        dr = h[0] - h[8];
        dr = (dr >= 0) ? dr / 8 : -((-dr + 7) / 8);
      end
      tick_bsc();
      s += len;
      cur_long = exp_next;
    end
  endtask

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_fail;
    static longint drifts [4] = '{40_000, -40_000, 120_000, -120_000};
    for (int c = 0; c < 2; c++) begin
      comp = 1'(c);
      foreach (drifts[i]) begin
        run(drifts[i], 300, t_fail);
        check("no delay outside 4.5..15 ms", t_fail, -1);
        check("race never raised", n_race, 0);
        $display("compensation %0d, drift %0d ns: no race over 300 sequences", c, drifts[i]);
      end
    end
    // beyond the structural limit: one sequence's step no longer covers the
    // drift accumulated over it, whatever the estimate
    comp = 1'b0;
    foreach (drifts[i]) begin
      longint dl;
      dl = (drifts[i] > 0) ? 160_000 : -160_000;
      if (i < 2) begin
        run(dl, 150, t_fail);
        check("delay leaves 4.5..15 ms within 20 s", longint'(t_fail >= 0 && t_fail < 64'sd20_000_000_000), 1);
        check("race raised", longint'(n_race > 0), 1);
        $display("compensation 0, drift %0d ns: race after %0d ms", dl, t_fail / 1_000_000);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
