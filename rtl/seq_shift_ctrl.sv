// seq_shift_ctrl: sequence-shift controller of the main timing station.
//
// The 50 Hz pulses have to follow the AC line while bucket selection for the
// damping ring and the positron ring needs a fiducial from the 44.1 Hz bucket
// selection cycle (BSC, 22.68 ms). The pulses are therefore grouped into
// sequences: a sequence starts on a BSC tick and lasts N_BSC_SHORT or
// N_BSC_LONG BSC periods, during which the 20 ms pulses run free. A short
// sequence (16 pulses, 14 BSC periods) ends about 2.5 ms before its 16th pulse
// would, so the next sequence starts early and the AC line arrives SHIFT_SHORT
// later inside each pulse; a long one (18 pulses, 16 BSC periods) ends about
// 2.85 ms late and moves the AC line SHIFT_LONG earlier.
//
// The AC arrival delay inside every pulse is measured by the TDC and given as
// ac_valid/ac_delay (TDC units, 1 ns). At the first pulse of sequence n, whose
// type is already fixed, the controller estimates the arrival at the first pulse
// of sequence n+1 as E = ac_delay + shift(type n) and picks the type of sequence
// n+1: short (positive shift) when E < T_REF, long otherwise, so that the AC
// arrival stays near T_REF, in the middle of the pulse. Every measurement
// outside RACE_LO..RACE_HI (4.5 ms .. 15 ms) raises `race`, the condition in
// which the pulse logic of the station breaks down.
//
// seq_start is a one-cycle pulse on the BSC tick that begins a sequence; it
// triggers the upper-level event generator. The first sequence after reset is
// short. Defaults are the 16/18-pulse configuration; the 8/9-pulse one is
// N_BSC_SHORT=7, N_BSC_LONG=8 and half the shifts.
//
// Drift compensation (DRIFT_COMP=1, off by default, as in present operation):
// a strong AC drift moves the delay by a few hundred microseconds within one
// sequence, which the plain estimate ignores. With compensation the controller
// keeps the last DRIFT_AVG+1 measurements of each sequence; at the next
// sequence start it takes the mean pulse-to-pulse drift over them,
// (newest - oldest) / DRIFT_AVG, rounded down, and adds that drift times the
// pulse count of the running sequence to the estimate. A sequence with fewer
// measurements keeps the previous drift value. With DRIFT_COMP=0 the `drift`
// output stays zero and synthesis removes the then unused history registers.
// Using the recent mean drift is the proposed improvement; the window, the
// extrapolation over the running sequence and the power-of-two averaging are
// this design's choices.
module seq_shift_ctrl #(
  parameter int N_BSC_SHORT  = 14,
  parameter int N_BSC_LONG   = 16,
  parameter int PULSES_SHORT = 16,
  parameter int PULSES_LONG  = 18,
  parameter int SHIFT_SHORT  = 2_502_020,   // ns, AC arrives later
  parameter int SHIFT_LONG   = -2_854_830,  // ns, AC arrives earlier
  parameter int T_REF        = 9_850_000,
  parameter int RACE_LO      = 4_500_000,
  parameter int RACE_HI      = 15_000_000,
  parameter bit DRIFT_COMP   = 1'b0,
  parameter int DRIFT_AVG    = 8            // power of two
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bsc_tick,
  input  logic        ac_valid,
  input  logic [31:0] ac_delay,
  output logic        seq_start,
  output logic        seq_long,       // type of the running sequence
  output logic        next_long,      // type chosen for the next sequence
  output logic        decision_valid, // one cycle after each decision
  output logic signed [33:0] estimate,
  output logic [4:0]  pulse_idx,      // measurements seen in this sequence
  output logic [4:0]  seq_pulses,     // nominal pulse count of the running sequence
  output logic        race,
  output logic [31:0] seq_count,
  output logic signed [33:0] drift    // mean drift per pulse, 0 without compensation
);

  localparam int AVG_SH = $clog2(DRIFT_AVG);

  logic [31:0] hist [DRIFT_AVG+1];
  logic [4:0]  hist_n;
  logic signed [33:0] drift_comp;

  logic       running;
  logic [4:0] bsc_cnt;
  logic       seq_end;
  logic signed [33:0] est_now;

  assign seq_end    = running && bsc_tick &&
                      (bsc_cnt + 5'd1 >= 5'(seq_long ? N_BSC_LONG : N_BSC_SHORT));
  assign drift_comp = DRIFT_COMP ? 34'(drift * $signed({29'd0, seq_pulses})) : '0;
  assign est_now    = $signed({2'b00, ac_delay}) +
                      (seq_long ? 34'(SHIFT_LONG) : 34'(SHIFT_SHORT)) + drift_comp;
  assign seq_pulses = 5'(seq_long ? PULSES_LONG : PULSES_SHORT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running        <= 1'b0;
      bsc_cnt        <= '0;
      seq_start      <= 1'b0;
      seq_long       <= 1'b0;
      next_long      <= 1'b0;
      decision_valid <= 1'b0;
      estimate       <= '0;
      pulse_idx      <= '0;
      race           <= 1'b0;
      seq_count      <= '0;
      hist_n         <= '0;
      drift          <= '0;
      for (int i = 0; i <= DRIFT_AVG; i++) hist[i] <= '0;
    end else begin
      seq_start      <= 1'b0;
      decision_valid <= 1'b0;
      race           <= 1'b0;
      if ((!running && bsc_tick) || seq_end) begin
        running   <= 1'b1;
        seq_start <= 1'b1;
        bsc_cnt   <= '0;
        pulse_idx <= '0;
        seq_count <= seq_count + 1'b1;
        if (running) seq_long <= next_long;
        hist_n    <= '0;
        if (DRIFT_COMP && 32'(hist_n) > 32'(DRIFT_AVG))
          drift <= ($signed({2'b00, hist[0]}) - $signed({2'b00, hist[DRIFT_AVG]})) >>> AVG_SH;
      end else if (running && bsc_tick) begin
        bsc_cnt <= bsc_cnt + 1'b1;
      end
      if (ac_valid && running && !seq_start) begin
        if (pulse_idx != 5'h1f) pulse_idx <= pulse_idx + 1'b1;
        if (hist_n != 5'h1f)    hist_n    <= hist_n + 1'b1;
        hist[0] <= ac_delay;
        for (int i = 1; i <= DRIFT_AVG; i++) hist[i] <= hist[i-1];
        race <= (ac_delay < 32'(RACE_LO)) || (ac_delay > 32'(RACE_HI));
        if (pulse_idx == '0) begin
          estimate       <= est_now;
          next_long      <= (est_now >= 34'(T_REF));
          decision_valid <= 1'b1;
        end
      end
    end
  end

endmodule
