// ac50_regulator: keeps the 50 Hz trigger interval inside 20 ms +/- tolerance.
//
// The AC-line trigger (one pulse per 50 Hz cycle, from the comparator module
// that watches the mains) normally passes straight through: synchronous mode.
// The interval between outputs must stay within PERIOD +/- TOL (20 ms +/- 40 us
// by default), which is what the sequence-shift logic downstream can follow.
//
//   - In synchronous mode an AC edge that comes at least PERIOD-TOL after the
//     last output is passed on. An AC edge that comes earlier is not passed;
//     the regulator switches to asynchronous mode and makes its own output at
//     PERIOD-TOL. If no AC edge has come by PERIOD+TOL, it makes its own output
//     there and switches to asynchronous mode.
//   - In asynchronous mode the regulator produces outputs at a fixed interval,
//     PERIOD-TOL when the AC line is ahead of it and PERIOD+TOL when the AC line
//     is behind, so its phase walks toward the AC line. It returns to
//     synchronous mode when an AC edge falls inside the allowed window after the
//     last output and the AC line's own interval is within PERIOD +/- TOL; that
//     edge is passed on.
//   - `pf_gate_close` is high in asynchronous mode so that injection into the
//     ring whose kicker needs the AC phase can be closed by the beam gate.
//
// The output pulse follows the chosen edge by PROC_DELAY clocks (500 ns at the
// 114.24 MHz event clock) and is OUT_W clocks wide. The rule for choosing the
// direction in asynchronous mode, the return condition, the output width and
// the clock are this design's choices; the window, the two fixed intervals and
// the mode switch follow the module's description.
module ac50_regulator #(
  parameter int PERIOD     = 2_284_800, // 20 ms in 114.24 MHz clocks
  parameter int TOL        = 4_570,     // 40 us
  parameter int PROC_DELAY = 57,        // 500 ns
  parameter int OUT_W      = 1_142,     // 10 us
  parameter int CW         = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ac_in,          // from the AC-line comparator, asynchronous
  output logic ac_out,         // regulated trigger
  output logic async_mode,
  output logic pf_gate_close,
  output logic ev_pulse,       // one cycle at every chosen edge (before PROC_DELAY)
  output logic [CW-1:0] last_interval  // interval between the last two chosen edges
);

  localparam logic [CW-1:0] T_MIN = CW'(PERIOD - TOL);
  localparam logic [CW-1:0] T_MAX = CW'(PERIOD + TOL);

  logic          ac_rise, ac_lvl;
  logic          started;
  logic [CW-1:0] cnt;        // clocks since the last chosen edge
  logic [CW-1:0] ac_cnt;     // clocks since the last AC edge
  logic          ac_seen;    // ac_cnt is valid
  logic          dir_long;   // asynchronous interval is PERIOD+TOL
  logic          ev;
  logic          go_async, go_sync;
  logic [CW-1:0] dly;
  logic          dly_run;
  logic [CW-1:0] wcnt;
  logic          ac_int_ok;

  sync_edge u_ac (.clk, .rst_n, .d(ac_in), .level(ac_lvl), .rise(ac_rise));

  assign ac_int_ok = ac_seen && (ac_cnt >= T_MIN) && (ac_cnt <= T_MAX);

  // choose the edges
  always_comb begin
    ev       = 1'b0;
    go_async = 1'b0;
    go_sync  = 1'b0;
    if (!started) begin
      ev = ac_rise;
    end else if (!async_mode) begin
      if (ac_rise && cnt >= T_MIN) begin
        ev = 1'b1;
      end else if (ac_rise) begin
        go_async = 1'b1;                      // early AC edge
      end else if (cnt >= T_MAX) begin
        ev       = 1'b1;                      // AC edge missing
        go_async = 1'b1;
      end
    end else begin
      if (ac_rise && cnt >= T_MIN && cnt <= T_MAX && ac_int_ok) begin
        ev      = 1'b1;
        go_sync = 1'b1;
      end else if (cnt >= (dir_long ? T_MAX : T_MIN)) begin
        ev = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started       <= 1'b0;
      cnt           <= '0;
      ac_cnt        <= '0;
      ac_seen       <= 1'b0;
      dir_long      <= 1'b0;
      async_mode    <= 1'b0;
      dly           <= '0;
      dly_run       <= 1'b0;
      wcnt          <= '0;
      ac_out        <= 1'b0;
      ev_pulse      <= 1'b0;
      last_interval <= '0;
    end else begin
      ev_pulse <= ev;
      // time since the last AC edge
      if (ac_rise) begin
        ac_cnt  <= CW'(1);
        ac_seen <= 1'b1;
      end else if (ac_cnt != '1) begin
        ac_cnt <= ac_cnt + 1'b1;
      end
      // time since the last chosen edge
      if (ev) begin
        started <= 1'b1;
        cnt     <= CW'(1);
        if (started) last_interval <= cnt;
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
      // mode and direction
      if (go_async) async_mode <= 1'b1;
      if (go_sync)  async_mode <= 1'b0;
      if (!started || !async_mode) begin
        // entering asynchronous mode: an early edge means the line is ahead,
        // a missing edge means it is behind
        if (go_async) dir_long <= !ac_rise;
      end else if (ac_rise && !go_sync) begin
        // the line is behind the last output when its edge comes in the first
        // half of the interval
        dir_long <= (cnt < CW'(PERIOD / 2));
      end
      // processing delay and output pulse
      if (ev) begin
        dly     <= CW'(PROC_DELAY);
        dly_run <= 1'b1;
      end else if (dly_run) begin
        if (dly <= CW'(1)) begin
          dly_run <= 1'b0;
          ac_out  <= 1'b1;
          wcnt    <= CW'(OUT_W);
        end else begin
          dly <= dly - 1'b1;
        end
      end
      if (ac_out) begin
        if (wcnt <= CW'(1)) ac_out <= 1'b0;
        else                wcnt <= wcnt - 1'b1;
      end
    end
  end

  assign pf_gate_close = async_mode;

endmodule
