// evr_timestamp: time-of-day logic of an event receiver.
//
// Two 32-bit registers give every received event a time: the seconds register
// and the timestamp counter. The generator sends the seconds value one bit at a
// time before the second starts, with event 0x70 for a 0 and 0x71 for a 1; the
// bits go into a shift register, most significant bit first. Event 0x7D starts
// the new second: the shift register is copied into the seconds register and the
// timestamp counter goes to zero. The counter then advances either on event 0x7C
// (ts_mode 0) or on a divided event clock (ts_mode 1, every ts_div cycles).
// Event 0x7A restarts the heartbeat watchdog; if no 0x7A arrives for
// HB_TIMEOUT event clocks, `hb_timeout` goes high until the next one. Event
// 0x7B gives a one-cycle `presc_reset` that realigns dividers.
//
// Timing: registers change in the cycle after the event strobe. The shift
// order, the watchdog length and the divider mode encoding are this design's
// choices.
module evr_timestamp
  import timing_pkg::*;
#(
  parameter int TS_W       = 32,
  parameter int HB_TIMEOUT = 182_784_000  // event clocks, 1.6 s at 114.24 MHz
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            evt_valid,
  input  logic [7:0]      evt_code,
  input  logic            ts_mode,
  input  logic [15:0]     ts_div,
  output logic [31:0]     seconds,
  output logic [TS_W-1:0] ts_count,
  output logic [31:0]     sec_shift,
  output logic            hb_timeout,
  output logic            presc_reset
);

  logic [31:0] hb_cnt;
  logic [15:0] div_cnt;
  logic        div_tick;

  assign div_tick = (div_cnt + 16'd1 >= ts_div);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seconds     <= '0;
      ts_count    <= '0;
      sec_shift   <= '0;
      hb_cnt      <= '0;
      hb_timeout  <= 1'b0;
      presc_reset <= 1'b0;
      div_cnt     <= '0;
    end else begin
      presc_reset <= 1'b0;
      div_cnt     <= div_tick ? 16'd0 : div_cnt + 16'd1;
      // heartbeat watchdog
      if (evt_valid && evt_code == EVT_HEARTBEAT) begin
        hb_cnt     <= '0;
        hb_timeout <= 1'b0;
      end else if (hb_cnt >= 32'(HB_TIMEOUT - 1)) begin
        hb_timeout <= 1'b1;
      end else begin
        hb_cnt <= hb_cnt + 1'b1;
      end
      // timestamp counter
      if (evt_valid && evt_code == EVT_TS_RESET) begin
        ts_count <= '0;
        seconds  <= sec_shift;
        div_cnt  <= '0;
      end else if (ts_mode ? div_tick : (evt_valid && evt_code == EVT_TS_INC)) begin
        ts_count <= ts_count + 1'b1;
      end
      if (evt_valid && evt_code == EVT_TS_SHIFT0) sec_shift <= {sec_shift[30:0], 1'b0};
      if (evt_valid && evt_code == EVT_TS_SHIFT1) sec_shift <= {sec_shift[30:0], 1'b1};
      if (evt_valid && evt_code == EVT_RESET_PRESC) begin
        presc_reset <= 1'b1;
        div_cnt     <= '0;
      end
    end
  end

endmodule
