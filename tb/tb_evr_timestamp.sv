// tb_evr_timestamp: self-checking test of the receiver's seconds and timestamp
// registers.
//
// Sends a random 32-bit seconds value as 32 shift events (0x70 / 0x71, most
// significant bit first), then 0x7D, and checks that the seconds register takes
// the value and the timestamp counter restarts. Counts 0x7C events in event mode
// and divided clocks in clock mode, checks the one-cycle pulse on 0x7B and the
// heartbeat watchdog with a short timeout.
module tb_evr_timestamp;
  import timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int HB = 200;

  logic        evt_valid = 1'b0, ts_mode = 1'b0;
  logic [7:0]  evt_code = '0;
  logic [15:0] ts_div = 16'd1;
  logic [31:0] seconds, ts_count, sec_shift;
  logic        hb_timeout, presc_reset;

  evr_timestamp #(.TS_W(32), .HB_TIMEOUT(HB)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic send(input logic [7:0] code);
    @(negedge clk);
    evt_valid = 1'b1; evt_code = code;
    @(negedge clk);
    evt_valid = 1'b0; evt_code = EVT_NULL;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] secs;
    int incs, div, base;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      ts_mode = 1'b0;
      secs = $urandom();
      for (int b = 31; b >= 0; b--) send(secs[b] ? EVT_TS_SHIFT1 : EVT_TS_SHIFT0);
      check("shift register", sec_shift, secs);
      send(EVT_HEARTBEAT);
      send(EVT_TS_RESET);
      check("seconds latched", seconds, secs);
      check("timestamp reset", ts_count, 0);
      incs = int'($urandom_range(40));
      for (int k = 0; k < incs; k++) send(EVT_TS_INC);
      send(8'h31);  // an ordinary event does nothing to the counter
      check("event-mode count", ts_count, incs);
      // clock mode: counter advances every div clocks
      div = int'($urandom_range(1, 6));
      @(negedge clk);
      ts_div = 16'(div); ts_mode = 1'b1;
      evt_valid = 1'b1; evt_code = EVT_TS_RESET;
      @(negedge clk);
      evt_valid = 1'b0; evt_code = EVT_NULL;
      base = int'(ts_count);
      repeat (div * 10) @(negedge clk);
      check("clock-mode count", ts_count - base, 10);
      // prescaler reset pulse
      @(negedge clk);
      evt_valid = 1'b1; evt_code = EVT_RESET_PRESC;
      @(negedge clk);
      evt_valid = 1'b0; evt_code = EVT_NULL;
      check("presc_reset pulse", presc_reset, 1);
      @(negedge clk);
      check("presc_reset one cycle", presc_reset, 0);
      send(EVT_HEARTBEAT);
    end
    // heartbeat watchdog
    send(EVT_HEARTBEAT);
    repeat (HB - 20) @(negedge clk);
    check("no timeout before limit", hb_timeout, 0);
    repeat (40) @(negedge clk);
    check("timeout after limit", hb_timeout, 1);
    send(EVT_HEARTBEAT);
    check("heartbeat clears timeout", hb_timeout, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
