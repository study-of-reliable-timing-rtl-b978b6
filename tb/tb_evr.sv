// tb_evr: self-checking test of the complete event receiver.
//
// Frames are driven as a generator would send them. Checks:
//  - a mapped event code in the frame of cycle t starts pulse i at
//    t+3+delay for `width` cycles, and unmapped codes start nothing;
//  - a pulse with beam gating passes only while its distributed-bus bit is 1;
//  - seconds sent as 32 shift events and latched by 0x7D, and the timestamp
//    counter stepped by 0x7C, appear in the event FIFO entries of mapped events;
//  - more than 511 stored events set the FIFO overflow flag.
module tb_evr;
  import timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  evt_frame_t       frame = '{code: 8'h00, data: 8'h00, kind: DK_DBUS};
  logic             map_wr_en = 1'b0;
  logic [7:0]       map_wr_code = '0;
  logic [4:0]       map_wr_data = '0;
  logic [3:0][31:0] pg_delay = '0, pg_width = '0;
  logic [3:0]       pg_polarity = '0, gate_en = '0;
  logic [3:0][2:0]  gate_bit = '0;
  logic             ts_mode = 1'b0;
  logic [15:0]      ts_div = 16'd1;
  logic             fifo_pop = 1'b0, fifo_clear_overflow = 1'b0;
  logic [79:0]      fifo_dout;
  logic             fifo_empty, fifo_overflow, fifo_full;
  logic [9:0]       fifo_count;
  logic [10:0]      buf_rd_addr = '0;
  logic [7:0]       buf_rd_data, dbus, evt_code;
  logic             buf_rx_done, evt_valid, hb_timeout, presc_reset;
  logic [11:0]      buf_rx_len;
  logic [3:0]       pulse_out, pg_active;
  logic [31:0]      seconds, ts_count;

  evr dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // first rising edge and high-cycle count of each output since the last clear
  longint first_rise [4];
  int     high_cnt [4];
  logic [3:0] out_q = '0;
  always @(negedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (pulse_out[i] && !out_q[i] && first_rise[i] < 0) first_rise[i] = cyc;
      if (pulse_out[i]) high_cnt[i]++;
    end
    out_q <= pulse_out;
  end

  task automatic clear_mon();
    for (int i = 0; i < 4; i++) begin first_rise[i] = -1; high_cnt[i] = 0; end
  endtask

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic map(input logic [7:0] c, input logic [4:0] bits);
    @(negedge clk);
    map_wr_en = 1'b1; map_wr_code = c; map_wr_data = bits;
    @(negedge clk);
    map_wr_en = 1'b0;
  endtask

  // one frame with an event code; returns its cycle
  task automatic send(input logic [7:0] c, output longint t);
    @(negedge clk);
    frame.code = c;
    t = cyc;
    @(negedge clk);
    frame.code = 8'h00;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    logic [31:0] secs;
    int d, w;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    clear_mon();
    for (int c = 0; c < 256; c++) map(8'(c), 5'b0);
    // timing of pulses 0..3 on code 0x30 (0 and 1) and 0x31 (2 and 3)
    map(8'h30, 5'b00011);
    map(8'h31, 5'b01100);
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 4; i++) begin
        pg_delay[i] = 32'($urandom_range(0, 60));
        pg_width[i] = 32'($urandom_range(1, 20));
      end
      clear_mon();
      send((r % 2 == 0) ? 8'h30 : 8'h31, t0);
      send(8'h45, d);   // unmapped
      repeat (100) @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        if ((r % 2 == 0) == (i < 2)) begin
          check("pulse start", first_rise[i] - t0, 3 + longint'(pg_delay[i]));
          check("pulse width", high_cnt[i], pg_width[i]);
        end else begin
          check("no pulse", high_cnt[i], 0);
        end
      end
    end
    // beam gate: pulse 1 gated by bus bit 3
    pg_delay[1] = 0; pg_width[1] = 40;
    gate_en[1] = 1'b1; gate_bit[1] = 3'd3;
    frame.data = 8'h08;
    clear_mon();
    send(8'h30, t0);
    repeat (60) @(negedge clk);
    check("gate open passes", high_cnt[1], 40);
    frame.data = 8'h00;
    repeat (3) @(negedge clk);
    clear_mon();
    send(8'h30, t0);
    repeat (60) @(negedge clk);
    check("gate closed blocks", high_cnt[1], 0);
    check("ungated pulse still runs", high_cnt[0], pg_width[0]);
    // seconds and timestamp into the FIFO
    map(8'h50, 5'b10000);
    secs = $urandom();
    for (int b = 31; b >= 0; b--) send(secs[b] ? EVT_TS_SHIFT1 : EVT_TS_SHIFT0, t0);
    send(EVT_TS_RESET, t0);
    for (int k = 0; k < 7; k++) send(EVT_TS_INC, t0);
    send(8'h50, t0);
    repeat (4) @(negedge clk);
    check("fifo has the event", fifo_count, 1);
    check("fifo code", fifo_dout[71:64], 8'h50);
    check("fifo seconds", fifo_dout[63:32], secs);
    check("fifo timestamp", fifo_dout[31:0], 7);
    // overflow
    for (int k = 0; k < 520; k++) send(8'h50, t0);
    repeat (4) @(negedge clk);
    check("fifo full count", fifo_count, 511);
    check("fifo overflow", fifo_overflow, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
