// tb_evg: self-checking test of the complete event generator.
//
// Watches the frames leaving the generator and checks:
//  - sequencer 0, started by its software trigger in cycle T, puts an entry
//    with timestamp d on the link in cycle T+4+d, with the end code not sent;
//  - sequencer 1, selected to start on external trigger input 1, does the same
//    with the synchroniser's two extra cycles (T+6+d);
//  - a trigger event fed by the multiplexed counter sends its code every
//    `divisor` cycles, and one fed by the AC input sends its code once per AC
//    edge;
//  - when a trigger event and a sequencer entry fall in the same cycle, both
//    codes are sent, the trigger event first;
//  - the software event is sent;
//  - with the data buffer on, a block is sent in the odd slots while the bus
//    takes the even ones.
module tb_evg;
  import timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0]      ext_trig = '0;
  logic            ac_in = 1'b0;
  logic [7:0]      ext_in = '0;
  logic [7:0]      dbus = 8'h5a;
  logic [1:0]      seq_wr_en = '0, seq_wr_trig_sel_en = '0, seq_load = '0, sw_trig = '0;
  logic [10:0]     seq_wr_addr = '0;
  logic [7:0]      seq_wr_code = '0;
  logic [31:0]     seq_wr_ts = '0;
  logic [2:0]      seq_wr_trig_sel = '0;
  logic [15:0]     seq_prescale = 16'd1;
  logic [1:0]      seq_running, seq_done;
  logic [1:0][2:0] seq_active_trig_sel;
  logic [31:0]     mxc_divisor = 32'd0;
  logic [7:0]      tevt_enable = '0;
  logic [7:0][7:0] tevt_code = '0;
  logic [7:0][1:0] tevt_src = '0;
  logic            swe_valid = 1'b0;
  logic [7:0]      swe_code = '0;
  logic            buf_enable = 1'b0, buf_wr_en = 1'b0, buf_send = 1'b0, buf_busy;
  logic [10:0]     buf_wr_addr = '0;
  logic [7:0]      buf_wr_data = '0;
  logic [11:0]     buf_len = '0;
  evt_frame_t      frame;
  logic            evt_dropped;

  evg dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint log_t[$];
  logic [7:0] log_c[$];
  logic [7:0] buf_rx[$];
  always @(negedge clk) begin
    if (frame.code != 8'h00) begin
      log_t.push_back(cyc);
      log_c.push_back(frame.code);
    end
    if (frame.kind == DK_BUF || frame.kind == DK_BUF_END) buf_rx.push_back(frame.data);
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(input int s, input int a, input logic [7:0] c, input longint ts);
    @(negedge clk);
    seq_wr_en = 2'(1 << s); seq_wr_addr = 11'(a); seq_wr_code = c; seq_wr_ts = 32'(ts);
    @(negedge clk);
    seq_wr_en = '0;
  endtask

  task automatic setup_seq(input int s, input int sel);
    @(negedge clk);
    seq_wr_trig_sel_en = 2'(1 << s); seq_wr_trig_sel = 3'(sel);
    @(negedge clk);
    seq_wr_trig_sel_en = '0;
    seq_load = 2'(1 << s);
    @(negedge clk);
    seq_load = '0;
  endtask

  function automatic longint find(input logic [7:0] c, input int nth);
    int seen = 0;
    for (int k = 0; k < log_c.size(); k++) begin
      if (log_c[k] == c) begin
        if (seen == nth) return log_t[k];
        seen++;
      end
    end
    return -1;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // sequencer 0: software trigger
    wr(0, 0, 8'h20, 50); wr(0, 1, 8'h2a, 100); wr(0, 2, 8'h24, 101); wr(0, 3, 8'h3c, 200);
    wr(0, 4, EVT_END_SEQ, 201);
    setup_seq(0, 4);
    // sequencer 1: external trigger input 1
    wr(1, 0, 8'h51, 10); wr(1, 1, 8'h52, 30); wr(1, 2, EVT_END_SEQ, 31);
    setup_seq(1, 1);
    check("sequencer 1 source", seq_active_trig_sel[1], 1);
    log_t.delete(); log_c.delete();
    @(negedge clk);
    sw_trig = 2'b01; t0 = cyc;
    @(negedge clk);
    sw_trig = '0;
    repeat (250) @(negedge clk);
    check("sequence 0 frames", log_c.size(), 4);
    check("0x20 time", find(8'h20, 0) - t0, 54);
    check("0x2a time", find(8'h2a, 0) - t0, 104);
    check("0x24 time", find(8'h24, 0) - t0, 105);
    check("0x3c time", find(8'h3c, 0) - t0, 204);
    check("end code not sent", find(EVT_END_SEQ, 0), -1);
    // sequencer 1 via external trigger
    log_t.delete(); log_c.delete();
    @(negedge clk);
    ext_trig[1] = 1'b1; t0 = cyc;
    repeat (5) @(negedge clk);
    ext_trig[1] = 1'b0;
    repeat (60) @(negedge clk);
    check("external trigger 0x51", find(8'h51, 0) - t0, 16);
    check("external trigger 0x52", find(8'h52, 0) - t0, 36);
    // trigger event from the multiplexed counter, every 37 cycles
    log_t.delete(); log_c.delete();
    @(negedge clk);
    mxc_divisor = 32'd37;
    tevt_src[3] = 2'd2; tevt_code[3] = 8'h7a; tevt_enable[3] = 1'b1;
    repeat (400) @(negedge clk);
    tevt_enable[3] = 1'b0;
    repeat (5) @(negedge clk);
    n = 0;
    for (int k = 0; k < log_c.size(); k++) if (log_c[k] == 8'h7a) n++;
    checks++;
    if (n < 10 || n > 11) begin failures++; $display("FAIL counter events %0d", n); end
    for (int k = 1; k < n; k++) check("counter period", find(8'h7a, k) - find(8'h7a, k - 1), 37);
    // trigger event from the AC input
    log_t.delete(); log_c.delete();
    @(negedge clk);
    tevt_src[5] = 2'd1; tevt_code[5] = 8'h60; tevt_enable[5] = 1'b1;
    for (int k = 0; k < 3; k++) begin
      repeat (30) @(negedge clk);
      ac_in = 1'b1;
      repeat (10) @(negedge clk);
      ac_in = 1'b0;
    end
    repeat (10) @(negedge clk);
    check("AC trigger events", log_c.size(), 3);
    // collision: trigger event on ext_in[0] and sequencer 0 entry due together.
    // sw_trig at T: the sequencer requests entry d=50 in cycle T+52; an ext_in
    // edge set in cycle E stimulates the trigger event in E+2. Pick E = T+50.
    wr(0, 0, 8'h33, 50); wr(0, 1, EVT_END_SEQ, 51);
    setup_seq(0, 4);
    tevt_src[0] = 2'd0; tevt_code[0] = 8'h44; tevt_enable[0] = 1'b1;
    log_t.delete(); log_c.delete();
    @(negedge clk);
    sw_trig = 2'b01; t0 = cyc;
    @(negedge clk);
    sw_trig = '0;
    repeat (49) @(negedge clk);
    ext_in[0] = 1'b1;
    repeat (5) @(negedge clk);
    ext_in[0] = 1'b0;
    repeat (20) @(negedge clk);
    check("collision: both codes sent", log_c.size(), 2);
    check("trigger event first", find(8'h44, 0) - t0, 54);
    check("sequencer entry one cycle later", find(8'h33, 0) - t0, 55);
    // software event
    log_t.delete(); log_c.delete();
    @(negedge clk);
    swe_valid = 1'b1; swe_code = 8'h7b;
    @(negedge clk);
    swe_valid = 1'b0;
    repeat (4) @(negedge clk);
    check("software event", log_c.size() == 1 && log_c[0] == 8'h7b, 1);
    // data buffer
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      buf_wr_en = 1'b1; buf_wr_addr = 11'(k); buf_wr_data = 8'(k * 7 + 1);
    end
    @(negedge clk);
    buf_wr_en = 1'b0; buf_enable = 1'b1; buf_len = 12'd16; buf_send = 1'b1;
    buf_rx.delete();
    @(negedge clk);
    buf_send = 1'b0;
    repeat (50) @(negedge clk);
    check("buffer bytes", buf_rx.size(), 16);
    for (int k = 0; k < 16 && k < buf_rx.size(); k++) check("buffer byte", buf_rx[k], k * 7 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
