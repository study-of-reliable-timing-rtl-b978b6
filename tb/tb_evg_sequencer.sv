// tb_evg_sequencer: self-checking test of the generator's sequence RAM.
//
// 1. Plays the example sequence 0x20 @500, 0x2a @1000, 0x24 @1001, 0x3c @2000
//    (timestamps in event clocks) and checks each code arrives d+2 cycles after
//    the trigger pulse, that the 0x7F terminator ends it without being sent and
//    that seq_done pulses.
// 2. Random ascending sequences with random prescalers: code k must arrive at
//    trigger + 2 + d*prescale.
// 3. Software / hardware banks: a program written while another plays takes
//    effect only after `load`, together with its trigger-source selection.
// 4. A second trigger during a sequence restarts it from the first entry.
module tb_evg_sequencer;
  import timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        wr_en = 1'b0, wr_trig_sel_en = 1'b0, load = 1'b0;
  logic [10:0] wr_addr = '0;
  logic [7:0]  wr_code = '0;
  logic [31:0] wr_ts = '0;
  logic [1:0]  wr_trig_sel = '0;
  logic [15:0] prescale = 16'd1;
  logic [3:0]  trig_in = '0;
  logic        evt_valid, running, seq_done;
  logic [7:0]  evt_code;
  logic [1:0]  active_trig_sel;

  evg_sequencer #(.DEPTH(2048), .TS_W(32), .NUM_TRIG(4)) dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // event log
  longint log_t[$];
  logic [7:0] log_c[$];
  int done_cnt = 0;
  always @(negedge clk) begin
    if (evt_valid) begin
      log_t.push_back(cyc);
      log_c.push_back(evt_code);
    end
    if (seq_done) done_cnt++;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(input int a, input logic [7:0] c, input longint ts);
    @(negedge clk);
    wr_en = 1; wr_addr = 11'(a); wr_code = c; wr_ts = 32'(ts);
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic set_sel(input int s);
    @(negedge clk);
    wr_trig_sel_en = 1; wr_trig_sel = 2'(s);
    @(negedge clk);
    wr_trig_sel_en = 0;
  endtask

  task automatic do_load();
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
  endtask

  // pulse trigger input s; returns the trigger cycle
  task automatic fire(input int s, output longint t);
    @(negedge clk);
    trig_in = 4'(1 << s);
    t = cyc;
    @(negedge clk);
    trig_in = '0;
  endtask

  task automatic wait_idle();
    while (running) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] EX_CODE [4] = '{8'h20, 8'h2a, 8'h24, 8'h3c};
  localparam int         EX_TS   [4] = '{500, 1000, 1001, 2000};

  initial begin
    longint t0;
    int n, d, p;
    int ts_list[$];
    logic [7:0] code_list[$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. example sequence on trigger 0
    for (int k = 0; k < 4; k++) wr(k, EX_CODE[k], EX_TS[k]);
    wr(4, EVT_END_SEQ, 2001);
    set_sel(0);
    do_load();
    check("selected source", active_trig_sel, 0);
    log_t.delete(); log_c.delete(); done_cnt = 0;
    fire(0, t0);
    wait_idle();
    check("example event count", log_t.size(), 4);
    for (int k = 0; k < 4 && k < log_t.size(); k++) begin
      check("example code", log_c[k], EX_CODE[k]);
      check("example time", log_t[k] - t0, EX_TS[k] + 2);
    end
    check("seq_done once", done_cnt, 1);

    // 2. random sequences, random prescale, random source
    for (int r = 0; r < 12; r++) begin
      n = int'($urandom_range(1, 60));
      p = int'($urandom_range(1, 5));
      ts_list.delete(); code_list.delete();
      d = 0;
      for (int k = 0; k < n; k++) begin
        d += int'($urandom_range(0, 40));
        ts_list.push_back(d);
        code_list.push_back(8'($urandom_range(1, 8'h6f)));
        wr(k, code_list[k], d);
      end
      wr(n, EVT_END_SEQ, d + 1);
      set_sel(r % 4);
      do_load();
      @(negedge clk);
      prescale = 16'(p);
      log_t.delete(); log_c.delete();
      // a trigger on another source must not start it
      fire((r + 1) % 4, t0);
      repeat (5) @(negedge clk);
      check("other source ignored", running, 0);
      fire(r % 4, t0);
      wait_idle();
      check("random event count", log_t.size(), n);
      for (int k = 0; k < n && k < log_t.size(); k++) begin
        check("random code", log_c[k], code_list[k]);
        // entries due in the same cycle go out one per cycle
        if (k == 0 || ts_list[k] * p + 2 > log_t[k-1] - t0)
          check("random time", log_t[k] - t0, ts_list[k] * p + 2);
        else
          check("queued time", log_t[k] - t0, log_t[k-1] - t0 + 1);
      end
    end
    @(negedge clk);
    prescale = 16'd1;

    // 3. bank swap: hardware bank plays 0x11 @10; write 0x22 @20 meanwhile
    wr(0, 8'h11, 10); wr(1, EVT_END_SEQ, 11); set_sel(1); do_load();
    wr(0, 8'h22, 20); wr(1, EVT_END_SEQ, 21); set_sel(2);
    log_t.delete(); log_c.delete();
    fire(1, t0);
    wait_idle();
    check("old program before load", (log_c.size() == 1) ? log_c[0] : 0, 8'h11);
    do_load();
    check("new source after load", active_trig_sel, 2);
    log_t.delete(); log_c.delete();
    fire(2, t0);
    wait_idle();
    check("new program after load", (log_c.size() == 1) ? log_c[0] : 0, 8'h22);
    check("new program time", (log_t.size() == 1) ? log_t[0] - t0 : 0, 22);

    // 4. retrigger restarts: fire, then again 10 cycles later
    do_load();  // back to the 0x11 program on source 1
    log_t.delete(); log_c.delete();
    fire(1, t0);
    repeat (4) @(negedge clk);
    fire(1, t0);
    wait_idle();
    check("restart sends once", log_t.size(), 1);
    check("restart time", (log_t.size() == 1) ? log_t[0] - t0 : 0, 12);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
