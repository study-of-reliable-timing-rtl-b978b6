// tb_linac_timing_top: end-to-end test of the main timing station, with the
// pulse period scaled from 20 ms to 2000 event clocks.
//
// The testbench plays the machine and the host computer:
//  - a bucket selection cycle (BSC) of 2268 event clocks, so that 14 cycles are
//    248 clocks shorter than 16 pulses and 16 cycles 288 clocks longer than 18
//    pulses (the same proportions as the real machine); the TDC clock is eight
//    times the event clock, so the sequence-shift constants are 1984 and -2304
//    TDC counts, the reference 7880 and the race limits 3600 and 12000;
//  - a 50 Hz AC line of exactly 2000 event clocks, whose phase is chosen so
//    that the first measurements are too early (a race) and which later jumps
//    by half a period (asynchronous regulation, then return);
//  - a PF coincidence pulse 30 clocks after every lower-generator trigger;
//  - the host: it loads the upper program (main event 0x01 and pre-event 0x02
//    every pulse), programs the receivers, and on every pre-event writes a
//    random beam mode (ten event codes from the mode's block, upstream and
//    downstream, the downstream one ending with the readback code 0x0F) into
//    the lower generators' software sequencers, choosing the PF coincidence as
//    trigger for the PF and PF-AR modes. It toggles the LER injection beam
//    gate bit at random every pulse and reads the downstream event FIFO.
//
// Checks and counted mechanisms: sequence starts, short and long sequences,
// shift decisions, race flags, AC measurements against the times seen by the
// testbench, lower triggers 3.5 ms (350 clocks) after the main event, PF
// coincidence triggering, pre-events and readbacks, the beam mode played in
// every pulse against the one the host wrote one pulse earlier, beam-gate
// suppression of the LER injection trigger, asynchronous AC regulation with
// the PF beam gate closed and the return to synchronous mode, event FIFO
// overflow in the upstream receiver (never read), and the three calculators
// (bucket selection, preparation trigger, RF phase shift).
// A mechanism that never happens counts as a failure.
module tb_linac_timing_top;
  import timing_pkg::*;

  localparam int P    = 2000;   // pulse period, event clocks
  localparam int BSC  = 2268;   // BSC period, event clocks
  localparam int R    = 8;      // TDC clocks per event clock
  localparam int D_LOWER = 350; // 3.5 ms
  localparam int NSEQ = 7;

  logic clk = 1'b0, clk_tdc = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;          // 8 ns
  always #0.5 clk_tdc = ~clk_tdc; // 1 ns

  int checks = 0, failures = 0;

  // DUT signals
  logic bsc_in = 1'b0, ac50_in = 1'b0, pf_coinc_in = 1'b0;
  logic [7:0] dbus_up = 8'h00, dbus_dn = 8'h00;
  logic [15:4] tdc_stop_aux = '0;
  logic [1:0]  host_seq_sel = '0;
  logic        host_seq_wr = 1'b0, host_trig_sel_wr = 1'b0, host_upper_load = 1'b0, host_lower_load = 1'b0;
  logic [10:0] host_seq_addr = '0;
  logic [7:0]  host_seq_code = '0;
  logic [31:0] host_seq_ts = '0;
  logic [2:0]  host_trig_sel = '0;
  logic [1:0]  host_evr_sel = '0;
  logic        host_map_wr = 1'b0;
  logic [7:0]  host_map_code = '0;
  logic [4:0]  host_map_data = '0;
  logic [2:0][3:0][31:0] pg_delay = '0, pg_width = '0;
  logic [2:0][3:0]       pg_gate_en = '0;
  logic [2:0][3:0][2:0]  pg_gate_bit = '0;
  logic [1:0]  fifo_pop = '0;
  logic [1:0][79:0] fifo_dout;
  logic [1:0]  fifo_empty;
  logic [5:0]  tdc_rd_addr = '0;
  logic [31:0] tdc_rd_data;
  logic        bc_valid = 1'b0;
  logic [16:0] bc_opp = '0;
  logic [12:0] bc_ler = '0;
  logic [4:0]  bc_cycle = '0;
  logic        bc_out_valid;
  logic [12:0] bc_ler_out;
  logic [7:0]  bc_dr_out, bc_dr_sel_out;
  logic [16:0] bc_opp_out;
  logic [20:0] bc_delay_out;
  logic        pt_valid = 1'b0, pt_mode = 1'b0;
  logic [31:0] pt_main_cur = '0, pt_main_next = '0;
  logic        pt_out_valid, pt_neg;
  logic [31:0] pt_pre;
  logic        rf_valid = 1'b0;
  logic [12:0] rf_m0 = '0;
  logic [4:0]  rf_cycle = '0;
  logic [5:0]  rf_n = '0;
  logic [3:0]  rf_k = '0;
  logic signed [2:0] rf_cyc_off = '0;
  logic        rf_out_valid;
  logic [20:0] rf_clock0, rf_clock1;
  logic [7:0]  rf_d0, rf_d2;
  logic signed [10:0] rf_dt;
  logic [3:0]  up_trig, dn_trig, mid_trig;
  logic        pre_event_irq, readback, seq_start, seq_long, next_long, shift_decision;
  logic [31:0] ac_delay;
  logic        ac_valid, race, ac_async, pf_gate_close, ac_reg_out;
  logic [1:0]  lower_running;
  logic        dropped_evt;
  logic signed [33:0] shift_estimate, shift_drift;
  logic [1:0]  fifo_overflow;
  logic [2:0]  hb_timeout;

  linac_timing_top #(
    .AC_PERIOD(P), .AC_TOL(40), .AC_PROC_DELAY(5), .AC_OUT_W(10),
    .SHIFT_SHORT((16 * P - 14 * BSC) * R), .SHIFT_LONG((18 * P - 16 * BSC) * R),
    .T_REF(985 * R), .RACE_LO(450 * R), .RACE_HI(1500 * R),
    .PT_PULSE(P), .PT_T_CHARGE(1200)
  ) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ counters
  int n_seq = 0, n_short = 0, n_long = 0, n_dec = 0, n_race = 0, n_meas = 0;
  int n_main = 0, n_lower = 0, n_pf_trig = 0, n_pre = 0, n_readback = 0;
  int n_gate_open = 0, n_gate_closed = 0, n_ler_inj = 0, n_async = 0, n_resync = 0;
  int n_gate_async_ok = 0, n_mode_ok = 0, n_dn_events = 0, n_ovf = 0, n_calc = 0;

  // beam modes
  localparam logic [7:0] BASES [12] = '{8'd30, 8'd40, 8'd50, 8'd60, 8'd70, 8'd130,
                                        8'd140, 8'd150, 8'd160, 8'd170, 8'd180, 8'd190};
  int mode_of_pulse [int];  // pulse index -> mode index
  int pulse_idx = -1;       // index of the current pulse (main events seen - 1)

  // ------------------------------------------------------------ host tasks
  task automatic seq_write(input int sel, input int a, input logic [7:0] c, input longint ts);
    @(negedge clk);
    host_seq_sel = 2'(sel); host_seq_wr = 1'b1; host_seq_addr = 11'(a);
    host_seq_code = c; host_seq_ts = 32'(ts);
    @(negedge clk);
    host_seq_wr = 1'b0;
  endtask

  task automatic trig_sel_write(input int sel, input int s);
    @(negedge clk);
    host_seq_sel = 2'(sel); host_trig_sel_wr = 1'b1; host_trig_sel = 3'(s);
    @(negedge clk);
    host_trig_sel_wr = 1'b0;
  endtask

  task automatic map_write(input int evr, input logic [7:0] c, input logic [4:0] bits);
    @(negedge clk);
    host_evr_sel = 2'(evr); host_map_wr = 1'b1; host_map_code = c; host_map_data = bits;
    @(negedge clk);
    host_map_wr = 1'b0;
  endtask

  // lower programs for beam mode m
  task automatic write_mode(input int m);
    logic pf;
    pf = (BASES[m] == 8'd50) || (BASES[m] == 8'd70);
    for (int k = 0; k < 10; k++) seq_write(1, k, BASES[m] + 8'(k), 10 + 10 * k);
    seq_write(1, 10, EVT_END_SEQ, 120);
    for (int k = 0; k < 10; k++) seq_write(2, k, BASES[m] + 8'(k), 15 + 10 * k);
    seq_write(2, 10, 8'h0F, 200);
    seq_write(2, 11, EVT_END_SEQ, 201);
    trig_sel_write(1, pf ? 1 : 0);
    trig_sel_write(2, pf ? 1 : 0);
  endtask

  // ------------------------------------------------------------ machine
  longint ac_offset;
  logic   ac_jumped = 1'b0;

  initial begin : bsc_gen
    @(posedge rst_n);
    repeat (3000) @(negedge clk);
    forever begin
      bsc_in = 1'b1;
      repeat (10) @(negedge clk);
      bsc_in = 1'b0;
      repeat (BSC - 10) @(negedge clk);
    end
  end

  initial begin : ac_gen
    @(posedge rst_n);
    // BSC tick at 3000; first AC edge ~300 clocks after the first pulse start
    repeat (3000 + 300) @(negedge clk);
    forever begin
      ac50_in = 1'b1;
      repeat (20) @(negedge clk);
      ac50_in = 1'b0;
      if (n_seq == 4 && !ac_jumped) begin
        ac_jumped = 1'b1;
        repeat (P - 20 + P / 2) @(negedge clk);
      end else begin
        repeat (P - 20) @(negedge clk);
      end
    end
  end

  // PF coincidence 30 clocks after each lower trigger
  initial begin : pf_gen
    forever begin
      @(posedge mid_trig[1]);
      repeat (30) @(negedge clk);
      pf_coinc_in = 1'b1;
      repeat (4) @(negedge clk);
      pf_coinc_in = 1'b0;
    end
  end

  // ------------------------------------------------------------ monitors
  realtime t_start = 0, t_stop = 0;
  logic    stop_seen = 1'b0;
  longint  t_main = -1;
  logic    gate_now = 1'b0, ler_seen = 1'b0;
  logic    async_q = 1'b0;

  always @(posedge mid_trig[0]) begin
    // close the books of the previous pulse
    if (pulse_idx >= 0) begin
      if (gate_now) check("LER injection trigger with gate open", ler_seen, 1);
      else          check("LER injection trigger suppressed", ler_seen, 0);
    end
    n_main++;
    pulse_idx++;
    t_start = $realtime;
    stop_seen = 1'b0;
    t_main = cyc;
    ler_seen = 1'b0;
    // beam gate for this pulse
    gate_now = 1'($urandom_range(1));
    if (gate_now) n_gate_open++; else n_gate_closed++;
    dbus_dn[DBUS_LER_INJ] = gate_now;
  end
  always @(posedge ac_reg_out) begin
    if (!stop_seen) t_stop = $realtime;
    stop_seen = 1'b1;
  end
  always @(posedge mid_trig[1]) begin
    n_lower++;
    check("lower trigger 3.5 ms after main", cyc - t_main, D_LOWER);
  end
  always @(posedge dn_trig[1]) begin
    n_ler_inj++;
    ler_seen = 1'b1;
  end
  always @(posedge pre_event_irq) n_pre++;
  always @(posedge readback) n_readback++;
  always @(posedge up_trig[0]) if (g_mode_pf()) n_pf_trig++;

  function automatic logic g_mode_pf();
    if (!mode_of_pulse.exists(pulse_idx)) return 1'b0;
    return (BASES[mode_of_pulse[pulse_idx]] == 8'd50) || (BASES[mode_of_pulse[pulse_idx]] == 8'd70);
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      if (seq_start) begin
        n_seq++;
        @(negedge clk);
        if (seq_long) n_long++; else n_short++;
      end
    end
  end
  always @(negedge clk) begin
    if (rst_n) begin
      if (shift_decision) n_dec++;
      if (race) n_race++;
      if (ac_async && !async_q) n_async++;
      if (!ac_async && async_q) n_resync++;
      if (ac_async && pf_gate_close) n_gate_async_ok++;
      async_q <= ac_async;
      if (fifo_overflow[0]) n_ovf++;
      if (ac_valid) begin
        n_meas++;
        // start and stop pass identical synchronisers: the count is the edge
        // distance in TDC clocks, within one count for the sampling phase
        checks++;
        if (!stop_seen || (longint'(ac_delay) - longint'((t_stop - t_start) / 1.0) > 1) ||
            (longint'((t_stop - t_start) / 1.0) - longint'(ac_delay) > 1)) begin
          failures++;
          $display("FAIL AC measurement %0d, edges %0.1f ns apart", ac_delay, t_stop - t_start);
        end
      end
    end
  end

  // downstream event log: every event must belong to the mode of its pulse
  always @(negedge clk) begin
    fifo_pop[1] <= 1'b0;
    if (rst_n && !fifo_empty[1] && !fifo_pop[1]) begin
      fifo_pop[1] <= 1'b1;
      n_dn_events++;
      if (fifo_dout[1][71:64] != 8'h0F && mode_of_pulse.exists(pulse_idx)) begin
        checks++;
        if (fifo_dout[1][71:64] >= BASES[mode_of_pulse[pulse_idx]] &&
            fifo_dout[1][71:64] <= BASES[mode_of_pulse[pulse_idx]] + 8'd9)
          n_mode_ok++;
        else begin
          failures++;
          $display("FAIL pulse %0d: code %0d not in mode %0d", pulse_idx,
                   fifo_dout[1][71:64], BASES[mode_of_pulse[pulse_idx]]);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ host
  initial begin
    int m;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // receivers: clear all maps
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 256; c++) map_write(r, 8'(c), 5'b0);
    // middle: 0x01 -> TDC start and lower trigger, 0x02 -> pre-event
    map_write(0, 8'h01, 5'b00011);
    map_write(0, 8'h02, 5'b00100);
    pg_delay[0][0] = 0;       pg_width[0][0] = 5;
    pg_delay[0][1] = D_LOWER; pg_width[0][1] = 5;
    pg_delay[0][2] = 0;       pg_width[0][2] = 5;
    // local receivers: every beam-mode code to the FIFO; code base+0 to pulse
    // 0, base+1 (downstream) to pulse 1 gated by the LER injection bit
    for (int b = 0; b < 12; b++) begin
      for (int k = 0; k < 10; k++) begin
        map_write(1, BASES[b] + 8'(k), (k == 0) ? 5'b10001 : 5'b10000);
        map_write(2, BASES[b] + 8'(k), (k == 0) ? 5'b10001 : (k == 1) ? 5'b10010 : 5'b10000);
      end
    end
    map_write(2, 8'h0F, 5'b01000);   // readback
    for (int r = 1; r < 3; r++) begin
      pg_delay[r][0] = 2; pg_width[r][0] = 4;
      pg_delay[r][1] = 2; pg_width[r][1] = 4;
      pg_delay[r][3] = 0; pg_width[r][3] = 3;
    end
    pg_gate_en[2][1] = 1'b1; pg_gate_bit[2][1] = 3'(DBUS_LER_INJ);
    // upper program: main event and pre-event for the pulses of a long sequence
    for (int k = 0; k < 18; k++) begin
      seq_write(0, 2 * k,     8'h01, k * P);
      seq_write(0, 2 * k + 1, 8'h02, k * P + 20);
    end
    seq_write(0, 36, EVT_END_SEQ, 17 * P + 21);
    trig_sel_write(0, 4);
    @(negedge clk);
    host_upper_load = 1'b1;
    @(negedge clk);
    host_upper_load = 1'b0;
    // first beam mode, loaded by hand
    m = int'($urandom_range(11));
    mode_of_pulse[0] = m;
    write_mode(m);
    @(negedge clk);
    host_lower_load = 1'b1;
    @(negedge clk);
    host_lower_load = 1'b0;
    // calculators
    for (int c = 0; c < 23; c++) begin
      @(negedge clk);
      bc_valid = 1'b1; bc_ler = 13'd0; bc_cycle = 5'(c); bc_opp = 17'(c * 5120);
      @(negedge clk);
      bc_valid = 1'b0;
      @(negedge clk);
      check("DR bucket for LER bucket 0", bc_dr_sel_out, (49 * c * 5120) % 230);
      check("LER bucket", bc_ler_out, 0);
      n_calc++;
    end
    @(negedge clk);
    pt_valid = 1'b1; pt_mode = 1'b0; pt_main_cur = 32'd500; pt_main_next = 32'd300;
    @(negedge clk);
    pt_valid = 1'b0;
    check("preparation trigger", pt_pre, 300 - 500 + P - 1200);
    n_calc++;
    // RF phase shift of 4 buckets and 1 event clock for LER bucket 0 through
    // DR bucket 0: DR bucket 210 in the same cycle
    @(negedge clk);
    rf_valid = 1'b1; rf_m0 = 13'd0; rf_cycle = 5'd0; rf_n = 6'd4; rf_k = 4'd1; rf_cyc_off = 3'sd0;
    @(negedge clk);
    rf_valid = 1'b0;
    @(negedge clk);
    check("RF shift DR bucket", rf_d2, 210);
    check("RF shift delay", rf_clock1, ((117_760 - 836) * 11 + 1));
    check("RF shift time error", rf_dt, -5);
    n_calc++;
    // every pre-event: the beam mode of the next pulse
    while (n_seq < NSEQ + 1) begin
      @(posedge pre_event_irq or posedge seq_start);
      if (pre_event_irq) begin
        m = (n_seq < 2) ? (pulse_idx % 2 == 0 ? 2 : 0) : int'($urandom_range(11));
        mode_of_pulse[pulse_idx + 1] = m;
        write_mode(m);
      end
    end
    // summary
    $display("sequences=%0d short=%0d long=%0d decisions=%0d race=%0d measurements=%0d",
             n_seq, n_short, n_long, n_dec, n_race, n_meas);
    $display("main=%0d lower=%0d pf_triggered=%0d pre=%0d readback=%0d",
             n_main, n_lower, n_pf_trig, n_pre, n_readback);
    $display("gate_open=%0d gate_closed=%0d ler_inj=%0d async=%0d resync=%0d fifo_overflow_cycles=%0d",
             n_gate_open, n_gate_closed, n_ler_inj, n_async, n_resync, n_ovf);
    $display("mode_ok=%0d dn_events=%0d calc=%0d", n_mode_ok, n_dn_events, n_calc);
    check("short sequences happened", n_short > 0, 1);
    check("long sequences happened", n_long > 0, 1);
    check("shift decisions happened", n_dec >= NSEQ, 1);
    check("race happened", n_race > 0, 1);
    check("AC measurements happened", n_meas > 50, 1);
    check("lower triggers", n_lower >= n_main - 1, 1);
    check("PF coincidence triggers happened", n_pf_trig > 0, 1);
    check("pre-events, one per pulse", n_pre, n_main);
    check("readbacks happened", n_readback >= n_main - 1, 1);
    check("beam gate closed happened", n_gate_closed > 0, 1);
    check("beam gate open happened", n_gate_open > 0, 1);
    check("asynchronous regulation happened", n_async > 0, 1);
    check("return to synchronous happened", n_resync > 0, 1);
    check("PF gate closed in asynchronous mode", n_gate_async_ok > 0, 1);
    check("all three calculators used", n_calc, 25);
    check("beam modes checked", n_mode_ok > 100, 1);
    check("FIFO overflow happened", n_ovf > 0, 1);
    check("no dropped events", dropped_evt, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
