// tb_linac_timing_top_full: the main timing station at its real time constants
// taken through one complete pulse: 20 ms at the 114.24 MHz event clock with a
// 1 GHz TDC, no parameter overridden.
//
// A bucket selection cycle (BSC) tick starts a sequence; the upper generator's
// main event starts the TDC and, 3.5 ms (399,840 event clocks) later, both
// lower generators; the pre-event makes the host write the next beam mode;
// the lower generators play the current mode, the downstream one ending with
// the readback code that loads the next mode. The AC line, 7 ms behind the
// BSC tick, is measured by the TDC in nanoseconds and the sequence-shift
// controller estimates the next sequence's AC delay as the measurement plus
// 2,502,020 ns (short sequence). The run ends at the second main event, 20 ms
// after the first.
//
// Checks: one sequence start; the TDC reading equals the distance between the
// start and stop edges in nanoseconds (within one count); the decision and its
// estimate; the 3.5 ms delay of the lower trigger; the ten beam-mode codes in
// the downstream event log; pre-event, readback, and the closed LER injection
// beam gate suppressing its trigger while the other triggers fire; the second
// main event exactly 2,284,800 event clocks after the first.
module tb_linac_timing_top_full;
  import timing_pkg::*;

  localparam longint P = 2_284_800;      // 20 ms in event clocks
  localparam longint D_LOWER = 399_840;  // 3.5 ms

  logic clk = 1'b0, clk_tdc = 1'b0, rst_n = 1'b0;
  always #4.377 clk = ~clk;         // 114.24 MHz
  always #0.5 clk_tdc = ~clk_tdc;   // 1 GHz

  int checks = 0, failures = 0;

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

  linac_timing_top dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  // beam mode with base code b: ten codes 1 us apart, readback at the end
  task automatic write_mode(input logic [7:0] b);
    for (int k = 0; k < 10; k++) seq_write(1, k, b + 8'(k), 114 * (k + 1));
    seq_write(1, 10, EVT_END_SEQ, 1200);
    for (int k = 0; k < 10; k++) seq_write(2, k, b + 8'(k), 114 * (k + 1) + 57);
    seq_write(2, 10, 8'h0F, 2000);
    seq_write(2, 11, EVT_END_SEQ, 2001);
    trig_sel_write(1, 0);
    trig_sel_write(2, 0);
  endtask

  // monitors
  realtime t_start = 0, t_stop = 0;
  logic    stop_seen = 1'b0;
  longint  t_main [$];
  longint  t_lower = -1;
  int n_seq = 0, n_pre = 0, n_rb = 0, n_ler = 0, n_dev = 0, n_meas = 0, n_dec = 0;
  logic [7:0] dn_codes [$];

  always @(posedge mid_trig[0]) begin
    t_main.push_back(cyc);
    t_start = $realtime;
    stop_seen = 1'b0;
  end
  always @(posedge ac_reg_out) begin
    if (!stop_seen) t_stop = $realtime;
    stop_seen = 1'b1;
  end
  always @(posedge mid_trig[1]) t_lower = cyc;
  always @(posedge pre_event_irq) n_pre++;
  always @(posedge readback) n_rb++;
  always @(posedge dn_trig[1]) n_ler++;
  always @(posedge dn_trig[0]) n_dev++;
  always @(negedge clk) begin
    if (rst_n) begin
      if (seq_start) n_seq++;
      if (shift_decision) begin
        n_dec++;
        check("estimate = measurement + short shift", shift_estimate, longint'(ac_delay) + 2_502_020);
        check("next sequence type", next_long, (longint'(ac_delay) + 2_502_020) >= 9_850_000);
      end
      if (ac_valid) begin
        n_meas++;
        checks++;
        if (!stop_seen || longint'(ac_delay) - longint'(t_stop - t_start) > 1 ||
            longint'(t_stop - t_start) - longint'(ac_delay) > 1) begin
          failures++;
          $display("FAIL AC measurement %0d, edges %0.1f ns apart", ac_delay, t_stop - t_start);
        end
      end
    end
    fifo_pop[1] <= 1'b0;
    if (rst_n && !fifo_empty[1] && !fifo_pop[1]) begin
      fifo_pop[1] <= 1'b1;
      dn_codes.push_back(fifo_dout[1][71:64]);
    end
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AC line: first edge 7 ms after the BSC tick, then every 20 ms
  realtime t_bsc;
  initial begin : machine
    @(posedge rst_n);
    #50000;
    @(negedge clk);
    t_bsc = $realtime;
    bsc_in = 1'b1;
    #1000 bsc_in = 1'b0;
    #(7_000_000 - 1000);
    forever begin
      ac50_in = 1'b1;
      #100000 ac50_in = 1'b0;
      #(20_000_000 - 100000);
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    map_write(0, 8'h01, 5'b00011);
    map_write(0, 8'h02, 5'b00100);
    map_write(0, 8'h00, 5'b00000);
    pg_delay[0][0] = 0;                pg_width[0][0] = 114;
    pg_delay[0][1] = 32'(D_LOWER);     pg_width[0][1] = 114;
    pg_delay[0][2] = 0;                pg_width[0][2] = 114;
    for (int k = 0; k < 10; k++) begin
      map_write(2, 8'd30 + 8'(k), (k == 0) ? 5'b10001 : (k == 1) ? 5'b10010 : 5'b10000);
      map_write(2, 8'd40 + 8'(k), (k == 0) ? 5'b10001 : (k == 1) ? 5'b10010 : 5'b10000);
    end
    map_write(2, 8'h0F, 5'b01000);
    map_write(2, 8'h00, 5'b00000);
    pg_delay[2][0] = 10; pg_width[2][0] = 20;
    pg_delay[2][1] = 10; pg_width[2][1] = 20;
    pg_delay[2][3] = 0;  pg_width[2][3] = 5;
    pg_gate_en[2][1] = 1'b1; pg_gate_bit[2][1] = 3'(DBUS_LER_INJ);
    dbus_dn[DBUS_LER_INJ] = 1'b0;   // LER injection gate closed in this pulse
    // upper program: 18 pulses of main event and pre-event
    for (int k = 0; k < 18; k++) begin
      seq_write(0, 2 * k,     8'h01, k * P);
      seq_write(0, 2 * k + 1, 8'h02, k * P + 1142);
    end
    seq_write(0, 36, EVT_END_SEQ, 17 * P + 1143);
    trig_sel_write(0, 4);
    @(negedge clk);
    host_upper_load = 1'b1;
    @(negedge clk);
    host_upper_load = 1'b0;
    // KBE now; on the pre-event, KBP for the next pulse
    write_mode(8'd30);
    @(negedge clk);
    host_lower_load = 1'b1;
    @(negedge clk);
    host_lower_load = 1'b0;
    @(posedge pre_event_irq);
    write_mode(8'd40);
    // run to the second main event
    wait (t_main.size() == 2);
    repeat (2000) @(negedge clk);
    check("one sequence start", n_seq, 1);
    check("one measurement", n_meas, 1);
    check("one decision", n_dec, 1);
    check("pulse period", t_main[1] - t_main[0], P);
    check("lower trigger 3.5 ms after main", t_lower - t_main[0], D_LOWER);
    check("pre-events", n_pre, 2);
    check("readback", n_rb, 1);
    check("device trigger fired", n_dev, 1);
    check("LER injection gated off", n_ler, 0);
    check("downstream events", dn_codes.size(), 10);
    for (int k = 0; k < 10 && k < dn_codes.size(); k++) check("KBE code", dn_codes[k], 30 + k);
    check("no race", race, 0);
    check("synchronous regulation", ac_async, 0);
    $display("AC delay %0d ns, estimate %0d ns, next sequence %s", ac_delay, shift_estimate,
             next_long ? "long" : "short");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
