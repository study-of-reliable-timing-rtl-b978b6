// linac_timing_top: main timing station of the injector LINAC with two local
// event receivers.
//
// The station turns two unrelated clocks of the machine, the 50 Hz AC line and
// the 44.1 Hz bucket selection cycle (BSC) of the positron rings, into one
// trigger per 20 ms pulse that both follows the AC phase and keeps a known
// distance to the BSC fiducial. The chain, all on the 114.24 MHz event clock
// except the TDC:
//
//   bsc_in --> seq_shift_ctrl --seq_start--> upper EVG (sequencer 0, source 4)
//   upper EVG plays one sequence: per 20 ms pulse a main event and, shortly
//       after it, a pre-event. The program holds the pulses of a long sequence;
//       a short one is cut off by the next seq_start, which restarts it.
//   upper EVG link --> middle EVR
//       pulse 0: TDC start (main event, no delay)
//       pulse 1: trigger of both lower EVGs (main event, 3.5 ms later)
//       pulse 2: pre_event_irq to the host (it writes the next beam mode into
//                the lower EVGs' software sequencers)
//   ac50_in --> ac50_regulator --> TDC stop channel 0
//   TDC channel 0, first hit --> AC arrival delay --> seq_shift_ctrl, which
//       chooses the length of the next sequence
//   lower EVGs (upstream, downstream), sequencer 0, trigger source 0 = middle
//       EVR pulse 1, source 1 = pf_coinc_in (PF / PF-AR beam modes)
//   lower EVG links --> upstream / downstream local EVRs --> device triggers,
//       gated by the beam-gate bits that the lower EVGs carry on the DBus
//   downstream EVR pulse 3 = readback: its rising edge loads the software
//       sequencers of both lower EVGs into their hardware sequencers. So in
//       every pulse the order is pre-event (host writes the beam mode of the
//       next pulse), lower trigger (the current mode plays), readback (the
//       next mode becomes current). host_lower_load makes the first load.
//
// What the host does (writing sequences and beam modes, bucket selection from
// the reflective memory) comes in through plain write strobes. The bucket,
// RF phase-shift and preparation-trigger calculators are brought out for the
// host to use. TDC
// channel 0 measures the regulated AC trigger (the only channel whose hits are
// announced to the event-clock side), channels 1 and 2 the local receivers'
// pulse 0 outputs, channel 3 the lower-generator trigger; channels 4..15 come
// from tdc_stop_aux.
//
// The structure (upper generator, middle receiver starting the TDC and
// triggering the lower generators 3.5 ms later, pre-event, readback loading
// the software sequencers) follows the station as it is described for the
// machine; the assignment of receiver outputs and TDC channels, the host write
// ports and the choice of which status outputs to bring out are this design's.
// The time constants are parameters so that the station can be simulated at a
// shorter pulse period; their defaults are the machine's values.
//
// Timing: everything except the TDC runs on clk; the first AC hit crosses into
// clk through a toggle and two flip-flops, so ac_valid follows the TDC hit by
// about three event clocks. Lint reports a number of sub-block status outputs
// (receiver data buffers, timestamps, event outputs, TDC hit counts, the
// generators' unused second sequencers, the middle receiver's spare pulse 3)
// as unused: the station does not need them and they are left unconnected on
// purpose. shift_drift is constant zero unless DRIFT_COMP is set.
module linac_timing_top
  import timing_pkg::*;
#(
  parameter int SEQ_DEPTH = 2048,
  parameter int NUM_PULSE = 4,
  // AC regulator, event clocks: 20 ms, 40 us, 500 ns, 10 us
  parameter int AC_PERIOD     = 2_284_800,
  parameter int AC_TOL        = 4_570,
  parameter int AC_PROC_DELAY = 57,
  parameter int AC_OUT_W      = 1_142,
  // sequence shift, TDC units (1 ns)
  parameter int N_BSC_SHORT = 14,
  parameter int N_BSC_LONG  = 16,
  parameter int PULSES_SHORT = 16,
  parameter int PULSES_LONG  = 18,
  parameter int SHIFT_SHORT = 2_502_020,
  parameter int SHIFT_LONG  = -2_854_830,
  parameter int T_REF       = 9_850_000,
  parameter int RACE_LO     = 4_500_000,
  parameter int RACE_HI     = 15_000_000,
  parameter bit DRIFT_COMP  = 1'b0,  // drift-compensated estimate, off as in present operation
  // preparation trigger, event clocks: 20 ms and 12 ms
  parameter int PT_PULSE    = 2_284_800,
  parameter int PT_T_CHARGE = 1_370_880,
  localparam int AW = $clog2(SEQ_DEPTH)
) (
  input  logic clk,        // 114.24 MHz event clock
  input  logic clk_tdc,    // 1 GHz TDC clock
  input  logic rst_n,
  // machine signals
  input  logic bsc_in,       // 44.1 Hz bucket selection cycle from the main ring
  input  logic ac50_in,      // AC-line trigger from the comparator module
  input  logic pf_coinc_in,  // LINAC / PF ring coincidence trigger
  input  logic [7:0] dbus_up,  // beam-gate bits for the upstream generator
  input  logic [7:0] dbus_dn,  // beam-gate bits for the downstream generator
  input  logic [15:4] tdc_stop_aux,
  // host: sequencer writes. sel: 0 upper, 1 upstream, 2 downstream generator
  input  logic [1:0]      host_seq_sel,
  input  logic            host_seq_wr,
  input  logic [AW-1:0]   host_seq_addr,
  input  logic [7:0]      host_seq_code,
  input  logic [31:0]     host_seq_ts,
  input  logic            host_trig_sel_wr,
  input  logic [2:0]      host_trig_sel,
  input  logic            host_upper_load,   // make the upper program active
  input  logic            host_lower_load,   // first load of the lower programs
  // host: receiver configuration. sel: 0 middle, 1 upstream, 2 downstream
  input  logic [1:0]      host_evr_sel,
  input  logic            host_map_wr,
  input  logic [7:0]      host_map_code,
  input  logic [NUM_PULSE:0] host_map_data,
  input  logic [2:0][NUM_PULSE-1:0][31:0] pg_delay,
  input  logic [2:0][NUM_PULSE-1:0][31:0] pg_width,
  input  logic [2:0][NUM_PULSE-1:0]       pg_gate_en,
  input  logic [2:0][NUM_PULSE-1:0][2:0]  pg_gate_bit,
  // host: event FIFOs of the local receivers (event log)
  input  logic [1:0]      fifo_pop,
  output logic [1:0][79:0] fifo_dout,
  output logic [1:0]      fifo_empty,
  // host: TDC readout
  input  logic [5:0]      tdc_rd_addr,
  output logic [31:0]     tdc_rd_data,
  // host: calculators
  input  logic            bc_valid,
  input  logic [16:0]     bc_opp,
  input  logic [12:0]     bc_ler,
  input  logic [4:0]      bc_cycle,
  output logic            bc_out_valid,
  output logic [12:0]     bc_ler_out,
  output logic [7:0]      bc_dr_out,
  output logic [16:0]     bc_opp_out,
  output logic [20:0]     bc_delay_out,
  output logic [7:0]      bc_dr_sel_out,
  input  logic            pt_valid,
  input  logic            pt_mode,
  input  logic [31:0]     pt_main_cur,
  input  logic [31:0]     pt_main_next,
  output logic            pt_out_valid,
  output logic [31:0]     pt_pre,
  output logic            pt_neg,
  // RF phase-shift calculator (host)
  input  logic            rf_valid,
  input  logic [12:0]     rf_m0,
  input  logic [4:0]      rf_cycle,
  input  logic [5:0]      rf_n,
  input  logic [3:0]      rf_k,
  input  logic signed [2:0] rf_cyc_off,
  output logic            rf_out_valid,
  output logic [20:0]     rf_clock0,
  output logic [7:0]      rf_d0,
  output logic [20:0]     rf_clock1,
  output logic [7:0]      rf_d2,
  output logic signed [10:0] rf_dt,
  // device triggers
  output logic [NUM_PULSE-1:0] up_trig,
  output logic [NUM_PULSE-1:0] dn_trig,
  output logic [NUM_PULSE-1:0] mid_trig,
  // status
  output logic            pre_event_irq,
  output logic            readback,
  output logic            seq_start,
  output logic            seq_long,
  output logic            next_long,
  output logic            shift_decision,
  output logic [31:0]     ac_delay,
  output logic            ac_valid,
  output logic            race,
  output logic            ac_async,
  output logic            pf_gate_close,
  output logic            ac_reg_out,
  output logic [1:0]      lower_running,
  output logic            dropped_evt,
  output logic signed [33:0] shift_estimate,  // estimate of the next AC delay, ns
  output logic signed [33:0] shift_drift,     // mean AC drift per pulse, ns (compensation on)
  output logic [1:0]      fifo_overflow,
  output logic [2:0]      hb_timeout
);

  // ---------------------------------------------------------------- BSC input
  logic bsc_tick, bsc_lvl;
  sync_edge u_bsc (.clk, .rst_n, .d(bsc_in), .level(bsc_lvl), .rise(bsc_tick));

  // ------------------------------------------------------------ AC regulator
  logic reg_ev;
  logic [31:0] reg_interval;
  ac50_regulator #(
    .PERIOD(AC_PERIOD), .TOL(AC_TOL), .PROC_DELAY(AC_PROC_DELAY), .OUT_W(AC_OUT_W)
  ) u_reg (
    .clk, .rst_n, .ac_in(ac50_in), .ac_out(ac_reg_out), .async_mode(ac_async),
    .pf_gate_close, .ev_pulse(reg_ev), .last_interval(reg_interval)
  );

  // ---------------------------------------------------------- sequence shift
  logic [4:0] ssc_pidx, ssc_npulses;
  logic [31:0] ssc_count;
  seq_shift_ctrl #(
    .N_BSC_SHORT(N_BSC_SHORT), .N_BSC_LONG(N_BSC_LONG),
    .PULSES_SHORT(PULSES_SHORT), .PULSES_LONG(PULSES_LONG),
    .SHIFT_SHORT(SHIFT_SHORT), .SHIFT_LONG(SHIFT_LONG), .T_REF(T_REF),
    .RACE_LO(RACE_LO), .RACE_HI(RACE_HI), .DRIFT_COMP(DRIFT_COMP)
  ) u_ssc (
    .clk, .rst_n, .bsc_tick, .ac_valid, .ac_delay,
    .seq_start, .seq_long, .next_long, .decision_valid(shift_decision),
    .estimate(shift_estimate), .pulse_idx(ssc_pidx), .seq_pulses(ssc_npulses),
    .race, .seq_count(ssc_count), .drift(shift_drift)
  );

  // ---------------------------------------------------------- generators
  evt_frame_t frame_upper, frame_up, frame_dn;
  logic [2:0] evg_drop;
  logic       readback_q, readback_rise;
  logic [NUM_PULSE-1:0] mid_pulse;

  assign readback_rise = readback && !readback_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) readback_q <= 1'b0;
    else        readback_q <= readback;
  end

  for (genvar g = 0; g < 3; g++) begin : g_evg
    logic [1:0]      run, done;
    logic [1:0][2:0] act;
    logic            bbusy;
    evt_frame_t      fr;
    evg #(.SEQ_DEPTH(SEQ_DEPTH)) u_evg (
      .clk, .rst_n,
      .ext_trig   ((g == 0) ? 2'b00 : {pf_coinc_in, mid_pulse[1]}),
      .ac_in      ((g == 0) ? ac_reg_out : 1'b0),
      .ext_in     ('0),
      .dbus       ((g == 1) ? dbus_up : (g == 2) ? dbus_dn : 8'h00),
      .seq_wr_en  ({1'b0, host_seq_wr && host_seq_sel == 2'(g)}),
      .seq_wr_addr(host_seq_addr),
      .seq_wr_code(host_seq_code),
      .seq_wr_ts  (host_seq_ts),
      .seq_wr_trig_sel_en({1'b0, host_trig_sel_wr && host_seq_sel == 2'(g)}),
      .seq_wr_trig_sel(host_trig_sel),
      .seq_load   ({1'b0, (g == 0) ? host_upper_load : (readback_rise || host_lower_load)}),
      .seq_prescale(16'd1),
      .sw_trig    ({1'b0, (g == 0) ? seq_start : 1'b0}),
      .seq_running(run),
      .seq_done   (done),
      .seq_active_trig_sel(act),
      .mxc_divisor(32'd0),
      .tevt_enable('0),
      .tevt_code  ('0),
      .tevt_src   ('0),
      .swe_valid  (1'b0),
      .swe_code   (8'h00),
      .buf_enable (1'b0),
      .buf_wr_en  (1'b0),
      .buf_wr_addr('0),
      .buf_wr_data(8'h00),
      .buf_len    ('0),
      .buf_send   (1'b0),
      .buf_busy   (bbusy),
      .frame      (fr),
      .evt_dropped(evg_drop[g])
    );
    if (g > 0) begin : g_run
      assign lower_running[g-1] = run[0];
    end
  end

  assign frame_upper = g_evg[0].fr;
  assign frame_up    = g_evg[1].fr;
  assign frame_dn    = g_evg[2].fr;
  assign dropped_evt = |evg_drop;

  // ---------------------------------------------------------- receivers
  logic [2:0][NUM_PULSE-1:0] evr_out;
  logic [2:0][79:0]          evr_fifo_dout;
  logic [2:0]                evr_fifo_empty;

  for (genvar r = 0; r < 3; r++) begin : g_evr
    logic [9:0]  fcount;
    logic        fovf, bdone, evalid, prst, ffull;
    logic [11:0] blen;
    logic [7:0]  bdata, ecode, rdbus;
    logic [31:0] secs, tsc;
    logic [NUM_PULSE-1:0] pga;
    evr #(.NUM_PULSE(NUM_PULSE)) u_evr (
      .clk, .rst_n,
      .frame      ((r == 0) ? frame_upper : (r == 1) ? frame_up : frame_dn),
      .map_wr_en  (host_map_wr && host_evr_sel == 2'(r)),
      .map_wr_code(host_map_code),
      .map_wr_data(host_map_data),
      .pg_delay   (pg_delay[r]),
      .pg_width   (pg_width[r]),
      .pg_polarity('0),
      .gate_en    (pg_gate_en[r]),
      .gate_bit   (pg_gate_bit[r]),
      .ts_mode    (1'b1),
      .ts_div     (16'd1),
      .fifo_pop   ((r == 0) ? 1'b0 : fifo_pop[r-1]),
      .fifo_clear_overflow(1'b0),
      .fifo_dout  (evr_fifo_dout[r]),
      .fifo_empty (evr_fifo_empty[r]),
      .fifo_count (fcount),
      .fifo_overflow(fovf),
      .buf_rd_addr('0),
      .buf_rd_data(bdata),
      .buf_rx_done(bdone),
      .buf_rx_len (blen),
      .pulse_out  (evr_out[r]),
      .dbus       (rdbus),
      .evt_valid  (evalid),
      .evt_code   (ecode),
      .seconds    (secs),
      .ts_count   (tsc),
      .hb_timeout (hb_timeout[r]),
      .presc_reset(prst),
      .fifo_full  (ffull),
      .pg_active  (pga)
    );
    if (r > 0) begin : g_ovf
      assign fifo_overflow[r-1] = fovf;
    end
  end

  assign mid_pulse     = evr_out[0];
  assign mid_trig      = evr_out[0];
  assign up_trig       = evr_out[1];
  assign dn_trig       = evr_out[2];
  assign pre_event_irq = mid_pulse[2];
  assign readback      = evr_out[2][3];
  assign fifo_dout     = {evr_fifo_dout[2], evr_fifo_dout[1]};
  assign fifo_empty    = {evr_fifo_empty[2], evr_fifo_empty[1]};

  // ---------------------------------------------------------------- TDC
  logic [15:0]       tdc_stop;
  logic [15:0][2:0]  tdc_hits;
  logic              tdc_tog, tdc_run;
  logic [3:0]        tdc_ch;
  logic [2:0]        tdc_num;
  logic [31:0]       tdc_time;

  assign tdc_stop = {tdc_stop_aux, mid_pulse[1], evr_out[2][0], evr_out[1][0], ac_reg_out};

  tdc #(.NCH(16), .NHIT(4), .W(32)) u_tdc (
    .clk(clk_tdc), .rst_n, .start(mid_pulse[0]), .stop(tdc_stop),
    .rd_addr(tdc_rd_addr), .ann_chan(4'd0), .rd_data(tdc_rd_data), .hit_cnt(tdc_hits),
    .hit_toggle(tdc_tog), .hit_chan(tdc_ch), .hit_num(tdc_num), .hit_time(tdc_time),
    .running(tdc_run)
  );

  // bring the first AC hit of every pulse into the event clock domain; the
  // hit registers are stable for milliseconds after the toggle changes
  logic t1, t2, t3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= 1'b0; t2 <= 1'b0; t3 <= 1'b0;
      ac_valid <= 1'b0;
      ac_delay <= '0;
    end else begin
      t1 <= tdc_tog; t2 <= t1; t3 <= t2;
      ac_valid <= 1'b0;
      if ((t2 ^ t3) && tdc_ch == 4'd0 && tdc_num == 3'd0) begin
        ac_valid <= 1'b1;
        ac_delay <= tdc_time;
      end
    end
  end

  // ---------------------------------------------------------- calculators
  bucket_calc u_bc (
    .clk, .rst_n, .in_valid(bc_valid), .opp_in(bc_opp), .ler_in(bc_ler),
    .cycle_in(bc_cycle), .out_valid(bc_out_valid), .ler_out(bc_ler_out),
    .dr_out(bc_dr_out), .opp_out(bc_opp_out), .delay_out(bc_delay_out),
    .dr_sel_out(bc_dr_sel_out)
  );

  pretrigger_calc #(.PULSE(PT_PULSE), .T_CHARGE(PT_T_CHARGE)) u_pt (
    .clk, .rst_n, .in_valid(pt_valid), .mode(pt_mode), .d_main_cur(pt_main_cur),
    .d_main_next(pt_main_next), .out_valid(pt_out_valid), .d_pre(pt_pre), .neg(pt_neg)
  );

  rf_phase_shift_calc u_rf (
    .clk, .rst_n, .in_valid(rf_valid), .m0_in(rf_m0), .cycle_in(rf_cycle), .n_in(rf_n),
    .k_in(rf_k), .cyc_off_in(rf_cyc_off), .out_valid(rf_out_valid), .clock0_out(rf_clock0),
    .d0_out(rf_d0), .clock1_out(rf_clock1), .d2_out(rf_d2), .dt_out(rf_dt)
  );

endmodule
