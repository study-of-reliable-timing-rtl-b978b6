// evg: event generator.
//
// Brings together the parts of an event generator: an AC-line synchroniser
// (a flip-flop synchroniser that aligns the AC line with the event clock), a
// multiplexed counter, NUM_TEVT trigger events, two sequencers with their
// double-buffered RAMs, the priority encoder that merges all event sources, and
// the link transmitter that adds the distributed bus and the data buffer to
// every frame.
//
// Sequencer trigger sources (trig_sel of each sequencer):
//   0  external input ext_trig[0] (rising edge)
//   1  external input ext_trig[1] (rising edge)
//   2  AC-line synchroniser output
//   3  multiplexed counter
//   4  software trigger sw_trig[n]
// Trigger event i is stimulated by the rising edge of ext_in[i] when
// tevt_src[i] is 0, by the AC-line synchroniser when 1, by the multiplexed
// counter when 2 or 3.
//
// The host interface is a set of plain write strobes and configuration inputs.
// Latency from a sequencer entry falling due to its frame on the link is three
// event clocks (sequencer output register, priority encoder, link register):
// a software trigger in cycle T puts the entry with timestamp d (prescale 1)
// into the frame of cycle T+4+d. External, AC and trigger-event inputs first
// pass a two-flip-flop synchroniser, which adds two to three cycles. The
// synchronisers' level outputs are not needed here and are left unused.
//
// The list of parts and the sources a sequencer can be triggered from follow
// the generator's description; the numbering of the sources, the two external
// trigger inputs and the host strobes are this design's.
module evg
  import timing_pkg::*;
#(
  parameter int SEQ_DEPTH = 2048,
  parameter int TS_W      = 32,
  parameter int NUM_TEVT  = 8,
  parameter int BUF_BYTES = 2048,
  localparam int AW = $clog2(SEQ_DEPTH),
  localparam int BW = $clog2(BUF_BYTES)
) (
  input  logic clk,
  input  logic rst_n,
  // external signals
  input  logic [1:0]          ext_trig,
  input  logic                ac_in,
  input  logic [NUM_TEVT-1:0] ext_in,
  input  logic [7:0]          dbus,
  // sequencer host interface, one set per sequencer
  input  logic [1:0]           seq_wr_en,
  input  logic [AW-1:0]        seq_wr_addr,
  input  logic [7:0]           seq_wr_code,
  input  logic [TS_W-1:0]      seq_wr_ts,
  input  logic [1:0]           seq_wr_trig_sel_en,
  input  logic [2:0]           seq_wr_trig_sel,
  input  logic [1:0]           seq_load,
  input  logic [15:0]          seq_prescale,
  input  logic [1:0]           sw_trig,
  output logic [1:0]           seq_running,
  output logic [1:0]           seq_done,
  output logic [1:0][2:0]      seq_active_trig_sel,
  // multiplexed counter
  input  logic [31:0]          mxc_divisor,
  // trigger events
  input  logic [NUM_TEVT-1:0]      tevt_enable,
  input  logic [NUM_TEVT-1:0][7:0] tevt_code,
  input  logic [NUM_TEVT-1:0][1:0] tevt_src,
  // software event
  input  logic       swe_valid,
  input  logic [7:0] swe_code,
  // data buffer
  input  logic          buf_enable,
  input  logic          buf_wr_en,
  input  logic [BW-1:0] buf_wr_addr,
  input  logic [7:0]    buf_wr_data,
  input  logic [BW:0]   buf_len,
  input  logic          buf_send,
  output logic          buf_busy,
  // link
  output evt_frame_t frame,
  output logic       evt_dropped
);

  logic [1:0]          ext_rise;
  logic                ac_rise, mxc_tick;
  logic [NUM_TEVT-1:0] ext_in_rise, tevt_stim;
  logic [1:0]          seq_valid;
  logic [1:0][7:0]     seq_code;
  logic                mux_valid;
  logic [7:0]          mux_code;
  logic [NUM_TEVT+2:0] lvl;

  sync_edge u_ext0 (.clk, .rst_n, .d(ext_trig[0]), .level(lvl[NUM_TEVT]),   .rise(ext_rise[0]));
  sync_edge u_ext1 (.clk, .rst_n, .d(ext_trig[1]), .level(lvl[NUM_TEVT+1]), .rise(ext_rise[1]));
  sync_edge u_ac   (.clk, .rst_n, .d(ac_in),       .level(lvl[NUM_TEVT+2]), .rise(ac_rise));

  for (genvar i = 0; i < NUM_TEVT; i++) begin : g_in
    sync_edge u_in (.clk, .rst_n, .d(ext_in[i]), .level(lvl[i]), .rise(ext_in_rise[i]));
    always_comb begin
      case (tevt_src[i])
        2'd0:    tevt_stim[i] = ext_in_rise[i];
        2'd1:    tevt_stim[i] = ac_rise;
        default: tevt_stim[i] = mxc_tick;
      endcase
    end
  end

  evg_mux_counter #(.W(32)) u_mxc (
    .clk, .rst_n, .divisor(mxc_divisor), .sync(1'b0), .tick(mxc_tick)
  );

  for (genvar s = 0; s < 2; s++) begin : g_seq
    evg_sequencer #(.DEPTH(SEQ_DEPTH), .TS_W(TS_W), .NUM_TRIG(5)) u_seq (
      .clk, .rst_n,
      .wr_en          (seq_wr_en[s]),
      .wr_addr        (seq_wr_addr),
      .wr_code        (seq_wr_code),
      .wr_ts          (seq_wr_ts),
      .wr_trig_sel_en (seq_wr_trig_sel_en[s]),
      .wr_trig_sel    (seq_wr_trig_sel),
      .load           (seq_load[s]),
      .prescale       (seq_prescale),
      .trig_in        ({sw_trig[s], mxc_tick, ac_rise, ext_rise[1], ext_rise[0]}),
      .evt_valid      (seq_valid[s]),
      .evt_code       (seq_code[s]),
      .running        (seq_running[s]),
      .seq_done       (seq_done[s]),
      .active_trig_sel(seq_active_trig_sel[s])
    );
  end

  evg_event_mux #(.NUM_TEVT(NUM_TEVT), .NUM_SEQ(2)) u_mux (
    .clk, .rst_n,
    .tevt_stim, .tevt_enable, .tevt_code,
    .seq_valid, .seq_code,
    .sw_valid(swe_valid), .sw_code(swe_code),
    .evt_valid(mux_valid), .evt_code(mux_code), .dropped(evt_dropped)
  );

  evg_link_tx #(.BUF_BYTES(BUF_BYTES)) u_tx (
    .clk, .rst_n,
    .evt_valid(mux_valid), .evt_code(mux_code), .dbus,
    .buf_enable, .buf_wr_en, .buf_wr_addr, .buf_wr_data, .buf_len, .buf_send, .buf_busy,
    .frame
  );

endmodule
