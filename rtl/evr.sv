// evr: event receiver.
//
// Decodes the event stream of one generator and turns chosen event codes into
// delayed pulses for devices. A 256-entry mapping RAM, written by the host,
// gives for every event code a bit per pulse generator (bits NUM_PULSE-1..0:
// trigger that generator) and one more bit (bit NUM_PULSE: store the event in
// the event FIFO with its time). Each pulse generator has its own delay, width,
// polarity and beam-gate selection: when gate_en[i] is set, output i is ANDed
// with distributed-bus bit gate_bit[i], so the beam gate carried on the bus can
// close a device's trigger while events keep flowing. The time-of-day logic
// gives every stored event its seconds and timestamp values.
//
// Timing: a frame entering in cycle t triggers the pulse generators in cycle
// t+2 (receive register, mapping RAM read), so a pulse with delay D starts in
// cycle t+3+D. The fine delay of the hardware receiver (a twentieth of the
// event clock, analog) is not modelled.
module evr
  import timing_pkg::*;
#(
  parameter int NUM_PULSE = 4,
  parameter int W         = 32,
  parameter int BUF_BYTES = 2048,
  parameter int FIFO_AW   = 9,
  localparam int BW = $clog2(BUF_BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  evt_frame_t  frame,
  // mapping RAM
  input  logic                 map_wr_en,
  input  logic [7:0]           map_wr_code,
  input  logic [NUM_PULSE:0]   map_wr_data,
  // pulse generator settings
  input  logic [NUM_PULSE-1:0][W-1:0] pg_delay,
  input  logic [NUM_PULSE-1:0][W-1:0] pg_width,
  input  logic [NUM_PULSE-1:0]        pg_polarity,
  input  logic [NUM_PULSE-1:0]        gate_en,
  input  logic [NUM_PULSE-1:0][2:0]   gate_bit,
  // timestamp settings
  input  logic        ts_mode,
  input  logic [15:0] ts_div,
  // event FIFO
  input  logic        fifo_pop,
  input  logic        fifo_clear_overflow,
  output logic [79:0] fifo_dout,
  output logic        fifo_empty,
  output logic [FIFO_AW:0] fifo_count,
  output logic        fifo_overflow,
  // data buffer
  input  logic [BW-1:0] buf_rd_addr,
  output logic [7:0]    buf_rd_data,
  output logic          buf_rx_done,
  output logic [BW:0]   buf_rx_len,
  // outputs
  output logic [NUM_PULSE-1:0] pulse_out,
  output logic [7:0]           dbus,
  output logic                 evt_valid,
  output logic [7:0]           evt_code,
  output logic [31:0]          seconds,
  output logic [31:0]          ts_count,
  output logic                 hb_timeout,
  output logic                 presc_reset,
  output logic                 fifo_full,
  output logic [NUM_PULSE-1:0] pg_active
);

  logic [NUM_PULSE:0] map_mem [256];
  logic [NUM_PULSE:0] map_q;
  logic               map_valid;
  logic [7:0]         map_code;
  logic [31:0]        sec_shift;

  evr_link_rx #(.BUF_BYTES(BUF_BYTES)) u_rx (
    .clk, .rst_n, .frame,
    .evt_valid, .evt_code, .dbus,
    .buf_rx_done, .buf_rx_len, .buf_rd_addr, .buf_rd_data
  );

  evr_timestamp #(.TS_W(32)) u_ts (
    .clk, .rst_n, .evt_valid, .evt_code, .ts_mode, .ts_div,
    .seconds, .ts_count, .sec_shift, .hb_timeout, .presc_reset
  );

  // mapping RAM, read one cycle after the event
  always_ff @(posedge clk) begin
    if (map_wr_en) map_mem[map_wr_code] <= map_wr_data;
    map_q <= map_mem[evt_code];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_valid <= 1'b0;
      map_code  <= EVT_NULL;
    end else begin
      map_valid <= evt_valid;
      map_code  <= evt_code;
    end
  end

  for (genvar i = 0; i < NUM_PULSE; i++) begin : g_pg
    evr_pulse_gen #(.W(W)) u_pg (
      .clk, .rst_n,
      .trig    (map_valid && map_q[i]),
      .delay   (pg_delay[i]),
      .width   (pg_width[i]),
      .polarity(pg_polarity[i]),
      .gate_en (gate_en[i]),
      .gate    (dbus[gate_bit[i]]),
      .out     (pulse_out[i]),
      .active  (pg_active[i])
    );
  end

  evr_event_fifo #(.W(80), .AW(FIFO_AW)) u_fifo (
    .clk, .rst_n,
    .push (map_valid && map_q[NUM_PULSE]),
    .din  ({8'h00, map_code, seconds, ts_count}),
    .pop  (fifo_pop),
    .clear_overflow(fifo_clear_overflow),
    .dout (fifo_dout),
    .empty(fifo_empty),
    .full (fifo_full),
    .count(fifo_count),
    .overflow(fifo_overflow)
  );

endmodule
