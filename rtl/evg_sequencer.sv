// evg_sequencer: event sequence RAM of the event generator.
//
// The RAM holds up to DEPTH pairs of (event code, timestamp). When the selected
// trigger source pulses, an internal counter starts from zero at the sequencer
// clock rate (the event clock divided by `prescale`); whenever the counter has
// reached the timestamp of the current entry, that entry's code is sent and the
// next entry becomes current. The code 0x7F ends the sequence and is not sent.
// A trigger that arrives while a sequence plays restarts it from entry 0.
//
// Two copies of the RAM are kept, as the main timing station uses them: the
// host writes the "software sequencer" (and its trigger-source selection) at any
// time, and a pulse on `load` (the readback) makes that copy the "hardware
// sequencer" that plays on the next trigger. This design swaps the two banks on
// `load` rather than copying 2048 words, so the host is expected to rewrite the
// whole sequence after each load, as the control software does when it loads a
// beam mode.
//
// Timing: with prescale <= 1, an entry with timestamp d appears on evt_valid
// d+2 cycles after the cycle in which the trigger pulse is high (one cycle to
// start the counter and read entry 0, one for the registered output); with a
// prescale p the counter steps every p cycles. Entries whose timestamps have
// already passed are sent on consecutive cycles, one per cycle.
module evg_sequencer
  import timing_pkg::*;
#(
  parameter int DEPTH    = 2048,
  parameter int TS_W     = 32,
  parameter int NUM_TRIG = 4,
  localparam int AW = $clog2(DEPTH),
  localparam int SW = (NUM_TRIG > 1) ? $clog2(NUM_TRIG) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // host side: writes go to the software bank
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  logic [7:0]      wr_code,
  input  logic [TS_W-1:0] wr_ts,
  input  logic            wr_trig_sel_en,
  input  logic [SW-1:0]   wr_trig_sel,
  input  logic            load,        // readback: software bank becomes hardware bank
  input  logic [15:0]     prescale,    // sequencer clock divisor, 0 and 1 both mean 1
  // triggers
  input  logic [NUM_TRIG-1:0] trig_in, // one-cycle pulses
  // event output
  output logic            evt_valid,
  output logic [7:0]      evt_code,
  output logic            running,
  output logic            seq_done,    // one-cycle pulse when a sequence ends
  output logic [SW-1:0]   active_trig_sel
);

  typedef struct packed {
    logic [7:0]      code;
    logic [TS_W-1:0] ts;
  } entry_t;

  entry_t mem [2*DEPTH];
  entry_t cur;

  logic             hw_bank;
  logic [SW-1:0]    trig_sel [2];
  logic [AW-1:0]    ptr;
  logic [TS_W-1:0]  count;
  logic [15:0]      pre_cnt;
  logic             trig;
  logic             emit, last_entry;
  logic [AW-1:0]    ptr_next;
  logic             hw_bank_next;

  assign active_trig_sel = trig_sel[hw_bank];
  assign trig            = trig_in[trig_sel[hw_bank]];
  assign emit            = running && !trig && (count >= cur.ts);
  assign last_entry      = (ptr == AW'(DEPTH-1));
  assign hw_bank_next    = load ? ~hw_bank : hw_bank;

  always_comb begin
    if (trig || !running) ptr_next = '0;
    else if (emit)        ptr_next = ptr + 1'b1;
    else                  ptr_next = ptr;
  end

  // software bank writes and synchronous read of the hardware bank
  always_ff @(posedge clk) begin
    if (wr_en) mem[{~hw_bank, wr_addr}] <= '{code: wr_code, ts: wr_ts};
    cur <= mem[{hw_bank_next, ptr_next}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hw_bank   <= 1'b0;
      trig_sel[0] <= '0;
      trig_sel[1] <= '0;
      ptr       <= '0;
      count     <= '0;
      pre_cnt   <= '0;
      running   <= 1'b0;
      evt_valid <= 1'b0;
      evt_code  <= EVT_NULL;
      seq_done  <= 1'b0;
    end else begin
      evt_valid <= 1'b0;
      evt_code  <= EVT_NULL;
      seq_done  <= 1'b0;
      hw_bank   <= hw_bank_next;
      if (wr_trig_sel_en) trig_sel[~hw_bank] <= wr_trig_sel;
      ptr <= ptr_next;
      if (trig) begin
        running <= 1'b1;
        count   <= '0;
        pre_cnt <= '0;
      end else if (running) begin
        // sequencer clock
        if (pre_cnt + 16'd1 >= prescale) begin
          pre_cnt <= '0;
          count   <= count + 1'b1;
        end else begin
          pre_cnt <= pre_cnt + 16'd1;
        end
        if (emit) begin
          if (cur.code == EVT_END_SEQ || last_entry) begin
            running  <= 1'b0;
            seq_done <= 1'b1;
          end
          if (cur.code != EVT_END_SEQ) begin
            evt_valid <= 1'b1;
            evt_code  <= cur.code;
          end
        end
      end
    end
  end

endmodule
