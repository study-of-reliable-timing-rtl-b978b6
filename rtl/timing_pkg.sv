// timing_pkg: types and constants shared by the event-based timing system.
//
// The event link carries one 16-bit frame per event clock: an 8-bit event code
// and an 8-bit data byte. The data byte is either the distributed bus (DBus,
// eight level signals sampled by the generator) or one byte of the data buffer.
// A serial link would tell the two apart with 8b10b control characters; here the
// frame carries an explicit kind field instead, since the serialiser is outside
// this design.
//
// The special event codes and the beam-mode code ranges are the ones used by the
// timing system; the clock rate (114.24 MHz event clock, 8.75 ns) and the ring
// harmonic numbers are the machine's values. Linting this package on its own
// reports its constants as unused: the event codes are used by the generator
// and receiver modules, the ring constants are the defaults of the bucket
// calculators, and the DBus bit numbers are for the host that programs the
// receivers' beam gates.
package timing_pkg;

  // Special event codes
  localparam logic [7:0] EVT_NULL        = 8'h00; // idle, sent when nothing happens
  localparam logic [7:0] EVT_TS_SHIFT0   = 8'h70; // shift 0 into the seconds shift register
  localparam logic [7:0] EVT_TS_SHIFT1   = 8'h71; // shift 1 into the seconds shift register
  localparam logic [7:0] EVT_HEARTBEAT   = 8'h7A; // reset heartbeat timeout counter
  localparam logic [7:0] EVT_RESET_PRESC = 8'h7B; // reset all receiver dividers
  localparam logic [7:0] EVT_TS_INC      = 8'h7C; // increment timestamp counter
  localparam logic [7:0] EVT_TS_RESET    = 8'h7D; // reset timestamp counter, latch seconds
  localparam logic [7:0] EVT_END_SEQ     = 8'h7F; // end of sequence, never transmitted

  // What the data byte of a frame holds
  typedef enum logic [1:0] {
    DK_DBUS    = 2'd0,  // distributed bus bits
    DK_BUF     = 2'd1,  // a data buffer byte
    DK_BUF_END = 2'd2,  // the last data buffer byte of a block
    DK_IDLE    = 2'd3   // a data buffer slot with no byte to send
  } data_kind_e;

  typedef struct packed {
    logic [7:0] code;
    logic [7:0] data;
    data_kind_e kind;
  } evt_frame_t;

  // Beam modes of the pulse-to-pulse modulation and the first event code of
  // each mode's block of ten codes.
  typedef enum logic [3:0] {
    BM_KBE, BM_KBP, BM_PFE, BM_QFE, BM_ARE,
    BM_JBE, BM_JBP, BM_RFE, BM_SFE, BM_ZRE,
    BM_NIM, BM_NTM
  } beam_mode_e;

  function automatic logic [7:0] beam_mode_base_code(beam_mode_e m);
    case (m)
      BM_KBE: return 8'd30;
      BM_KBP: return 8'd40;
      BM_PFE: return 8'd50;
      BM_QFE: return 8'd60;
      BM_ARE: return 8'd70;
      BM_JBE: return 8'd130;
      BM_JBP: return 8'd140;
      BM_RFE: return 8'd150;
      BM_SFE: return 8'd160;
      BM_ZRE: return 8'd170;
      BM_NIM: return 8'd180;
      default: return 8'd190; // BM_NTM
    endcase
  endfunction

  // Beam-gate DBus bits
  localparam int DBUS_LER_INJ     = 1; // downstream generator
  localparam int DBUS_HER_INJ     = 3; // downstream generator
  localparam int DBUS_DR_KICKER   = 4; // injection (upstream) / extraction (downstream)
  localparam int DBUS_DR_SEPTUM   = 5; // injection (upstream) / extraction (downstream)

  // Ring constants
  localparam int H_MR = 5120;  // main ring harmonic number
  localparam int H_DR = 230;   // damping ring harmonic number
  localparam int RF_PER_COINC = 49;  // ring RF buckets per LINAC-ring coincidence
  localparam int EVCLK_PER_COINC = 11; // event clocks per coincidence (96.3 ns)

endpackage
