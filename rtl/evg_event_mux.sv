// evg_event_mux: trigger events and priority encoder of the event generator.
//
// Event codes come from several sources: NUM_TEVT trigger events, each of which
// sends its programmed code when its stimulus input pulses (an external input,
// the AC-line synchroniser or the multiplexed counter), the NUM_SEQ sequencers,
// and a software event written by the host. Only one code can go on the link per
// event clock, so every source has a pending register and a fixed-priority
// encoder passes the highest-priority pending code: trigger event 0 first, then
// the other trigger events in order, then the sequencers, then the software
// event. A code that loses waits for the next free cycle instead of being lost;
// a new request to a source that is still pending replaces it and pulses
// `dropped`. The priority order and the drop rule are this design's choices.
//
// Timing: a request made in cycle t with nothing else pending appears on
// evt_valid/evt_code in cycle t+1. When nothing is pending the code is 0x00.
module evg_event_mux
  import timing_pkg::*;
#(
  parameter int NUM_TEVT = 8,
  parameter int NUM_SEQ  = 2,
  localparam int NSRC = NUM_TEVT + NUM_SEQ + 1
) (
  input  logic       clk,
  input  logic       rst_n,
  // trigger events
  input  logic [NUM_TEVT-1:0]      tevt_stim,
  input  logic [NUM_TEVT-1:0]      tevt_enable,
  input  logic [NUM_TEVT-1:0][7:0] tevt_code,
  // sequencers
  input  logic [NUM_SEQ-1:0]       seq_valid,
  input  logic [NUM_SEQ-1:0][7:0]  seq_code,
  // software event
  input  logic       sw_valid,
  input  logic [7:0] sw_code,
  // merged output
  output logic       evt_valid,
  output logic [7:0] evt_code,
  output logic       dropped
);

  logic [NSRC-1:0]      req;
  logic [NSRC-1:0][7:0] req_code;
  logic [NSRC-1:0]      pend, cand;
  logic [NSRC-1:0][7:0] pend_code, cand_code;
  logic [NSRC-1:0]      grant;

  always_comb begin
    for (int i = 0; i < NUM_TEVT; i++) begin
      req[i]      = tevt_stim[i] && tevt_enable[i];
      req_code[i] = tevt_code[i];
    end
    for (int j = 0; j < NUM_SEQ; j++) begin
      req[NUM_TEVT+j]      = seq_valid[j];
      req_code[NUM_TEVT+j] = seq_code[j];
    end
    req[NSRC-1]      = sw_valid;
    req_code[NSRC-1] = sw_code;
  end

  // candidates: what is pending plus what is requested now (a new request
  // replaces a pending one of the same source)
  always_comb begin
    cand = pend | req;
    for (int k = 0; k < NSRC; k++) begin
      cand_code[k] = req[k] ? req_code[k] : pend_code[k];
    end
  end

  // fixed priority: lowest index wins
  always_comb begin
    grant = '0;
    for (int k = NSRC-1; k >= 0; k--) begin
      if (cand[k]) grant = NSRC'(1) << k;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= '0;
      pend_code <= '0;
      evt_valid <= 1'b0;
      evt_code  <= EVT_NULL;
      dropped   <= 1'b0;
    end else begin
      evt_valid <= 1'b0;
      evt_code  <= EVT_NULL;
      for (int k = 0; k < NSRC; k++) begin
        if (grant[k]) begin
          evt_valid <= 1'b1;
          evt_code  <= cand_code[k];
        end
      end
      pend      <= cand & ~grant;
      pend_code <= cand_code;
      dropped   <= |(req & pend);
    end
  end

endmodule
