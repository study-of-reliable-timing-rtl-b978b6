// evr_pulse_gen: programmable delayed pulse of an event receiver, with beam gate.
//
// A one-cycle `trig` (the receiver saw an event code mapped to this generator)
// starts a delay of `delay` event clocks, after which the output is active for
// `width` event clocks. A trigger that arrives while a delay or pulse is in
// progress starts it again. The active level is set by `polarity` (0: high).
// When `gate_en` is set, the pulse is passed only while the distributed-bus
// bit `gate` is 1 ("beam gate open"): the two are combined by an AND, so closing
// the gate removes the pulse to the device without stopping the event stream.
//
// Timing: for a trigger in cycle t the output is active in cycles
// t+1+delay .. t+delay+width. A width of 0 gives no pulse.
module evr_pulse_gen #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         trig,
  input  logic [W-1:0] delay,
  input  logic [W-1:0] width,
  input  logic         polarity,
  input  logic         gate_en,
  input  logic         gate,
  output logic         out,
  output logic         active    // pulse in progress, before gating
);

  typedef enum logic [1:0] {S_IDLE, S_DELAY, S_PULSE} state_e;
  state_e       state;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      active <= 1'b0;
    end else begin
      if (trig) begin
        if (width == '0) begin
          state  <= S_IDLE;
          active <= 1'b0;
        end else if (delay == '0) begin
          state  <= S_PULSE;
          cnt    <= width;
          active <= 1'b1;
        end else begin
          state  <= S_DELAY;
          cnt    <= delay;
          active <= 1'b0;
        end
      end else begin
        case (state)
          S_DELAY: begin
            if (cnt == W'(1)) begin
              state  <= S_PULSE;
              cnt    <= width;
              active <= 1'b1;
            end else begin
              cnt <= cnt - 1'b1;
            end
          end
          S_PULSE: begin
            if (cnt == W'(1)) begin
              state  <= S_IDLE;
              active <= 1'b0;
            end else begin
              cnt <= cnt - 1'b1;
            end
          end
          default: active <= 1'b0;
        endcase
      end
    end
  end

  assign out = (active && (!gate_en || gate)) ^ polarity;

endmodule
