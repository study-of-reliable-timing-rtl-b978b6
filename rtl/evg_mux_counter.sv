// evg_mux_counter: multiplexed counter of the event generator.
//
// A programmable divider of the event clock: `tick` pulses for one cycle every
// `divisor` cycles (a divisor of 0 or 1 gives a pulse every cycle). It can
// stand in for a trigger that is a fixed fraction of the event clock, such as a
// bucket-selection or revolution frequency. `sync` restarts the count, so that
// dividers reset at the same moment keep a common phase; the first tick after
// `sync` comes `divisor` cycles later.
module evg_mux_counter #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] divisor,
  input  logic         sync,
  output logic         tick
);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (sync) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt + 1'b1 >= divisor) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
