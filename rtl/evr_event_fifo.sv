// evr_event_fifo: event FIFO of an event receiver.
//
// Received events are queued with their time for the host: each entry is W bits,
// by default 80, laid out as {8'h00, event code, seconds, timestamp counter}.
// The memory has 2**AW words and is run as a circular buffer that keeps one word
// free, so it holds 2**AW - 1 entries (511 by default). A push into a full FIFO
// is refused and sets the sticky `overflow` flag, which `clear_overflow` resets.
// `dout` shows the oldest entry whenever `empty` is low; `pop` removes it.
// Push and pop may happen in the same cycle.
module evr_event_fifo #(
  parameter int W  = 80,
  parameter int AW = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  input  logic         clear_overflow,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count,
  output logic         overflow
);

  logic [W-1:0]  mem [2**AW];
  logic [AW-1:0] wptr, rptr;
  logic          do_push, do_pop;

  assign empty   = (wptr == rptr);
  assign full    = (wptr + 1'b1 == rptr);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && !do_push) overflow <= 1'b1;
      else if (clear_overflow) overflow <= 1'b0;
    end
  end

endmodule
