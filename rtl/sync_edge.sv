// sync_edge: brings an asynchronous level into the clock domain and marks its
// rising edges.
//
// Two flip-flops resynchronise the input; a third remembers the previous value
// so that `rise` is a one-cycle pulse for every low-to-high transition. The
// output pulse comes two to three clock cycles after the input edge, the same
// for every instance, so two inputs measured against each other see the same
// latency. This is the flip-flop synchroniser that aligns an external trigger or
// the AC line with the event clock.
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic level,
  output logic rise
);

  logic s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else begin
      s1 <= d;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign level = s2;
  assign rise  = s2 & ~s3;

endmodule
