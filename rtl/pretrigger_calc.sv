// pretrigger_calc: delay of the preparation trigger of the damping-ring kicker.
//
// The kicker power supply must be charged T_CHARGE (12 ms) before its main
// trigger, and the main trigger moves from pulse to pulse with the bucket
// selection, so the preparation trigger of pulse n+1 is produced in pulse n.
// Two ways are computed, all values in event clocks:
//   mode 0, delay counted at the receiver from the current main trigger:
//           d_pre = d_main_next - d_main_cur + PULSE - T_CHARGE
//   mode 1, delay counted at the generator from the start of the current pulse:
//           d_pre = d_main_next + PULSE - T_CHARGE
// `neg` is set when the result would be negative (the trigger cannot be made);
// d_pre is then 0. One-cycle registered result.
module pretrigger_calc #(
  parameter int PULSE    = 2_284_800,  // 20 ms in 114.24 MHz event clocks
  parameter int T_CHARGE = 1_370_880   // 12 ms
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        mode,
  input  logic [31:0] d_main_cur,
  input  logic [31:0] d_main_next,
  output logic        out_valid,
  output logic [31:0] d_pre,
  output logic        neg
);

  logic signed [34:0] r;

  always_comb begin
    r = $signed(35'(d_main_next)) + 35'(PULSE) - 35'(T_CHARGE);
    if (!mode) r = r - $signed(35'(d_main_cur));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d_pre     <= '0;
      neg       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      neg       <= r < 0;
      d_pre     <= (r < 0) ? '0 : 32'(r);
    end
  end

endmodule
