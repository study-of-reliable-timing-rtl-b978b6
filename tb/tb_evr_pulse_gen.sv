// tb_evr_pulse_gen: self-checking test of the delayed, gated pulse generator.
//
// Random triggers, delays, widths, polarity and beam-gate values are applied.
// A cycle-level reference kept here says, for every cycle, whether the pulse
// must be active: for a trigger in cycle t, cycles t+1+delay to t+delay+width,
// a later trigger replacing an earlier one. The output must equal that
// expectation ANDed with the gate bit (when gating is on) and inverted by the
// polarity.
module tb_evr_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        trig = 1'b0, polarity = 1'b0, gate_en = 1'b0, gate = 1'b0;
  logic [31:0] delay = '0, width = '0;
  logic        out, active;

  evr_pulse_gen #(.W(32)) dut (.*);

  int n_pulses = 0, n_gated = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint c = 0, s = 1, e = 0;
    logic exp_act, exp_out;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // check the outputs of cycle c
      exp_act = (c >= s) && (c <= e);
      exp_out = (exp_act && (!gate_en || gate)) ^ polarity;
      checks += 2;
      if (active !== exp_act) begin
        failures++;
        if (failures < 10) $display("FAIL active cycle %0d: got %b expected %b", c, active, exp_act);
      end
      if (out !== exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL out cycle %0d: got %b expected %b", c, out, exp_out);
      end
      if (exp_act && c == s) n_pulses++;
      if (exp_act && gate_en && !gate) n_gated++;
      // inputs for cycle c
      gate = ($urandom_range(7) != 0);
      if (n % 500 == 0) begin
        polarity = 1'($urandom_range(1));
        gate_en  = 1'($urandom_range(1));
      end
      trig = ($urandom_range(40) == 0);
      if (trig) begin
        delay = 32'($urandom_range(30));
        width = 32'($urandom_range(20));
        if ($urandom_range(15) == 0) width = 0;
        if (width == 0) begin
          s = 1; e = 0;
        end else begin
          s = c + 1 + longint'(delay);
          e = c + longint'(delay) + longint'(width);
        end
      end
      @(posedge clk);
      c++;
    end
    checks++;
    if (n_pulses < 50 || n_gated < 10) begin
      failures++;
      $display("FAIL too few pulses (%0d) or gated cycles (%0d)", n_pulses, n_gated);
    end
    $display("pulses=%0d gated_cycles=%0d", n_pulses, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
