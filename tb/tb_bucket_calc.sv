// tb_bucket_calc: self-checking test of the bucket-selection arithmetic.
//
// Drives the calculator with random opportunities and with every LER bucket /
// cycle pair used by the damping-ring table for LER bucket 0, and compares with
// a reference computed here from the congruences N_LER = 49*i mod 5120 and
// N_DR = 49*i mod 230. The DR bucket list for LER bucket 0 over the 23 cycles is
// the table the machine uses for its bucket selection. Also checks that each
// result arrives exactly two cycles after its input.
module tb_bucket_calc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        in_valid = 1'b0;
  logic [16:0] opp_in = '0;
  logic [12:0] ler_in = '0;
  logic [4:0]  cycle_in = '0;
  logic        out_valid;
  logic [12:0] ler_out;
  logic [7:0]  dr_out, dr_sel_out;
  logic [16:0] opp_out;
  logic [20:0] delay_out;

  bucket_calc dut (.*);

  // DR bucket feeding LER bucket 0 in each of the 23 cycles
  localparam int DR_FOR_LER0 [23] = '{0, 180, 130, 80, 30, 210, 160, 110, 60, 10,
                                      190, 140, 90, 40, 220, 170, 120, 70, 20, 200,
                                      150, 100, 50};

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(input int opp, input int ler, input int cyc,
                       input int e_ler, input int e_dr, input int e_opp, input int e_dsel);
    @(negedge clk);
    in_valid = 1'b1; opp_in = 17'(opp); ler_in = 13'(ler); cycle_in = 5'(cyc);
    @(negedge clk);
    in_valid = 1'b0;
    check("valid too early", out_valid, 0);
    @(negedge clk);
    check("valid after two cycles", out_valid, 1);
    check("ler_out", ler_out, e_ler);
    check("dr_out", dr_out, e_dr);
    check("opp_out", opp_out, e_opp);
    check("delay_out", delay_out, e_opp * 11);
    check("dr_sel_out", dr_sel_out, e_dsel);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int opp, ler, cyc, inv_opp;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // LER bucket 0: the DR bucket in each cycle
    for (int c = 0; c < 23; c++) begin
      apply(0, 0, c, 0, 0, c * 5120, DR_FOR_LER0[c]);
    end
    // random buckets and opportunities
    for (int n = 0; n < 400; n++) begin
      opp = int'($urandom_range(23 * 5120 - 1));
      ler = int'($urandom_range(5119));
      cyc = int'($urandom_range(22));
      // reference inverse by search, independent of the 209 constant
      inv_opp = 0;
      for (int k = 0; k < 5120; k++) if ((49 * k) % 5120 == ler) inv_opp = k;
      inv_opp += cyc * 5120;
      apply(opp, ler, cyc, (49 * opp) % 5120, (49 * opp) % 230, inv_opp,
            (49 * inv_opp) % 230);
      check("inverse lands on bucket", (49 * inv_opp) % 5120, ler);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
