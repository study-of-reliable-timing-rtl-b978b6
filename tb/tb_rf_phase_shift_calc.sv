// tb_rf_phase_shift_calc: checks of the RF phase-shift calculator.
//
// 1. The 25 shift types (bucket offset n, event-clock offset k, time error dT):
//    dt_out * T_event/49 must equal the tabulated dT to within 1 ps.
// 2. For LER bucket 0 reached through DR bucket 0 (cycle 0), the DR bucket
//    after each of the first 21 shift types, in the nearest cycle and one and
//    two cycles either side, must equal the published table. One cell of
//    that table (type 7, two cycles early) reads 220 where the 50-bucket step
//    between cycles gives 10; 10 is used.
// 3. 3000 random cases: the unshifted delay must reach LER bucket m0 (found by
//    searching the 5120 opportunities of a cycle); the shifted delay minus k
//    must be a whole number q1 of opportunities, within 23*5120; the shifted
//    RF phase must land on LER bucket m0 ((49*q1 + n) mod 5120 = m0) through
//    DR bucket (49*q1 + n) mod 230; and q1 must lie less than one cycle from
//    q0 + 5120*cyc_off (modulo 23 cycles).
// Each result is checked two cycles after its input.
module tb_rf_phase_shift_calc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              in_valid = 1'b0;
  logic [12:0]       m0_in = '0;
  logic [4:0]        cycle_in = '0;
  logic [5:0]        n_in = '0;
  logic [3:0]        k_in = '0;
  logic signed [2:0] cyc_off_in = '0;
  logic              out_valid;
  logic [20:0]       clock0_out, clock1_out;
  logic [7:0]        d0_out, d2_out;
  logic signed [10:0] dt_out;

  rf_phase_shift_calc dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // shift types: n, k, dT in femtoseconds
  localparam int NT = 25;
  int tab_n [NT] = '{0, 4, 5, 9, 13, 14, 17, 18, 22, 23, 26, 27, 31, 32, 35, 36, 40, 44, 45, 1, 8, 10, 39, 41, 48};
  int tab_k [NT] = '{0, 1, 1, 2, 3, 3, 4, 4, 5, 5, 6, 6, 7, 7, 8, 8, 9, 10, 10, 0, 2, 2, 9, 9, 11};
  longint tab_dt [NT] = '{0, -893196, 1071830, 178639, -714556, 1250470, -1607750, 357278,
                          -535917, 1429110, -1429110, 535917, -357278, 1607750, -1250470,
                          714556, -178639, -1071830, 893196, 1965115, -1786468, 2143762,
                          -2143762, 1786468, -1965115};
  // DR bucket for LER bucket 0, columns cycle -2, -1, nearest, +1, +2
  int tab_dr [21][5] = '{
    '{100,  50,   0, 180, 130}, '{ 80,  30, 210, 160, 110}, '{190, 140,  90,  40, 220},
    '{170, 120,  70,  20, 200}, '{150, 100,  50,   0, 180}, '{ 30, 210, 160, 110,  60},
    '{130,  80,  30, 210, 160}, '{ 10, 190, 140,  90,  40}, '{220, 170, 120,  70,  20},
    '{100,  50,   0, 180, 130}, '{150, 100,  50,   0, 180}, '{ 30, 210, 160, 110,  60},
    '{ 10, 190, 140,  90,  40}, '{120,  70,  20, 200, 150}, '{220, 170, 120,  70,  20},
    '{100,  50,   0, 180, 130}, '{ 80,  30, 210, 160, 110}, '{ 60,  10, 190, 140,  90},
    '{170, 120,  70,  20, 200}, '{210, 160, 110,  60,  10}, '{ 60,  10, 190, 140,  90}};

  task automatic apply(input int m0, input int cyc, input int n, input int k, input int off);
    @(negedge clk);
    in_valid   = 1'b1;
    m0_in      = 13'(m0);
    cycle_in   = 5'(cyc);
    n_in       = 6'(n);
    k_in       = 4'(k);
    cyc_off_in = 3'(off);
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    check("out_valid two cycles after the input", out_valid, 1);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint dtfs, q0, q1, dq;
    int m0, cyc, n, k, off;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. time error of each shift type
    for (int t = 0; t < NT; t++) begin
      apply(0, 0, tab_n[t], tab_k[t], 0);
      dtfs = longint'(dt_out) * 178_639;   // T_event/49 = 8.75350/49 ns
      check($sformatf("dT of type %0d within 1 ps", t), (dtfs - tab_dt[t] < 1000 && tab_dt[t] - dtfs < 1000), 1);
    end

    // 2. DR bucket table for LER bucket 0
    for (int t = 0; t < 21; t++) begin
      for (int c = 0; c < 5; c++) begin
        apply(0, 0, tab_n[t], tab_k[t], c - 2);
        check($sformatf("DR bucket type %0d cycle %0d", t, c - 2), d2_out, tab_dr[t][c]);
      end
    end

    // 3. random cases
    for (int r = 0; r < 3000; r++) begin
      m0  = int'($urandom_range(5119));
      cyc = int'($urandom_range(22));
      n   = int'($urandom_range(63));
      k   = int'($urandom_range(15));
      off = int'($urandom_range(4)) - 2;
      apply(m0, cyc, n, k, off);
      // unshifted: search the cycle for the opportunity that reaches m0
      q0 = -1;
      for (int i = 0; i < 5120; i++) if ((49 * i) % 5120 == m0) q0 = i + 5120 * cyc;
      check("clock0", clock0_out, 11 * q0);
      check("d0", d0_out, (49 * q0) % 230);
      check("clock1 - k is whole opportunities", (clock1_out - k) % 11, 0);
      q1 = (longint'(clock1_out) - k) / 11;
      check("q1 inside 23 cycles", q1 < 117_760, 1);
      check("shifted phase reaches LER bucket m0", (49 * q1 + n) % 5120, m0);
      check("d2", d2_out, (49 * q1 + n) % 230);
      dq = ((q1 - q0 - 5120 * off) % 117_760 + 117_760) % 117_760;
      check("within one cycle of the chosen cycle", (dq < 5120 || dq > 117_760 - 5120), 1);
      check("dT", dt_out, 11 * n - 49 * k);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
