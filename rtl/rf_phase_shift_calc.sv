// rf_phase_shift_calc: new bucket-selection delay and damping-ring bucket when
// the RF phase of the downstream LINAC is shifted.
//
// Without a shift, LER bucket m0 in BSC-for-LER cycle c is reached at
// injection opportunity q0 = opp(m0) + 5120*c (opp(m) = 209*m mod 5120, see
// bucket_calc), i.e. after clock0 = 11*q0 event clocks, through DR bucket
// d0 = 49*q0 mod 230. If d0 is not usable, the downstream RF phase is shifted
// by n ring buckets and the beam trigger by k event clocks, so that the LINAC
// meets LER/DR buckets (m+n, d+n) instead of (m, d). The new delay is
//   clock1 = clock0 + k - Delay[m0+n] + Delay[m0],  Delay[m] = 11*opp(m),
// and the LER bucket reached is again m0. The DR bucket reached follows from
// the same opportunity count q1 = q0 - opp(m0+n) + opp(m0):
//   d2 = (49*q1 + n) mod 230.
// This is the exact integer form of d2 = (clock1 * 49 / 96.3 ns) mod 230: the
// k event clocks differ from n ring buckets by the small time error dT that the
// phase shift leaves, and the integer form drops it instead of rounding.
// `cyc_off` adds whole BSC-for-LER cycles (5120 opportunities, 493 us) to pick
// the cycle nearest to the AC line; each cycle moves d2 by 180 (i.e. -50)
// buckets. q1 is wrapped into 0 .. 23*5120-1, the period after which LER and
// DR buckets repeat, so clock1 is a delay after the fiducial.
//
// dt_out is dT = n*T_rf - k*T_event in units of T_event/49 (0.1786 ns), i.e.
// 11*n - 49*k; with a 2.144 ns limit on |dT| the usable (n, k) pairs are the
// 25 shift types the design considers.
//
// The equations follow the RF phase-shift method; the integer form of d2, the
// wrapping, cyc_off and the two-cycle pipeline are this design's choices.
// Timing: results appear two cycles after in_valid, one result per cycle.
module rf_phase_shift_calc #(
  parameter int H_MR     = timing_pkg::H_MR,
  parameter int H_DR     = timing_pkg::H_DR,
  parameter int STEP     = timing_pkg::RF_PER_COINC,
  parameter int INV_STEP = 209,   // STEP^-1 mod H_MR
  parameter int EVCLK_PER_OPP = timing_pkg::EVCLK_PER_COINC,
  parameter int N_CYCLE  = 23     // BSC-for-LER cycles before buckets repeat
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [12:0]       m0_in,      // LER bucket to fill
  input  logic [4:0]        cycle_in,   // BSC-for-LER cycle of the unshifted delay
  input  logic [5:0]        n_in,       // RF shift in ring buckets
  input  logic [3:0]        k_in,       // trigger shift in event clocks
  input  logic signed [2:0] cyc_off_in, // whole cycles added to the result
  output logic              out_valid,
  output logic [20:0]       clock0_out, // unshifted delay, event clocks
  output logic [7:0]        d0_out,     // unshifted DR bucket
  output logic [20:0]       clock1_out, // shifted delay, event clocks
  output logic [7:0]        d2_out,     // DR bucket after the shift
  output logic signed [10:0] dt_out     // dT in T_event/49 units
);

  localparam int Q_PERIOD = H_MR * N_CYCLE;   // 117,760 opportunities

  // stage 1: inverse bucket map of m0 and m0+n
  logic [12:0] opp_m0_q, opp_mn_q;
  logic [4:0]  cyc_q;
  logic [5:0]  n_q;
  logic [3:0]  k_q;
  logic signed [2:0] off_q;
  logic        v_q;

  logic [13:0] mn_sum;
  logic [12:0] mn;       // LER bucket m0+n
  assign mn_sum = 14'(m0_in) + 14'(n_in);
  assign mn     = (mn_sum >= 14'(H_MR)) ? 13'(mn_sum - 14'(H_MR)) : 13'(mn_sum);

  // stage 2 arithmetic, signed 20-bit opportunity counts
  logic signed [19:0] q0_s, q1_raw, q1_s;

  always_comb begin
    q0_s   = 20'(opp_m0_q) + 20'(cyc_q) * 20'(H_MR);
    q1_raw = q0_s - 20'(opp_mn_q) + 20'(opp_m0_q) + 20'(off_q) * 20'(H_MR);
    if (q1_raw < 0)                  q1_s = q1_raw + 20'(Q_PERIOD);
    else if (q1_raw >= 20'(Q_PERIOD)) q1_s = q1_raw - 20'(Q_PERIOD);
    else                             q1_s = q1_raw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q        <= 1'b0;
      opp_m0_q   <= '0;
      opp_mn_q   <= '0;
      cyc_q      <= '0;
      n_q        <= '0;
      k_q        <= '0;
      off_q      <= '0;
      out_valid  <= 1'b0;
      clock0_out <= '0;
      d0_out     <= '0;
      clock1_out <= '0;
      d2_out     <= '0;
      dt_out     <= '0;
    end else begin
      v_q      <= in_valid;
      opp_m0_q <= 13'((24'(m0_in) * 24'(INV_STEP)) % 24'(H_MR));
      opp_mn_q <= 13'((24'(mn) * 24'(INV_STEP)) % 24'(H_MR));
      cyc_q    <= cycle_in;
      n_q      <= n_in;
      k_q      <= k_in;
      off_q    <= cyc_off_in;

      out_valid  <= v_q;
      clock0_out <= 21'(q0_s) * 21'(EVCLK_PER_OPP);
      d0_out     <= 8'((24'(q0_s) * 24'(STEP)) % 24'(H_DR));
      clock1_out <= 21'(q1_s) * 21'(EVCLK_PER_OPP) + 21'(k_q);
      d2_out     <= 8'((24'(q1_s) * 24'(STEP) + 24'(n_q)) % 24'(H_DR));
      dt_out     <= 11'(11 * int'(n_q)) - 11'(STEP * int'(k_q));
    end
  end

endmodule
