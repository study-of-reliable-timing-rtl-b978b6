// bucket_calc: bucket-selection arithmetic for the damping ring (DR) and the
// positron main ring (LER).
//
// The LINAC and ring RF clocks coincide every 49 ring RF buckets, which is 11
// event clocks (96.3 ns); call each coincidence an injection opportunity i,
// counted from the bucket-selection fiducial. Opportunity i fills LER bucket
// (49*i mod 5120) and DR bucket (49*i mod 230); the pattern repeats after
// 23*5120 opportunities (11.34 ms).
//
// Forward path: from opp_in give ler_out and dr_out.
// Inverse path: for a wanted LER bucket `ler_in` and a BSC-for-LER cycle
// `cycle_in` (0..22, each 5120 opportunities, 493 us), give the opportunity
// opp_out = ((ler_in * 209) mod 5120) + 5120*cycle_in, where 209 is the
// inverse of 49 modulo 5120, the delay in event clocks delay_out = 11*opp_out,
// and the DR bucket the beam then comes from, dr_sel_out. Looking at the 23
// cycles shows which DR buckets can feed a given LER bucket.
//
// Both paths are two-stage pipelines: results appear two cycles after in_valid.
module bucket_calc #(
  parameter int H_MR  = timing_pkg::H_MR,
  parameter int H_DR  = timing_pkg::H_DR,
  parameter int STEP  = timing_pkg::RF_PER_COINC,
  parameter int INV_STEP = 209,  // STEP^-1 mod H_MR
  parameter int EVCLK_PER_OPP = timing_pkg::EVCLK_PER_COINC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [16:0] opp_in,
  input  logic [12:0] ler_in,
  input  logic [4:0]  cycle_in,
  output logic        out_valid,
  output logic [12:0] ler_out,
  output logic [7:0]  dr_out,
  output logic [16:0] opp_out,
  output logic [20:0] delay_out,
  output logic [7:0]  dr_sel_out
);

  logic [23:0] prod_fwd_q;
  logic [12:0] base_q;
  logic [4:0]  cyc_q;
  logic        v_q;
  logic [16:0] opp_s;

  assign opp_s = 17'(base_q) + 17'(cyc_q) * 17'(H_MR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q        <= 1'b0;
      prod_fwd_q <= '0;
      base_q     <= '0;
      cyc_q      <= '0;
      out_valid  <= 1'b0;
      ler_out    <= '0;
      dr_out     <= '0;
      opp_out    <= '0;
      delay_out  <= '0;
      dr_sel_out <= '0;
    end else begin
      // stage 1
      v_q        <= in_valid;
      prod_fwd_q <= 24'(opp_in) * 24'(STEP);
      base_q     <= 13'((24'(ler_in) * 24'(INV_STEP)) % 24'(H_MR));
      cyc_q      <= cycle_in;
      // stage 2
      out_valid  <= v_q;
      ler_out    <= 13'(prod_fwd_q % 24'(H_MR));
      dr_out     <= 8'(prod_fwd_q % 24'(H_DR));
      opp_out    <= opp_s;
      delay_out  <= 21'(opp_s) * 21'(EVCLK_PER_OPP);
      dr_sel_out <= 8'((24'(opp_s) * 24'(STEP)) % 24'(H_DR));
    end
  end

endmodule
