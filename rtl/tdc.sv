// tdc: common-start, multi-stop time-to-digital converter.
//
// Measures the time from one start signal to up to NHIT rising edges on each of
// NCH stop channels, with one clock period as the unit (1 ns with a 1 GHz clock).
// A rising edge on `start` clears all channels and restarts a W-bit counter;
// each following stop edge on channel c stores the counter in result word
// c*NHIT + k, where k counts the hits already stored on that channel. Hits past
// NHIT are ignored; the counter saturates at its maximum (about 4.3 s for 32
// bits at 1 ns). The NCH*NHIT result words (64 by default) are read through an
// asynchronous port, and `hit_cnt` gives the number of hits of every channel.
//
// Every stored hit of channel `ann_chan` is also announced: hit_chan, hit_num
// and hit_time hold that hit and hit_toggle changes state, so a slower clock
// domain can pick the value up with a synchroniser on the toggle. Announcing a
// single channel keeps hits of other channels from overwriting the value
// before the slow domain has taken it.
//
// Start and stop inputs are asynchronous and pass through identical two-stage
// synchronisers, so their latency cancels; a stop edge that comes d cycles
// after the start edge reads d (plus or minus one for the sampling phase).
module tdc #(
  parameter int NCH  = 16,
  parameter int NHIT = 4,
  parameter int W    = 32,
  localparam int CW  = $clog2(NCH),
  localparam int HW  = $clog2(NHIT+1),
  localparam int RAW = $clog2(NCH*NHIT)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NCH-1:0]       stop,
  input  logic [RAW-1:0]       rd_addr,
  input  logic [CW-1:0]        ann_chan,
  output logic [W-1:0]         rd_data,
  output logic [NCH-1:0][HW-1:0] hit_cnt,
  output logic                 hit_toggle,
  output logic [CW-1:0]        hit_chan,
  output logic [HW-1:0]        hit_num,
  output logic [W-1:0]         hit_time,
  output logic                 running
);

  logic [W-1:0]   res [NCH*NHIT];
  logic [W-1:0]   cnt;
  logic           start_rise;
  logic           start_lvl;
  logic [NCH-1:0] stop_rise, stop_lvl;
  logic           rec;
  logic [CW-1:0]  rec_ch;

  sync_edge u_start (.clk, .rst_n, .d(start), .level(start_lvl), .rise(start_rise));
  for (genvar c = 0; c < NCH; c++) begin : g_stop
    sync_edge u_stop (.clk, .rst_n, .d(stop[c]), .level(stop_lvl[c]), .rise(stop_rise[c]));
  end

  assign rd_data = res[rd_addr];

  // At most one hit is stored per cycle; when two channels fire in the same
  // cycle the lower channel is stored first and the other is kept pending.
  logic [NCH-1:0] pend, cand;
  always_comb begin
    cand   = running ? (pend | stop_rise) : '0;
    rec    = 1'b0;
    rec_ch = '0;
    for (int c = NCH-1; c >= 0; c--) begin
      if (cand[c] && hit_cnt[c] < HW'(NHIT)) begin
        rec    = 1'b1;
        rec_ch = CW'(c);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rec && !start_rise) res[32'(rec_ch) * NHIT + 32'(hit_cnt[rec_ch])] <= cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      running    <= 1'b0;
      hit_cnt    <= '0;
      pend       <= '0;
      hit_toggle <= 1'b0;
      hit_chan   <= '0;
      hit_num    <= '0;
      hit_time   <= '0;
    end else if (start_rise) begin
      cnt     <= W'(1);
      running <= 1'b1;
      hit_cnt <= '0;
      pend    <= '0;
    end else begin
      if (cnt != '1) cnt <= cnt + 1'b1;
      // a hit that had to wait is stored with the count of the cycle in
      // which it is stored, one cycle late for each channel served before it
      pend <= cand;
      if (rec) begin
        pend[rec_ch]    <= 1'b0;
        hit_cnt[rec_ch] <= hit_cnt[rec_ch] + 1'b1;
        if (rec_ch == ann_chan) begin
          hit_toggle <= ~hit_toggle;
          hit_chan   <= rec_ch;
          hit_num    <= hit_cnt[rec_ch];
          hit_time   <= cnt;
        end
      end
      for (int c = 0; c < NCH; c++) begin
        if (hit_cnt[c] >= HW'(NHIT)) pend[c] <= 1'b0;
      end
    end
  end

endmodule
