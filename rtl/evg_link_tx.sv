// evg_link_tx: builds the event stream that the event generator sends.
//
// Every event clock one frame leaves: the event code (0x00 when no event is
// due) and a data byte. With the data buffer disabled the data byte is the
// distributed bus, sampled every cycle. With it enabled the slots alternate:
// even slots carry the distributed bus, odd slots carry the data buffer, so the
// distributed bus runs at half the event clock rate. The data buffer is a
// BUF_BYTES-byte memory written by the host; a pulse on `buf_send` sends bytes
// 0 .. buf_len-1, one per odd slot, the last marked DK_BUF_END. An odd slot with
// nothing to send is marked DK_IDLE. The slot parity and the end marking stand in
// for the control characters of the 8b10b serial link, which is not part of this
// design.
//
// Timing: the frame is registered, so an event presented in cycle t and the
// distributed bus sampled in cycle t leave in frame t+1. buf_busy is high from
// the cycle after buf_send until the last byte has left.
module evg_link_tx
  import timing_pkg::*;
#(
  parameter int BUF_BYTES = 2048,
  localparam int BW = $clog2(BUF_BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        evt_valid,
  input  logic [7:0]  evt_code,
  input  logic [7:0]  dbus,
  // data buffer
  input  logic        buf_enable,
  input  logic        buf_wr_en,
  input  logic [BW-1:0] buf_wr_addr,
  input  logic [7:0]  buf_wr_data,
  input  logic [BW:0] buf_len,      // number of bytes to send, 1 .. BUF_BYTES
  input  logic        buf_send,
  output logic        buf_busy,
  // link
  output evt_frame_t  frame
);

  logic [7:0]  bmem [BUF_BYTES];
  logic [7:0]  rd_byte;
  logic [BW:0] idx, len;
  logic        odd;       // next frame is an odd (data buffer) slot
  logic        last_byte;

  assign last_byte = (idx + 1'b1 == len);

  always_ff @(posedge clk) begin
    if (buf_wr_en) bmem[buf_wr_addr] <= buf_wr_data;
  end

  assign rd_byte = bmem[idx[BW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame    <= '{code: EVT_NULL, data: 8'h00, kind: DK_DBUS};
      odd      <= 1'b0;
      idx      <= '0;
      len      <= '0;
      buf_busy <= 1'b0;
    end else begin
      frame.code <= evt_valid ? evt_code : EVT_NULL;
      odd        <= buf_enable ? ~odd : 1'b0;
      if (!buf_enable || !odd) begin
        frame.data <= dbus;
        frame.kind <= DK_DBUS;
      end else if (buf_busy) begin
        frame.data <= rd_byte;
        frame.kind <= last_byte ? DK_BUF_END : DK_BUF;
        idx        <= idx + 1'b1;
        if (last_byte) buf_busy <= 1'b0;
      end else begin
        frame.data <= 8'h00;
        frame.kind <= DK_IDLE;
      end
      if (buf_send && !buf_busy && buf_enable && buf_len != '0) begin
        buf_busy <= 1'b1;
        idx      <= '0;
        len      <= buf_len;
      end
    end
  end

endmodule
