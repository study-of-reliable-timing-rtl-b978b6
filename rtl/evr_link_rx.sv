// evr_link_rx: decodes the event stream in an event receiver.
//
// Each received frame gives an event strobe when its code is not 0x00, and
// either a new distributed-bus value (DK_DBUS frames; the bus holds its value
// between updates) or one data buffer byte. Data buffer bytes are stored from
// address 0 upward in a BUF_BYTES-byte receive memory; the DK_BUF_END byte
// completes the block, raises `buf_rx_done` for one cycle and reports the block
// length. The host reads the memory through an asynchronous read port.
//
// Timing: outputs are registered, one event clock after the frame.
module evr_link_rx
  import timing_pkg::*;
#(
  parameter int BUF_BYTES = 2048,
  localparam int BW = $clog2(BUF_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  evt_frame_t    frame,
  output logic          evt_valid,
  output logic [7:0]    evt_code,
  output logic [7:0]    dbus,
  output logic          buf_rx_done,
  output logic [BW:0]   buf_rx_len,
  input  logic [BW-1:0] buf_rd_addr,
  output logic [7:0]    buf_rd_data
);

  logic [7:0]  rmem [BUF_BYTES];
  logic [BW:0] wptr;
  logic        is_buf;

  assign is_buf      = (frame.kind == DK_BUF) || (frame.kind == DK_BUF_END);
  assign buf_rd_data = rmem[buf_rd_addr];

  always_ff @(posedge clk) begin
    if (is_buf && wptr < (BW+1)'(BUF_BYTES)) rmem[wptr[BW-1:0]] <= frame.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evt_valid   <= 1'b0;
      evt_code    <= EVT_NULL;
      dbus        <= 8'h00;
      buf_rx_done <= 1'b0;
      buf_rx_len  <= '0;
      wptr        <= '0;
    end else begin
      evt_valid   <= (frame.code != EVT_NULL);
      evt_code    <= frame.code;
      buf_rx_done <= 1'b0;
      if (frame.kind == DK_DBUS) dbus <= frame.data;
      if (frame.kind == DK_BUF) begin
        wptr <= wptr + 1'b1;
      end else if (frame.kind == DK_BUF_END) begin
        wptr        <= '0;
        buf_rx_done <= 1'b1;
        buf_rx_len  <= wptr + 1'b1;
      end
    end
  end

endmodule
