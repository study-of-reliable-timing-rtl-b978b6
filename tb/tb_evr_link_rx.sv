// tb_evr_link_rx: self-checking test of the receiver's frame decoder.
//
// Feeds a random frame stream: event codes (0x00 = no event), distributed-bus
// frames and data-buffer blocks whose slots alternate with bus slots, with idle
// slots between blocks. Checks that every non-zero code gives a strobe one cycle
// later, that the bus holds the last value received, and that each block is
// stored from address 0, reported once with its length and read back intact.
module tb_evr_link_rx;
  import timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  evt_frame_t  frame = '{code: 8'h00, data: 8'h00, kind: DK_DBUS};
  logic        evt_valid, buf_rx_done;
  logic [7:0]  evt_code, dbus, buf_rd_data;
  logic [11:0] buf_rx_len;
  logic [10:0] buf_rd_addr = '0;

  evr_link_rx #(.BUF_BYTES(2048)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] blk [2048];
  logic [7:0] bus_ref = 8'h00;
  int done_seen = 0;

  // send one frame and check the registered outputs for it
  task automatic put(input logic [7:0] code, input logic [7:0] data, input data_kind_e kind);
    frame = '{code: code, data: data, kind: kind};
    if (kind == DK_DBUS) bus_ref = data;
    @(negedge clk);
    check("evt_valid", evt_valid, code != 8'h00);
    if (code != 8'h00) check("evt_code", evt_code, code);
    check("dbus held", dbus, bus_ref);
    if (buf_rx_done) done_seen++;
  endtask

  initial begin
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < 8; b++) begin
      // bus-only traffic
      for (int n = 0; n < 200; n++)
        put(($urandom_range(3) == 0) ? 8'($urandom_range(1, 255)) : 8'h00, 8'($urandom()), DK_DBUS);
      // a block, alternating with bus slots, with some idle slots first
      len = (b == 7) ? 2048 : int'($urandom_range(1, 200));
      for (int k = 0; k < len; k++) blk[k] = 8'($urandom());
      for (int n = 0; n < 3; n++) begin
        put(8'h00, 8'($urandom()), DK_DBUS);
        put(8'h00, 8'h00, DK_IDLE);
      end
      done_seen = 0;
      for (int k = 0; k < len; k++) begin
        put(($urandom_range(3) == 0) ? 8'($urandom_range(1, 255)) : 8'h00, 8'($urandom()), DK_DBUS);
        check("no early done", done_seen, 0);
        put(8'h00, blk[k], (k == len - 1) ? DK_BUF_END : DK_BUF);
      end
      check("block done once", done_seen, 1);
      check("block length", buf_rx_len, len);
      for (int k = 0; k < len; k++) begin
        buf_rd_addr = 11'(k);
        #1;
        check("stored byte", buf_rd_data, blk[k]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
