// tb_evg_link_tx: self-checking test of the generator's frame builder.
//
// With the data buffer off, every frame must carry the event code and the
// distributed-bus value presented one cycle earlier. With it on, frames must
// alternate between distributed-bus slots and data-buffer slots (so the bus is
// refreshed at half rate), and a block of random length written to the buffer
// must come out byte for byte, the last byte marked as the end of the block,
// with idle slots around it. Events are never delayed by the buffer.
module tb_evg_link_tx;
  import timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        evt_valid = 1'b0, buf_enable = 1'b0, buf_wr_en = 1'b0, buf_send = 1'b0;
  logic [7:0]  evt_code = '0, dbus = '0, buf_wr_data = '0;
  logic [10:0] buf_wr_addr = '0;
  logic [11:0] buf_len = '0;
  logic        buf_busy;
  evt_frame_t  frame;

  evg_link_tx #(.BUF_BYTES(2048)) dut (.*);

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

  initial begin
    logic [7:0] p_code, p_dbus;
    logic       p_valid;
    int len, got_bytes, dbus_slots, ends, cycles;
    data_kind_e last_kind;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // plain mode
    p_valid = 0; p_code = 0; p_dbus = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        check("code", frame.code, p_valid ? p_code : 8'h00);
        check("dbus", frame.data, p_dbus);
        check("kind", frame.kind, DK_DBUS);
      end
      evt_valid = ($urandom_range(3) == 0);
      evt_code  = 8'($urandom_range(1, 255));
      dbus      = 8'($urandom());
      p_valid = evt_valid; p_code = evt_code; p_dbus = dbus;
    end
    // data buffer mode: several blocks
    for (int b = 0; b < 6; b++) begin
      len = (b == 5) ? 2048 : int'($urandom_range(1, 300));
      @(negedge clk);
      evt_valid = 0;
      for (int k = 0; k < len; k++) begin
        blk[k] = 8'($urandom());
        buf_wr_en = 1; buf_wr_addr = 11'(k); buf_wr_data = blk[k];
        @(negedge clk);
      end
      buf_wr_en = 0;
      buf_enable = 1;
      buf_len = 12'(len);
      buf_send = 1;
      got_bytes = 0; dbus_slots = 0; ends = 0; cycles = 0;
      last_kind = DK_BUF;
      p_valid = 0; p_dbus = dbus;
      while (cycles < 2 * len + 20) begin
        evt_valid = ($urandom_range(3) == 0);
        evt_code  = 8'($urandom_range(1, 255));
        p_valid = evt_valid; p_code = evt_code;
        dbus = 8'($urandom());
        p_dbus = dbus;
        @(negedge clk);
        buf_send = 0;
        cycles++;
        check("code with buffer", frame.code, p_valid ? p_code : 8'h00);
        if (cycles > 1) begin
          check("slots alternate", (frame.kind == DK_DBUS), (last_kind != DK_DBUS));
        end
        last_kind = frame.kind;
        case (frame.kind)
          DK_DBUS: begin
            dbus_slots++;
            check("dbus slot data", frame.data, p_dbus);
          end
          DK_BUF, DK_BUF_END: begin
            check("buffer byte", frame.data, blk[got_bytes]);
            got_bytes++;
            if (frame.kind == DK_BUF_END) begin
              ends++;
              check("end on last byte", got_bytes, len);
            end
          end
          default: ;
        endcase
      end
      check("bytes sent", got_bytes, len);
      check("one end marker", ends, 1);
      check("dbus at half rate", dbus_slots, cycles / 2);
      check("not busy after block", buf_busy, 0);
      buf_enable = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
