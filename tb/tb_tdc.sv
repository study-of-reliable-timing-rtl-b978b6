// tb_tdc: self-checking test of the common-start, multi-stop TDC.
//
// Start and stop levels are driven on the TDC clock. Each round picks random
// stop edges on the 16 channels (some channels get more than four, so extra
// hits must be dropped), then checks that result word c*4+k holds the distance
// in clocks from the start edge to the k-th edge of channel c, that the hit
// counts saturate at four, and that each hit announcement (toggle, channel,
// number, time) matches the stored word and belongs to the announced channel. A final round makes two channels fire
// in the same cycle: the lower channel is stored exactly and the higher one
// with one more count.
module tb_tdc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start = 1'b0;
  logic [15:0] stop = '0;
  logic [5:0]  rd_addr = '0;
  logic [3:0]  ann_chan = '0;
  logic [31:0] rd_data, hit_time;
  logic [15:0][2:0] hit_cnt;
  logic        hit_toggle, running;
  logic [3:0]  hit_chan;
  logic [2:0]  hit_num;

  tdc #(.NCH(16), .NHIT(4), .W(32)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // every announced hit must match what was stored for it
  logic tog_q = 1'b0;
  int   announced = 0;
  always @(negedge clk) begin
    if (rst_n && hit_toggle != tog_q) begin
      announced++;
      checks++;
      if (dut.res[32'(hit_chan) * 4 + 32'(hit_num)] != hit_time || hit_chan != ann_chan) begin
        failures++;
        $display("FAIL announcement ch %0d hit %0d", hit_chan, hit_num);
      end
    end
    tog_q <= hit_toggle;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int SLOTS = 200;

  initial begin
    int edge_ch [SLOTS];
    int exp_t [16][4];
    int nh [16];
    int slot, ph, stored;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 10; r++) begin
      ann_chan = 4'($urandom_range(15));
      for (int c = 0; c < 16; c++) nh[c] = 0;
      for (int j = 0; j < SLOTS; j++) begin
        edge_ch[j] = ($urandom_range(2) == 0) ? -1 : int'($urandom_range(15));
        if (edge_ch[j] >= 0) begin
          if (nh[edge_ch[j]] < 4) exp_t[edge_ch[j]][nh[edge_ch[j]]] = 10 + 5 * j + r;
          nh[edge_ch[j]]++;
        end
      end
      // drive: start edge at offset 0, stop edge of slot j at offset 10+5j+r
      for (int k = 0; k < 10 + 5 * SLOTS + 20; k++) begin
        @(negedge clk);
        start = (k < 3);
        stop  = '0;
        if (k >= 10 + r) begin
          slot = (k - 10 - r) / 5;
          ph   = (k - 10 - r) % 5;
          if (slot < SLOTS && edge_ch[slot] >= 0 && ph < 2) stop[edge_ch[slot]] = 1'b1;
        end
      end
      repeat (5) @(negedge clk);
      for (int c = 0; c < 16; c++) begin
        stored = (nh[c] > 4) ? 4 : nh[c];
        check("hit count", hit_cnt[c], stored);
        for (int k = 0; k < stored; k++) begin
          rd_addr = 6'(c * 4 + k);
          #1;
          check("hit time", rd_data, exp_t[c][k]);
        end
      end
      @(negedge clk);
    end
    // two channels in the same cycle
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      start = (k < 3);
      stop  = '0;
      if (k >= 40 && k < 42) begin stop[3] = 1'b1; stop[9] = 1'b1; end
    end
    repeat (5) @(negedge clk);
    rd_addr = 6'(3 * 4);
    #1 check("collision low channel", rd_data, 40);
    rd_addr = 6'(9 * 4);
    #1 check("collision high channel one later", rd_data, 41);
    @(negedge clk);
    checks++;
    if (announced < 20) begin failures++; $display("FAIL few announcements %0d", announced); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
