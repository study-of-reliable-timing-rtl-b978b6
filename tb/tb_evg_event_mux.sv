// tb_evg_event_mux: self-checking test of the generator's priority encoder.
//
// Random requests from eight trigger events, two sequencers and the software
// event are applied every cycle. A reference model kept here (one pending slot
// per source, a new request replacing a pending one, lowest source index
// first) predicts every output code one cycle after its request, the idle code
// 0x00 when nothing is pending, and the `dropped` pulses. A lone request must
// come out in the next cycle.
module tb_evg_event_mux;
  import timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NT = 8, NS = 2, N = NT + NS + 1;

  logic [NT-1:0]      tevt_stim = '0, tevt_enable = '1;
  logic [NT-1:0][7:0] tevt_code = '0;
  logic [NS-1:0]      seq_valid = '0;
  logic [NS-1:0][7:0] seq_code = '0;
  logic               sw_valid = 1'b0;
  logic [7:0]         sw_code = '0;
  logic               evt_valid, dropped;
  logic [7:0]         evt_code;

  evg_event_mux #(.NUM_TEVT(NT), .NUM_SEQ(NS)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       pend [N];
    logic [7:0] pcode [N];
    logic       req [N];
    logic [7:0] rcode [N];
    logic       exp_valid, exp_drop;
    logic [7:0] exp_code;
    int busy_cycles = 0, drops = 0;
    for (int k = 0; k < N; k++) begin pend[k] = 0; pcode[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // lone request latency
    @(negedge clk);
    seq_valid[1] = 1; seq_code[1] = 8'h42;
    @(negedge clk);
    seq_valid = '0;
    check("lone request next cycle", evt_valid, 1);
    check("lone request code", evt_code, 8'h42);
    @(negedge clk);
    check("idle code", evt_code, 8'h00);
    check("idle valid", evt_valid, 0);
    for (int n = 0; n < 20000; n++) begin
      // random requests for this cycle
      for (int k = 0; k < N; k++) begin
        req[k]   = ($urandom_range(((n / 2000) % 2 == 0) ? 30 : 6) == 0);
        rcode[k] = 8'($urandom_range(1, 255));
      end
      if (n % 3000 == 0) tevt_enable = 8'($urandom());
      for (int k = 0; k < NT; k++) begin
        tevt_stim[k] = req[k]; tevt_code[k] = rcode[k];
        if (!tevt_enable[k]) req[k] = 0;
      end
      for (int k = 0; k < NS; k++) begin
        seq_valid[k] = req[NT+k]; seq_code[k] = rcode[NT+k];
      end
      sw_valid = req[N-1]; sw_code = rcode[N-1];
      // reference
      exp_drop = 0;
      for (int k = 0; k < N; k++) begin
        if (req[k] && pend[k]) exp_drop = 1;
        if (req[k]) begin pend[k] = 1; pcode[k] = rcode[k]; end
      end
      exp_valid = 0; exp_code = 8'h00;
      for (int k = 0; k < N; k++) begin
        if (pend[k] && !exp_valid) begin
          exp_valid = 1; exp_code = pcode[k]; pend[k] = 0;
        end
      end
      @(negedge clk);
      check("valid", evt_valid, exp_valid);
      check("code", evt_code, exp_code);
      check("dropped", dropped, exp_drop);
      if (exp_valid) busy_cycles++;
      if (exp_drop) drops++;
    end
    checks++;
    if (drops == 0) begin failures++; $display("FAIL no drop exercised"); end
    $display("busy=%0d drops=%0d", busy_cycles, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
