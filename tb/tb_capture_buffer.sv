// tb_capture_buffer: records pulses of several lengths and strides, then
// reads the RAM back and compares with the samples kept here. Checks that
// the start sample is entry 0, one sample in `stride` is kept, count stops at
// the depth (full), nothing is written outside a pulse, a new pulse rewinds,
// and the one-clock read latency.
module tb_capture_buffer;
  localparam int IQ_W = 16, DEPTH = 64, STRIDE_W = 16, AW = 6;
  logic clk = 0, rst_n = 0, start = 0, active = 0;
  logic [STRIDE_W-1:0] stride = 16'd1;
  logic signed [IQ_W-1:0] in_i = '0, in_q = '0;
  logic [AW-1:0] raddr = '0;
  logic [2*IQ_W-1:0] rdata;
  logic [AW:0] count;
  logic full;
  int checks = 0, failures = 0;

  capture_buffer #(.IQ_W(IQ_W), .DEPTH(DEPTH), .STRIDE_W(STRIDE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  logic [2*IQ_W-1:0] expv [$];
  int full_seen = 0;

  task automatic run_pulse(int len, int str);
    int eff = (str <= 1) ? 1 : str;
    expv.delete();
    stride = 16'(str);
    for (int t = 0; t < len; t++) begin
      start  = (t == 0);
      active = 1;
      in_i = 16'($urandom); in_q = 16'($urandom);
      if (t % eff == 0 && expv.size() < DEPTH) expv.push_back({in_i, in_q});
      @(posedge clk); #1;
    end
    start = 0; active = 0;
    // samples outside the pulse must not be stored
    repeat (5) begin in_i = 16'($urandom); @(posedge clk); #1; end
    check("count", longint'(count), longint'(expv.size()));
    check("full", longint'(full), longint'(expv.size() == DEPTH));
    if (full) full_seen++;
    for (int a = 0; a < expv.size(); a++) begin
      raddr = AW'(a);
      @(posedge clk); #1;
      check("entry", longint'(rdata), longint'(expv[a]));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_pulse(10, 1);
    run_pulse(200, 1);     // overflows the 64 entries
    run_pulse(50, 3);
    run_pulse(300, 4);     // 75 kept -> full
    run_pulse(7, 0);       // stride 0 acts as 1
    run_pulse(1, 5);
    for (int k = 0; k < 10; k++) run_pulse($urandom_range(1, 150), $urandom_range(1, 5));
    check("full occurred", longint'(full_seen > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
