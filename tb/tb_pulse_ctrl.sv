// tb_pulse_ctrl: triggers pulses from the asynchronous external input (at
// off-grid times) and from the software trigger, and checks the pulse length
// to the clock, the three-clock synchroniser latency, the start/end strobes,
// that a trigger during a pulse is ignored, that length 0 disables pulsing,
// and the shot counter.
module tb_pulse_ctrl;
  localparam int LEN_W = 24;
  logic clk = 0, rst_n = 0, ext_trig = 0, soft_trig = 0;
  logic [LEN_W-1:0] pulse_len = '0;
  logic rf_on, pulse_start, pulse_end;
  logic [31:0] shot_count;
  int checks = 0, failures = 0;

  pulse_ctrl #(.LEN_W(LEN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // measure one pulse: clocks from the trigger-sampling edge to the first
  // rf_on clock, and the number of rf_on clocks
  task automatic measure(output int lat, output int width, output int starts, output int ends);
    lat = 0; width = 0; starts = 0; ends = 0;
    while (!rf_on) begin @(posedge clk); #1; lat++; if (lat > 100) return; end
    while (rf_on) begin
      width++; starts += int'(pulse_start);
      @(posedge clk); #1;
    end
    ends += int'(pulse_end);
  endtask

  int lat, width, st, en;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // external trigger, length 37, edge arrives mid-cycle
    pulse_len = 24'd37;
    @(posedge clk); #3 ext_trig = 1;
    @(posedge clk); #1;   // first sampling edge has passed
    measure(lat, width, st, en);
    check("ext latency (clocks after sampling edge)", lat, 2);
    check("width", width, 37);
    check("one start strobe", st, 1);
    check("end strobe", en, 1);
    check("shots", int'(shot_count), 1);
    // trigger held high: no new pulse without a new edge
    repeat (50) @(posedge clk); #1;
    check("held trigger makes no pulse", int'(rf_on), 0);
    ext_trig = 0;
    // software trigger, length 1
    pulse_len = 24'd1;
    @(posedge clk); #1 soft_trig = 1; @(posedge clk); #1 soft_trig = 0;
    check("soft pulse open", int'(rf_on), 1);
    check("soft start", int'(pulse_start), 1);
    @(posedge clk); #1;
    check("length-1 pulse closed", int'(rf_on), 0);
    check("shots 2", int'(shot_count), 2);
    // retrigger during a pulse is ignored
    pulse_len = 24'd100;
    soft_trig = 1; @(posedge clk); #1 soft_trig = 0;
    repeat (20) @(posedge clk);
    #1 ext_trig = 1; soft_trig = 1; @(posedge clk); #1 soft_trig = 0;
    repeat (5) @(posedge clk); #1 ext_trig = 0;
    width = 0;
    while (rf_on) begin width++; @(posedge clk); #1; end
    check("retriggered pulse still 100 long", width + 26, 100);
    check("shots 3", int'(shot_count), 3);
    // length 0 disables
    pulse_len = '0;
    @(posedge clk); #1 soft_trig = 1; @(posedge clk); #1 soft_trig = 0;
    repeat (3) @(posedge clk); #1;
    check("length 0: no pulse", int'(rf_on), 0);
    check("shots unchanged", int'(shot_count), 3);
    // many random-length pulses
    for (int k = 0; k < 30; k++) begin
      int len = $urandom_range(1, 300);
      pulse_len = 24'(len);
      repeat ($urandom_range(1, 7)) @(posedge clk);
      #($urandom_range(1, 9)) ext_trig = 1;
      @(posedge clk); #1;
      measure(lat, width, st, en);
      check("rand latency", lat, 2);
      check("rand width", width, len);
      ext_trig = 0;
      @(posedge clk);
    end
    check("shots total", int'(shot_count), 33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
