// tb_pi_controller: checks one PI channel against a cycle model written here
// with 64-bit integers. Directed parts: pure P (Kp = 3.0, output = 3*error
// three clocks after the input changes), pure I (integrator ramps by Ki*error
// per clock), output and integrator clipping with the sat flag, and clearing
// when enable drops. A random part changes set value, measurement and gains
// every few clocks and compares every output.
module tb_pi_controller;
  localparam int IQ_W = 16, GAIN_W = 18, KP_FRAC = 8, KI_FRAC = 16, OUT_W = 14, ACC_W = 40;
  logic clk = 0, rst_n = 0, enable = 0;
  logic signed [IQ_W-1:0] setpoint = '0, meas = '0;
  logic [GAIN_W-1:0] kp = '0, ki = '0;
  logic signed [OUT_W-1:0] ctrl_out;
  logic sat;
  int checks = 0, failures = 0;

  pi_controller #(.IQ_W(IQ_W), .GAIN_W(GAIN_W), .KP_FRAC(KP_FRAC), .KI_FRAC(KI_FRAC),
                  .OUT_W(OUT_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  longint r_err, r_pp, r_pi, r_acc, r_out;
  bit r_sat;
  localparam longint OMAX = (1 << (OUT_W - 1)) - 1, OMIN = -(1 << (OUT_W - 1));
  localparam longint AMAX = OMAX * (1 << KI_FRAC), AMIN = OMIN * (1 << KI_FRAC);

  function automatic longint asr(longint v, int s);  // floor division by 2**s
    return (v >= 0) ? v / (longint'(1) << s) : -((-v + (longint'(1) << s) - 1) / (longint'(1) << s));
  endfunction

  task automatic model_step();
    longint s, nx, u;
    if (!enable) begin
      r_err = 0; r_pp = 0; r_pi = 0; r_acc = 0; r_out = 0; r_sat = 0;
      return;
    end
    s = r_acc + r_pi;
    nx = (s > AMAX) ? AMAX : (s < AMIN) ? AMIN : s;
    u = asr(r_pp, KP_FRAC) + asr(nx, KI_FRAC);
    r_acc = nx;
    if (u > OMAX) begin r_out = OMAX; r_sat = 1; end
    else if (u < OMIN) begin r_out = OMIN; r_sat = 1; end
    else begin r_out = u; r_sat = (s != nx); end
    r_pp = r_err * longint'(kp);
    r_pi = r_err * longint'(ki);
    r_err = longint'(setpoint) - longint'(meas);
  endtask

  task automatic tick_and_check(string what);
    model_step();
    @(posedge clk); #1;
    checks++;
    if (longint'(ctrl_out) != r_out || sat != r_sat) begin
      failures++;
      $display("FAIL %s: out %0d sat %0d, expected %0d %0d", what, ctrl_out, sat, r_out, r_sat);
    end
  endtask

  task automatic expect_out(string what, int exp);
    checks++;
    if (int'(ctrl_out) != exp) begin
      failures++;
      $display("FAIL %s: out %0d expected %0d", what, ctrl_out, exp);
    end
  endtask

  int sat_seen = 0;
  initial begin
    r_err = 0; r_pp = 0; r_pi = 0; r_acc = 0; r_out = 0; r_sat = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // pure proportional, Kp = 3.0, error = 100
    kp = 18'(3 << KP_FRAC); ki = '0; setpoint = 16'sd1100; meas = 16'sd1000; enable = 1;
    tick_and_check("P1"); tick_and_check("P2");
    expect_out("P latency: not yet at 2 clocks", 0);
    tick_and_check("P3");
    expect_out("P output 3*100 after 3 clocks", 300);
    repeat (3) tick_and_check("P hold");
    // negative error, fractional gain 1.5: -7*1.5 = -10.5 -> floor -11
    kp = 18'(384); meas = 16'sd1107;
    repeat (3) tick_and_check("P neg");
    expect_out("P -7*1.5", -11);
    // pure integral: Ki = 0.5, error 10 -> +5 per clock
    enable = 0; tick_and_check("clear"); expect_out("cleared", 0);
    kp = '0; ki = 18'(1 << (KI_FRAC - 1)); setpoint = 16'sd10; meas = 16'sd0; enable = 1;
    repeat (2) tick_and_check("I fill");
    for (int k = 1; k <= 20; k++) begin
      tick_and_check("I ramp");
      expect_out("I ramp value", 5 * k);
    end
    // clip: big error with a large Kp
    kp = 18'(100 << KP_FRAC); setpoint = 16'sd20000; meas = -16'sd20000;
    repeat (4) tick_and_check("clip +");
    checks++; if (!sat || ctrl_out != 14'sd8191) begin failures++; $display("FAIL clip high"); end
    setpoint = -16'sd20000; meas = 16'sd20000;
    repeat (4) tick_and_check("clip -");
    checks++; if (!sat || ctrl_out != -14'sd8192) begin failures++; $display("FAIL clip low"); end
    // integrator wind-up is bounded: after a long negative error it recovers quickly
    kp = '0; ki = 18'(1 << KI_FRAC);
    repeat (5000) tick_and_check("windup");
    checks++; if (ctrl_out != -14'sd8192) begin failures++; $display("FAIL windup floor"); end
    setpoint = 16'sd100; meas = 16'sd0;
    repeat (100) tick_and_check("unwind");
    // random
    for (int k = 0; k < 20000; k++) begin
      if ($urandom_range(0, 3) == 0) setpoint = 16'($signed($urandom_range(0, 65535)) >>> $urandom_range(0, 6));
      meas = 16'(int'(setpoint) + $signed($urandom_range(0, 4000)) - 2000);
      if ($urandom_range(0, 200) == 0) kp = 18'($urandom_range(0, 262143) >> $urandom_range(0, 10));
      if ($urandom_range(0, 200) == 0) ki = 18'($urandom_range(0, 262143) >> $urandom_range(4, 16));
      if ($urandom_range(0, 500) == 0) enable = ~enable;
      tick_and_check("random");
      if (sat) sat_seen++;
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL random never clipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
