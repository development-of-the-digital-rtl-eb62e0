// tb_llrf_shot_to_shot: shot-to-shot stability over 60 shots, open loop
// against closed loop, on the controller at its default parameters.
//
// Before each shot the plant (cavity_model) gets a new gain, uniformly
// within +-1.5 %, and a new phase: a drift of +1.3 to -1.3 degrees across the
// 60 shots plus +-0.2 degrees of jitter. These sizes are this test's own
// choice. Each shot is fired twice with the same plant, once in open loop and
// once in closed loop with the reset gains. 5000 clocks into the 6000-clock
// pulse the host reads the amplitude/phase register, as a monitoring program
// would. The test checks that feedback shrinks the peak-to-peak spread of
// both amplitude and phase at least tenfold, that the closed-loop amplitude
// stays within 1 % and the phase within 1 degree of the set value in every
// shot, and that 120 pulses were counted.
module tb_llrf_shot_to_shot;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0, ext_trig = 0;
  logic signed [ADC_W-1:0] adc_data;
  logic [BUS_AW-1:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [BUS_DW-1:0] bus_wdata = '0, bus_rdata;
  logic bus_rvalid;
  logic signed [DAC_W-1:0] dac_i, dac_q;
  logic rf_gate;
  int gain_milli = 500, phase_mdeg = 0;
  int checks = 0, failures = 0;

  localparam int SHOTS = 60;
  localparam int SP_I = 6000, SP_Q = 3000;

  llrf_top dut (.*);
  cavity_model #(.DELAY(59)) plant (.clk, .rst_n, .dac_i, .dac_q, .gain_milli, .phase_mdeg,
                                    .beam_i(0), .beam_q(0), .adc_data);

  always #12.5 clk = ~clk;

  initial begin
    #(25.0 * 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [BUS_AW-1:0] a, logic [31:0] d);
    @(posedge clk); #1 bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(posedge clk); #1 bus_wr = 0;
  endtask

  task automatic rd(logic [BUS_AW-1:0] a, output logic [31:0] d);
    @(posedge clk); #1 bus_addr = a; bus_rd = 1;
    @(posedge clk); #1 bus_rd = 0;
    d = bus_rdata;
  endtask

  // one shot: returns amplitude (measured units) and phase (degrees)
  task automatic shot(bit closed, output real amp, output real ph);
    logic [31:0] d;
    wr(REG_CTRL, {31'b0, closed});
    @(posedge clk); #3 ext_trig = 1;
    repeat (4) @(posedge clk);
    #3 ext_trig = 0;
    wait (rf_gate);
    repeat (5000) @(posedge clk);
    rd(REG_AMP_PH, d);
    amp = real'(d[31:16]);
    ph  = real'($signed(d[15:0])) * 360.0 / 65536.0;
    wait (!rf_gate);
    repeat (5000) @(posedge clk);   // cavity decays between shots
  endtask

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  real oa_min = 1e9, oa_max = -1e9, op_min = 1e9, op_max = -1e9;
  real ca_min = 1e9, ca_max = -1e9, cp_min = 1e9, cp_max = -1e9;
  real sp_amp, sp_ph;
  int  bad = 0;
  logic [31:0] d;

  initial begin
    real a, p;
    sp_amp = $sqrt(real'(SP_I) ** 2 + real'(SP_Q) ** 2);
    sp_ph = $atan2(real'(SP_Q), real'(SP_I)) * 180.0 / 3.14159265358979;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    wr(REG_SP_I, 32'(SP_I));
    wr(REG_SP_Q, 32'(SP_Q));
    wr(REG_PULSE_LEN, 32'd6000);
    for (int s = 0; s < SHOTS; s++) begin
      gain_milli = 500 + $signed($urandom_range(0, 15)) - 7;             // +-1.5 %
      phase_mdeg = 1300 - (2600 * s) / (SHOTS - 1) + $signed($urandom_range(0, 400)) - 200;
      shot(1'b0, a, p);
      if (a < oa_min) oa_min = a;
      if (a > oa_max) oa_max = a;
      if (p < op_min) op_min = p;
      if (p > op_max) op_max = p;
      shot(1'b1, a, p);
      if (a < ca_min) ca_min = a;
      if (a > ca_max) ca_max = a;
      if (p < cp_min) cp_min = p;
      if (p > cp_max) cp_max = p;
      if (fabs(a - sp_amp) > 0.01 * sp_amp || fabs(p - sp_ph) > 1.0) bad++;
    end
    $display("open loop:   amplitude spread %0.3f %% p-p, phase spread %0.3f deg p-p",
             100.0 * (oa_max - oa_min) / sp_amp, op_max - op_min);
    $display("closed loop: amplitude spread %0.3f %% p-p, phase spread %0.3f deg p-p",
             100.0 * (ca_max - ca_min) / sp_amp, cp_max - cp_min);
    check("amplitude spread reduced tenfold", (ca_max - ca_min) * 10.0 <= (oa_max - oa_min));
    check("phase spread reduced tenfold", (cp_max - cp_min) * 10.0 <= (op_max - op_min));
    check("every closed-loop shot within 1 % / 1 deg", bad == 0);
    rd(REG_SHOTS, d);
    check("120 pulses counted", d == 32'(2 * SHOTS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
