// tb_llrf_top: end-to-end test of the controller, at its default parameters,
// closing the loop through a behavioural cavity (cavity_model) with a total
// loop delay of 64 clocks (1.6 us at 40 MHz).
//
// Sequence, all through the host bus and the external trigger:
//  1. reset values of the gain registers, set values and pulse length set up
//  2. proportional-only closed loop: every DAC code is compared with
//     Kp*(set value - measured I/Q), the measurement being rebuilt here from
//     the ADC samples, which also fixes the ADC-to-DAC latency at 5 clocks
//  3. detuning test, open loop: a 10 % gain and 12 degree phase step of the
//     plant in mid-pulse shows up in the measured field
//  4. the same pulse in closed loop with the reset gains (P 3, I 0.005 per
//     sample): before and after the step the field is within 1 % in
//     amplitude and 1 degree in phase of the set value
//     and the amplitude/phase register agrees with the set value
//  5. capture buffer: count saturates at the depth, entries equal the
//     measured I/Q rebuilt here, stride 4 keeps every fourth sample
//  6. a set value beyond the DAC range clips the controller (status bit)
//  7. retrigger during a pulse is ignored; shot counter; software trigger
//  8. set value (written as amplitude and phase, converted to I/Q) and gains
//     rewritten during a pulse; the loop settles again
// Each mechanism is counted and a mechanism that never occurred is a failure.
module tb_llrf_top;
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

  llrf_top dut (.*);
  cavity_model #(.DELAY(59)) plant (.clk, .rst_n, .dac_i, .dac_q, .gain_milli, .phase_mdeg,
                                      .beam_i(0), .beam_q(0), .adc_data);

  always #12.5 clk = ~clk;   // 40 MHz

  initial begin
    #(25.0 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- independent rebuild of the measured I/Q from the ADC samples ----
  int hist[4];          // latest sample per phase slot
  int nsamp = 0;
  int ref_i, ref_q;     // measured I/Q as the detector output shows it now
  int ref_i_d[8], ref_q_d[8];  // ref_i delayed by k clocks
  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 7; k > 0; k--) begin ref_i_d[k] = ref_i_d[k-1]; ref_q_d[k] = ref_q_d[k-1]; end
      hist[nsamp % 4] = int'(adc_data);
      ref_i = hist[0] - hist[2];
      ref_q = hist[3] - hist[1];
      ref_i_d[0] = ref_i; ref_q_d[0] = ref_q;
      nsamp++;
    end
  end

  // ---- mechanism counters ----
  int m_ext_pulse = 0, m_soft_pulse = 0, m_open = 0, m_closed = 0, m_mode_switch = 0;
  int m_clip = 0, m_cap_full = 0, m_stride = 0, m_retrig_ignored = 0, m_gain_change = 0, m_polar = 0;

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
    check("read valid", bus_rvalid);
  endtask

  task automatic fire();
    @(posedge clk); #3 ext_trig = 1;
    repeat (4) @(posedge clk);
    #3 ext_trig = 0;
    m_ext_pulse++;
  endtask

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real amp(int i, int q);
    return $sqrt(real'(i) * real'(i) + real'(q) * real'(q));
  endfunction
  function automatic real ph_deg(int i, int q);
    return $atan2(real'(q), real'(i)) * 180.0 / 3.14159265358979;
  endfunction

  localparam int SP_I = 6000, SP_Q = 3000;   // |sp| = 6708, 26.57 deg
  real sp_amp, sp_ph;
  logic [31:0] d;
  int cap_ref_i[$], cap_ref_q[$];
  bit recording = 0;

  // record the measured I/Q of each pulse clock as the capture buffer sees it
  always @(posedge clk) begin
    #2;
    if (recording && rf_gate) begin cap_ref_i.push_back(ref_i); cap_ref_q.push_back(ref_q); end
  end

  initial begin
    int t;
    real a, p;
    sp_amp = amp(SP_I, SP_Q); sp_ph = ph_deg(SP_I, SP_Q);
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    // 1. reset values and setup
    rd(REG_KP_I, d); check("Kp reset 3.0", d == 32'd768);
    rd(REG_KI_Q, d); check("Ki reset 0.005", d == 32'd328);
    rd(REG_PULSE_LEN, d); check("pulse length reset", d == 32'd4000);
    wr(REG_SP_I, 32'(SP_I));
    wr(REG_SP_Q, 32'(SP_Q));
    wr(REG_PULSE_LEN, 32'd12000);

    // 2. proportional-only closed loop, exact comparison of the DAC codes
    wr(REG_KI_I, 0); wr(REG_KI_Q, 0);
    wr(REG_CTRL, 32'h1); m_closed++;
    fire();
    wait (rf_gate);
    repeat (20) @(posedge clk);
    for (int k = 0; k < 3000; k++) begin
      int ei, eq;
      @(posedge clk); #1;
      // DAC now shows Kp*(sp - meas) of the measurement 5 clocks after the
      // ADC sample, i.e. the detector output 4 clocks ago
      ei = ((SP_I - ref_i_d[4]) * 768) >>> 8;
      eq = ((SP_Q - ref_q_d[4]) * 768) >>> 8;
      ei = (ei > 8191) ? 8191 : (ei < -8192) ? -8192 : ei;
      eq = (eq > 8191) ? 8191 : (eq < -8192) ? -8192 : eq;
      checks++;
      if (int'(dac_i) != ei || int'(dac_q) != eq) begin
        failures++;
        if (failures < 10) $display("FAIL P-only DAC at %0d: %0d %0d expected %0d %0d", k, dac_i, dac_q, ei, eq);
      end
    end
    // P-only leaves a steady error of 1/(1+Kp*g*2) = 25 %
    a = amp(ref_i, ref_q);
    check("P-only steady error near 25 %", a > 0.70 * sp_amp && a < 0.80 * sp_amp);
    wait (!rf_gate);
    repeat (100) @(posedge clk);

    // 3. open loop detuning test
    wr(REG_KI_I, 32'd328); wr(REG_KI_Q, 32'd328); m_gain_change++;
    wr(REG_CTRL, 32'h0); m_open++; m_mode_switch++;
    fire();
    wait (rf_gate);
    repeat (5000) @(posedge clk);
    #1;
    check("open loop drive equals set value", dac_i == 14'(SP_I) && dac_q == 14'(SP_Q));
    a = amp(ref_i, ref_q); p = ph_deg(ref_i, ref_q);
    check("open loop settles to the set value (2 %)", fabs(a - sp_amp) < 0.02 * sp_amp && fabs(p - sp_ph) < 2.0);
    gain_milli = 450; phase_mdeg = 12000;
    repeat (5000) @(posedge clk);
    #1;
    a = amp(ref_i, ref_q); p = ph_deg(ref_i, ref_q);
    $display("open loop after step: amplitude %0.2f %%, phase %0.2f deg", 100.0 * (a / sp_amp - 1.0), p - sp_ph);
    check("open loop: amplitude drops ~10 %", a < 0.92 * sp_amp && a > 0.88 * sp_amp);
    check("open loop: phase moves ~12 deg", (p - sp_ph) > 11.0 && (p - sp_ph) < 13.0);
    wait (!rf_gate);
    gain_milli = 500; phase_mdeg = 0;
    repeat (3000) @(posedge clk);   // let the cavity decay

    // 4. closed loop detuning test with capture recording
    wr(REG_CTRL, 32'h1); m_closed++; m_mode_switch++;
    cap_ref_i.delete(); cap_ref_q.delete(); recording = 1;
    fire();
    wait (rf_gate);
    repeat (5000) @(posedge clk);
    #1;
    a = amp(ref_i, ref_q); p = ph_deg(ref_i, ref_q);
    $display("closed loop before step: amplitude %0.3f %%, phase %0.3f deg", 100.0 * (a / sp_amp - 1.0), p - sp_ph);
    check("closed loop before step: 1 % / 1 deg", fabs(a - sp_amp) < 0.01 * sp_amp && fabs(p - sp_ph) < 1.0);
    gain_milli = 450; phase_mdeg = 12000;
    repeat (6500) @(posedge clk);
    #1;
    a = amp(ref_i, ref_q); p = ph_deg(ref_i, ref_q);
    $display("closed loop after step: amplitude %0.3f %%, phase %0.3f deg", 100.0 * (a / sp_amp - 1.0), p - sp_ph);
    check("closed loop after step: 1 % / 1 deg", fabs(a - sp_amp) < 0.01 * sp_amp && fabs(p - sp_ph) < 1.0);
    // digital amplitude and phase read by the host
    rd(REG_AMP_PH, d);
    $display("amplitude/phase register: %0d, %0.3f deg", d[31:16], real'($signed(d[15:0])) * 360.0 / 65536.0);
    check("amplitude register within 1 %", fabs(real'(d[31:16]) - sp_amp) < 0.01 * sp_amp);
    check("phase register within 1 deg", fabs(real'($signed(d[15:0])) * 360.0 / 65536.0 - sp_ph) < 1.0);
    wait (!rf_gate);
    recording = 0;
    gain_milli = 500; phase_mdeg = 0;

    // 5. capture buffer
    rd(REG_CAP_COUNT, d);
    check("capture count saturates at depth 1024", d == 32'd1024);
    if (d == 32'd1024) m_cap_full++;
    for (int e = 0; e < 1024; e += 37) begin
      rd(CAP_BASE + 12'(e), d);
      check("capture entry", $signed(d[31:16]) == cap_ref_i[e] && $signed(d[15:0]) == cap_ref_q[e]);
    end
    rd(REG_SHOTS, d); check("three pulses so far", d == 32'd3);
    wr(REG_STRIDE, 32'd4); m_stride++;
    wr(REG_PULSE_LEN, 32'd400);
    cap_ref_i.delete(); cap_ref_q.delete(); recording = 1;
    wr(REG_CTRL, 32'h3); m_soft_pulse++;   // software trigger
    wait (rf_gate);
    wait (!rf_gate);
    recording = 0;
    rd(REG_CAP_COUNT, d); check("stride 4: 100 entries", d == 32'd100);
    for (int e = 0; e < 100; e += 9) begin
      rd(CAP_BASE + 12'(e), d);
      check("strided entry", $signed(d[31:16]) == cap_ref_i[4*e] && $signed(d[15:0]) == cap_ref_q[4*e]);
    end
    repeat (3000) @(posedge clk);

    // 6. clipping: set value far beyond what the DAC can reach
    wr(REG_SP_I, 32'd30000);
    wr(REG_PULSE_LEN, 32'd12000);
    fire();
    wait (rf_gate);
    repeat (2000) @(posedge clk);
    rd(REG_STATUS, d);
    check("status: rf on, feedback, I clipped", d[2:0] == 3'b111);
    if (d[2]) m_clip++;
    #1 check("DAC at full scale", dac_i == 14'sd8191);
    // 7. retrigger during the pulse is ignored
    fire();
    m_ext_pulse--;
    rd(REG_SHOTS, d);
    check("retrigger ignored", d == 32'd5);
    if (d == 32'd5) m_retrig_ignored++;
    // set value, given as amplitude and phase, and gains changed while the
    // pulse runs
    wr(REG_SP_AMP, 32'd6708);                        // |(6000, 3000)|
    wr(REG_SP_PH, 32'd4836);                         // 26.565 deg * 65536 / 360
    repeat (20) @(posedge clk);
    rd(REG_SP_I, d); check("polar set value: I", $signed(d[15:0]) >= SP_I - 3 && $signed(d[15:0]) <= SP_I + 3);
    rd(REG_SP_Q, d); check("polar set value: Q", $signed(d[15:0]) >= SP_Q - 3 && $signed(d[15:0]) <= SP_Q + 3);
    m_polar++;
    wr(REG_KP_I, 32'd1024); wr(REG_KP_Q, 32'd1024); m_gain_change++;
    repeat (6000) @(posedge clk);
    #1;
    a = amp(ref_i, ref_q); p = ph_deg(ref_i, ref_q);
    check("recovers after set value/gain change in the pulse", fabs(a - sp_amp) < 0.01 * sp_amp && fabs(p - sp_ph) < 1.0);
    rd(REG_STATUS, d);
    check("clip cleared", d[3:2] == 2'b00);
    wait (!rf_gate);
    @(posedge clk); #1;
    check("DAC zero after the pulse", dac_i == 0 && dac_q == 0);

    $display("mechanisms: ext pulses %0d, soft pulses %0d, open loop %0d, closed loop %0d, mode switches %0d, clips %0d, buffer full %0d, stride %0d, retrigger ignored %0d, gain changes %0d, polar set values %0d",
             m_ext_pulse, m_soft_pulse, m_open, m_closed, m_mode_switch, m_clip, m_cap_full, m_stride, m_retrig_ignored, m_gain_change, m_polar);
    check("every mechanism occurred", m_ext_pulse > 0 && m_soft_pulse > 0 && m_open > 0 && m_closed > 0 &&
          m_mode_switch > 0 && m_clip > 0 && m_cap_full > 0 && m_stride > 0 && m_retrig_ignored > 0 && m_gain_change > 0 && m_polar > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
