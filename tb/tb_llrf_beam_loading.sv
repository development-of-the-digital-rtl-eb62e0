// tb_llrf_beam_loading: the beam-loading case of the loop study, run on the
// controller at its default parameters and reset gains (P 3, I 0.005 per
// sample, i.e. 200000 1/s). The plant is cavity_model with 60 clocks of
// analogue delay, so the whole loop delay is 65 clocks = 1.625 us, next to
// the 1.614 us of the study. The beam is modelled as a field of 5 % of the
// set value in antiphase, switched on in the middle of a 12000-clock pulse
// for 4000 clocks (the beam size in field units is this test's own choice;
// the study gives the current, 20 mA, but not the cavity data to convert it).
// One pulse runs in open loop and one in closed loop. Checks: the beam pulls
// the open-loop field down by about 5 %; in closed loop the field is back
// within 1 % in amplitude and 1 degree in phase before the beam ends, its
// worst dip is less than half the open-loop one, and after the beam leaves
// it returns within 1 %.
module tb_llrf_beam_loading;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0, ext_trig = 0;
  logic signed [ADC_W-1:0] adc_data;
  logic [BUS_AW-1:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [BUS_DW-1:0] bus_wdata = '0, bus_rdata;
  logic bus_rvalid;
  logic signed [DAC_W-1:0] dac_i, dac_q;
  logic rf_gate;
  int beam_i = 0, beam_q = 0;
  int checks = 0, failures = 0;

  localparam int SP_I = 6000, SP_Q = 3000;

  llrf_top dut (.*);
  cavity_model #(.DELAY(60)) plant (.clk, .rst_n, .dac_i, .dac_q, .gain_milli(500), .phase_mdeg(0),
                                    .beam_i, .beam_q, .adc_data);

  always #12.5 clk = ~clk;

  initial begin
    #(25.0 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measured I/Q rebuilt from the ADC samples
  int hist[4];
  int nsamp = 0, ref_i = 0, ref_q = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      hist[nsamp % 4] = int'(adc_data);
      ref_i = hist[0] - hist[2];
      ref_q = hist[3] - hist[1];
      nsamp++;
    end
  end

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [BUS_AW-1:0] a, logic [31:0] d);
    @(posedge clk); #1 bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(posedge clk); #1 bus_wr = 0;
  endtask

  real sp_amp, sp_ph;
  int  beam_events = 0;

  // one pulse: returns worst amplitude dip during the beam (fraction), and
  // amplitude/phase errors at the end of the beam and at the end of the pulse
  task automatic run_pulse(output real worst, output real a_beam, output real p_beam,
                           output real a_after);
    real a, p;
    worst = 0.0;
    @(posedge clk); #3 ext_trig = 1;
    repeat (4) @(posedge clk);
    #3 ext_trig = 0;
    wait (rf_gate);
    repeat (5000) @(posedge clk);
    beam_i = -SP_I / 2 / 20; beam_q = -SP_Q / 2 / 20;   // 5 % of the field, antiphase
    beam_events++;
    for (int k = 0; k < 4000; k++) begin
      @(posedge clk); #1;
      a = $sqrt(real'(ref_i) * real'(ref_i) + real'(ref_q) * real'(ref_q));
      if ((sp_amp - a) / sp_amp > worst) worst = (sp_amp - a) / sp_amp;
    end
    a_beam = a / sp_amp - 1.0;
    p_beam = $atan2(real'(ref_q), real'(ref_i)) * 180.0 / 3.14159265358979 - sp_ph;
    beam_i = 0; beam_q = 0;
    repeat (2900) @(posedge clk);
    #1;
    a = $sqrt(real'(ref_i) * real'(ref_i) + real'(ref_q) * real'(ref_q));
    a_after = a / sp_amp - 1.0;
    wait (!rf_gate);
    repeat (4000) @(posedge clk);
  endtask

  real ow, oa, op, oaf, cw, ca, cp, caf;
  initial begin
    sp_amp = $sqrt(real'(SP_I) ** 2 + real'(SP_Q) ** 2);
    sp_ph = $atan2(real'(SP_Q), real'(SP_I)) * 180.0 / 3.14159265358979;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    wr(REG_SP_I, 32'(SP_I));
    wr(REG_SP_Q, 32'(SP_Q));
    wr(REG_PULSE_LEN, 32'd12000);
    wr(REG_CTRL, 32'h0);
    run_pulse(ow, oa, op, oaf);
    $display("open loop:   worst dip %0.2f %%, end of beam %0.2f %% / %0.2f deg, after beam %0.2f %%",
             100.0 * ow, 100.0 * oa, op, 100.0 * oaf);
    wr(REG_CTRL, 32'h1);
    run_pulse(cw, ca, cp, caf);
    $display("closed loop: worst dip %0.2f %%, end of beam %0.3f %% / %0.3f deg, after beam %0.3f %%",
             100.0 * cw, 100.0 * ca, cp, 100.0 * caf);
    check("open loop: beam pulls the field down ~5 %", oa < -0.04 && oa > -0.06);
    check("closed loop: within 1 % / 1 deg at the end of the beam", fabs(ca) < 0.01 && fabs(cp) < 1.0);
    check("closed loop: dip less than half of open loop", cw < ow / 2.0);
    check("closed loop: within 1 % after the beam", fabs(caf) < 0.01);
    check("beam occurred in both loop modes", beam_events == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
