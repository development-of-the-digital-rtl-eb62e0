// llrf_top: FPGA logic of a pulsed digital low-level RF controller.
//
// A 350 MHz cavity pick-up is mixed down to a 10 MHz IF outside the FPGA and
// sampled at 40 MHz, four samples per IF period. This top detects I and Q
// from those samples, compares them with the host's set values and runs one
// PI controller per channel; the two 14-bit results go to the two DAC
// channels, which drive an analogue IQ modulator in front of the RF
// amplifier. RF is produced in pulses opened by an external trigger. The host
// reaches set values (as I/Q, or as amplitude and phase that a CORDIC turns
// into I/Q), gains, pulse length and status through a register bus
// and reads back the measured I/Q of each pulse from a capture buffer, and
// the live amplitude and phase of the field from a CORDIC.
//
// The signal chain (ADC, I/Q detection, set-value comparison, PI per channel,
// DAC to IQ modulator, host-written set values and gains, upload of measured
// I/Q, external-trigger pulsing, digital amplitude and phase, amplitude and
// phase set values turned into I/Q) follows the PEFP prototype. Register map, number
// formats, pipelining, the open-loop drive and the capture buffer layout are
// this design's choices.
//
// Timing (one clock = 25 ns at 40 MHz): an ADC sample reaches the DAC
// outputs five clocks later in closed loop (detector 1, PI 3, drive 1).
// The controller runs while rf_on is high, feedback is enabled and the
// detector has a full window; otherwise its integrators are cleared.
module llrf_top
  import llrf_pkg::*;
#(
  parameter int CAP_DEPTH = 1024,
  localparam int CAP_AW   = $clog2(CAP_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_data,
  input  logic                    ext_trig,
  input  logic [BUS_AW-1:0]       bus_addr,
  input  logic                    bus_wr,
  input  logic [BUS_DW-1:0]       bus_wdata,
  input  logic                    bus_rd,
  output logic [BUS_DW-1:0]       bus_rdata,
  output logic                    bus_rvalid,
  output logic signed [DAC_W-1:0] dac_i,
  output logic signed [DAC_W-1:0] dac_q,
  output logic                    rf_gate
);

  llrf_cfg_t               cfg;
  logic signed [IQ_W-1:0]  meas_i, meas_q;
  logic                    meas_valid;
  logic                    rf_on, pulse_start;
  logic [31:0]             shot_count;
  logic                    pi_en;
  logic signed [DAC_W-1:0] pi_i, pi_q;
  logic [1:0]              pi_sat;
  logic [CAP_AW-1:0]       cap_raddr;
  logic [2*IQ_W-1:0]       cap_rdata;
  logic [CAP_AW:0]         cap_count;
  logic                    cap_full;
  logic [IQ_W-1:0]         amplitude;
  logic signed [IQ_W-1:0]  phase;
  logic                    sp_conv_valid;
  logic signed [IQ_W-1:0]  sp_conv_i, sp_conv_q;

  iq_detector #(.ADC_W(ADC_W), .IQ_W(IQ_W)) u_det (
    .clk, .rst_n, .adc_data,
    .meas_i, .meas_q, .phase(), .meas_valid
  );

  pulse_ctrl #(.LEN_W(LEN_W)) u_pulse (
    .clk, .rst_n, .ext_trig,
    .soft_trig(cfg.soft_trig), .pulse_len(cfg.pulse_len),
    .rf_on, .pulse_start, .pulse_end(), .shot_count
  );

  assign pi_en = rf_on && cfg.fb_en && meas_valid;

  pi_controller #(
    .IQ_W(IQ_W), .GAIN_W(GAIN_W), .KP_FRAC(KP_FRAC), .KI_FRAC(KI_FRAC), .OUT_W(DAC_W)
  ) u_pi_i (
    .clk, .rst_n, .enable(pi_en), .setpoint(cfg.sp_i), .meas(meas_i),
    .kp(cfg.kp_i), .ki(cfg.ki_i), .ctrl_out(pi_i), .sat(pi_sat[0])
  );

  pi_controller #(
    .IQ_W(IQ_W), .GAIN_W(GAIN_W), .KP_FRAC(KP_FRAC), .KI_FRAC(KI_FRAC), .OUT_W(DAC_W)
  ) u_pi_q (
    .clk, .rst_n, .enable(pi_en), .setpoint(cfg.sp_q), .meas(meas_q),
    .kp(cfg.kp_q), .ki(cfg.ki_q), .ctrl_out(pi_q), .sat(pi_sat[1])
  );

  drive_select #(.IQ_W(IQ_W), .DAC_W(DAC_W)) u_drive (
    .clk, .rst_n, .rf_on, .fb_en(cfg.fb_en),
    .sp_i(cfg.sp_i), .sp_q(cfg.sp_q), .pi_i, .pi_q, .dac_i, .dac_q
  );

  capture_buffer #(.IQ_W(IQ_W), .DEPTH(CAP_DEPTH), .STRIDE_W(STRIDE_W)) u_cap (
    .clk, .rst_n, .start(pulse_start), .active(rf_on), .stride(cfg.stride),
    .in_i(meas_i), .in_q(meas_q), .raddr(cap_raddr), .rdata(cap_rdata),
    .count(cap_count), .full(cap_full)
  );

  iq_to_polar #(.IN_W(IQ_W), .PH_W(IQ_W)) u_polar (
    .clk, .rst_n, .in_valid(meas_valid), .in_i(meas_i), .in_q(meas_q),
    .out_valid(), .amplitude, .phase
  );

  polar_to_iq #(.AMP_W(IQ_W), .PH_W(IQ_W), .OUT_W(IQ_W)) u_cmd (
    .clk, .rst_n, .in_valid(cfg.sp_polar_wr), .amplitude(cfg.sp_amp), .phase(cfg.sp_ph),
    .out_valid(sp_conv_valid), .out_i(sp_conv_i), .out_q(sp_conv_q)
  );

  host_regs #(.CAP_AW(CAP_AW)) u_regs (
    .clk, .rst_n, .bus_addr, .bus_wr, .bus_wdata, .bus_rd, .bus_rdata, .bus_rvalid,
    .cfg, .rf_on, .pi_sat, .shot_count, .meas_i, .meas_q, .dac_i, .dac_q,
    .cap_count, .cap_full, .amplitude, .phase,
    .sp_conv_valid, .sp_conv_i, .sp_conv_q, .cap_raddr, .cap_rdata
  );

  assign rf_gate = rf_on;

endmodule
