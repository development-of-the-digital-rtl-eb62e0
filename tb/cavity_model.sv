// cavity_model: behavioural (non-synthesizable) model of the RF plant seen
// by the controller, for closed-loop simulation only: DAC -> IQ modulator ->
// amplifier -> cavity -> pick-up -> mixer -> ADC.
//
// The cavity is a first-order low-pass on the complex baseband envelope,
//     v[n+1] = v[n] + alpha * (g * exp(j*theta) * u[n-DELAY] + b - v[n]),
// where u is the DAC I/Q drive, g the plant gain and theta the plant phase,
// both set from the testbench (a step in them is the perturbation of the
// detuning test), and b the steady field the beam current would induce on
// its own (beam loading; zero when no beam passes). DELAY models the analogue and cable delay of the loop.
// The envelope is placed on a 10 MHz IF sampled at 40 MHz,
//     adc[n] = vI*cos(pi*n/2) - vQ*sin(pi*n/2) + noise,
// rounded and clipped to 14 bits. The sample index is kept in step with the
// detector's phase counter, so measured I/Q equal 2*v with no rotation.
module cavity_model #(
  parameter int  DELAY     = 59,     // clocks
  parameter real ALPHA     = 1.0 / 512.0,
  parameter int  NOISE_LSB = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [13:0] dac_i,
  input  logic signed [13:0] dac_q,
  input  int                 gain_milli,   // plant gain * 1000
  input  int                 phase_mdeg,   // plant phase in 1/1000 degree
  input  int                 beam_i,       // beam-induced field, I (same units as v)
  input  int                 beam_q,       // beam-induced field, Q
  output logic signed [13:0] adc_data
);
  real vi, vq;
  real ui [DELAY];
  real uq [DELAY];
  int  n;

  initial begin
    vi = 0.0; vq = 0.0; n = 0; adc_data = '0;
    for (int k = 0; k < DELAY; k++) begin ui[k] = 0.0; uq[k] = 0.0; end
  end

  always @(posedge clk) begin
    real g, th, di, dq, x;
    int  xi;
    if (!rst_n) begin
      vi = 0.0; vq = 0.0; n = 0;
      for (int k = 0; k < DELAY; k++) begin ui[k] = 0.0; uq[k] = 0.0; end
      adc_data <= '0;
    end else begin
      g  = real'(gain_milli) / 1000.0;
      th = real'(phase_mdeg) / 1000.0 * 3.14159265358979 / 180.0;
      di = g * (ui[DELAY-1] * $cos(th) - uq[DELAY-1] * $sin(th));
      dq = g * (ui[DELAY-1] * $sin(th) + uq[DELAY-1] * $cos(th));
      for (int k = DELAY - 1; k > 0; k--) begin ui[k] = ui[k-1]; uq[k] = uq[k-1]; end
      ui[0] = real'(dac_i);
      uq[0] = real'(dac_q);
      vi = vi + ALPHA * (di + real'(beam_i) - vi);
      vq = vq + ALPHA * (dq + real'(beam_q) - vq);
      // the sample written now is read by the detector on the next clock,
      // in its phase slot n+1
      case ((n + 1) % 4)
        0: x = vi;
        1: x = -vq;
        2: x = -vi;
        default: x = vq;
      endcase
      x = x + real'($signed($urandom_range(0, 2 * NOISE_LSB)) - NOISE_LSB);
      xi = $rtoi(x + ((x >= 0.0) ? 0.5 : -0.5));
      if (xi > 8191) xi = 8191;
      if (xi < -8192) xi = -8192;
      adc_data <= 14'(xi);
      n++;
    end
  end
endmodule
