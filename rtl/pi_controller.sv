// pi_controller: proportional-integral feedback for one channel (I or Q).
//
// The error is the set value minus the measured value. The proportional term
// is Kp*error, the integral term is the running sum of Ki*error, and their sum
// is the control value sent to the DAC. This structure comes from the PEFP prototype; the
// fixed-point formats, the pipelining and the clipping are this design's:
//   kp  unsigned, KP_FRAC fraction bits (3.0 = 3 << 8 by default)
//   ki  unsigned, KI_FRAC fraction bits, gain per sample (Ki_continuous * Ts)
//   integrator ACC_W bits, clipped to the DAC range (anti-windup)
//   ctrl_out   OUT_W bits, clipped; sat flags a clipped output or integrator
//
// Timing: three register stages. A change of meas at a clock edge reaches
// ctrl_out three clocks later. While enable is low the pipeline and the
// integrator are held at zero, so each pulse starts from a clean state.
// The gains may change at any time and take effect on the next sample.
module pi_controller #(
  parameter int IQ_W    = 16,
  parameter int GAIN_W  = 18,
  parameter int KP_FRAC = 8,
  parameter int KI_FRAC = 16,
  parameter int OUT_W   = 14,
  parameter int ACC_W   = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic signed [IQ_W-1:0]  setpoint,
  input  logic signed [IQ_W-1:0]  meas,
  input  logic [GAIN_W-1:0]       kp,
  input  logic [GAIN_W-1:0]       ki,
  output logic signed [OUT_W-1:0] ctrl_out,
  output logic                    sat
);

  localparam int ERR_W  = IQ_W + 1;
  localparam int PROD_W = ERR_W + GAIN_W + 1;
  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((2 ** (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(2 ** (OUT_W - 1));
  localparam logic signed [ACC_W-1:0] ACC_MAX = OUT_MAX <<< KI_FRAC;
  localparam logic signed [ACC_W-1:0] ACC_MIN = OUT_MIN <<< KI_FRAC;

  logic signed [ERR_W-1:0]  err;
  logic signed [PROD_W-1:0] prod_p, prod_i;
  logic signed [ACC_W-1:0]  integ;

  // Stage 3 arithmetic
  logic signed [ACC_W-1:0] integ_sum, integ_next, p_term, i_term, u;
  always_comb begin
    integ_sum = integ + ACC_W'(prod_i);
    if (integ_sum > ACC_MAX)      integ_next = ACC_MAX;
    else if (integ_sum < ACC_MIN) integ_next = ACC_MIN;
    else                          integ_next = integ_sum;
    p_term = ACC_W'(prod_p) >>> KP_FRAC;
    i_term = integ_next >>> KI_FRAC;
    u      = p_term + i_term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err      <= '0;
      prod_p   <= '0;
      prod_i   <= '0;
      integ    <= '0;
      ctrl_out <= '0;
      sat      <= 1'b0;
    end else if (!enable) begin
      err      <= '0;
      prod_p   <= '0;
      prod_i   <= '0;
      integ    <= '0;
      ctrl_out <= '0;
      sat      <= 1'b0;
    end else begin
      // stage 1: error
      err    <= ERR_W'(setpoint) - ERR_W'(meas);
      // stage 2: gain products (gains are unsigned: zero-extend)
      prod_p <= PROD_W'(err) * $signed({1'b0, kp});
      prod_i <= PROD_W'(err) * $signed({1'b0, ki});
      // stage 3: integrate, add, clip
      integ  <= integ_next;
      if (u > OUT_MAX) begin
        ctrl_out <= OUT_MAX[OUT_W-1:0];
        sat      <= 1'b1;
      end else if (u < OUT_MIN) begin
        ctrl_out <= OUT_MIN[OUT_W-1:0];
        sat      <= 1'b1;
      end else begin
        ctrl_out <= u[OUT_W-1:0];
        sat      <= (integ_sum != integ_next);
      end
    end
  end

  initial assert (ACC_W >= OUT_W + KI_FRAC + 2 && ACC_W >= PROD_W + 1)
    else $error("ACC_W too small for the gain and output formats");

endmodule
