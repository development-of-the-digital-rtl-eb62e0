// drive_select: the I/Q codes sent to the two DAC channels, which drive the
// analogue IQ modulator.
//
// In closed loop (fb_en high) the DAC gets the PI controller outputs; in open
// loop it gets the set values, clipped to the DAC range; outside the RF pulse
// it gets zero. The closed-loop path follows the PEFP prototype; the open-loop drive
// and the zero between pulses are this design's choices. DAC codes are two's
// complement.
//
// Timing: one register stage; dac_i/dac_q follow their inputs one clock later.
module drive_select #(
  parameter int IQ_W  = 16,
  parameter int DAC_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rf_on,
  input  logic                    fb_en,
  input  logic signed [IQ_W-1:0]  sp_i,
  input  logic signed [IQ_W-1:0]  sp_q,
  input  logic signed [DAC_W-1:0] pi_i,
  input  logic signed [DAC_W-1:0] pi_q,
  output logic signed [DAC_W-1:0] dac_i,
  output logic signed [DAC_W-1:0] dac_q
);

  localparam logic signed [IQ_W-1:0] MAXV = IQ_W'((2 ** (DAC_W - 1)) - 1);
  localparam logic signed [IQ_W-1:0] MINV = -IQ_W'(2 ** (DAC_W - 1));

  function automatic logic signed [DAC_W-1:0] clip(input logic signed [IQ_W-1:0] v);
    if (v > MAXV)      return MAXV[DAC_W-1:0];
    else if (v < MINV) return MINV[DAC_W-1:0];
    else               return v[DAC_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_i <= '0;
      dac_q <= '0;
    end else if (!rf_on) begin
      dac_i <= '0;
      dac_q <= '0;
    end else if (fb_en) begin
      dac_i <= pi_i;
      dac_q <= pi_q;
    end else begin
      dac_i <= clip(sp_i);
      dac_q <= clip(sp_q);
    end
  end

endmodule
