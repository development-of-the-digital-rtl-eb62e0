// iq_detector: digital I/Q detection of an IF sampled at four times its
// frequency (10 MHz IF, 40 MHz sample clock).
//
// With the IF written as x[n] = I*cos(pi*n/2) - Q*sin(pi*n/2), the four
// samples of one period are I, -Q, -I, Q. The block keeps the most recent
// sample of each of the four phases and forms
//     meas_i = x0 - x2 = 2*I,   meas_q = x3 - x1 = 2*Q
// after every new sample, so I/Q are refreshed at the full sample rate and an
// ADC offset cancels. The four-samples-per-period scheme follows the
// PEFP prototype; the sliding difference, the factor of two and the free-running
// phase counter (a fixed rotation that the set values absorb) are this
// design's choices.
//
// Timing: adc_data is registered on the clock edge it is sampled on; meas_i
// and meas_q reflect that sample one clock later. meas_valid rises once all
// four phase slots have been filled after reset.
module iq_detector #(
  parameter int ADC_W = 14,
  parameter int IQ_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic signed [IQ_W-1:0]  meas_i,
  output logic signed [IQ_W-1:0]  meas_q,
  output logic [1:0]              phase,      // phase slot of the sample in adc_data
  output logic                    meas_valid
);

  logic signed [ADC_W-1:0] slot [4];
  logic signed [ADC_W-1:0] cur  [4];   // slots with the incoming sample in place
  logic [3:0]              filled;

  always_comb begin
    for (int k = 0; k < 4; k++) cur[k] = slot[k];
    cur[phase] = adc_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) slot[k] <= '0;
      phase      <= '0;
      filled     <= '0;
      meas_i     <= '0;
      meas_q     <= '0;
      meas_valid <= 1'b0;
    end else begin
      slot[phase]   <= adc_data;
      filled[phase] <= 1'b1;
      phase         <= phase + 2'd1;
      meas_i        <= IQ_W'(cur[0]) - IQ_W'(cur[2]);
      meas_q        <= IQ_W'(cur[3]) - IQ_W'(cur[1]);
      meas_valid    <= &(filled | (4'b1 << phase));
    end
  end

  initial assert (IQ_W > ADC_W) else $error("IQ_W must exceed ADC_W to hold a difference of two samples");

endmodule
