// pulse_ctrl: pulsed-mode timing from an external trigger.
//
// The external trigger is asynchronous to the sample clock; it passes a
// two-flop synchroniser and its rising edge (or a one-cycle software trigger
// from the host) opens an RF pulse of pulse_len clocks. Triggers that arrive
// while a pulse is open are ignored, and pulse_len = 0 disables pulses.
// Pulsed operation on an external trigger comes from the PEFP prototype; the pulse
// length register, retrigger rule, software trigger and shot counter are this
// design's choices.
//
// Timing: an external edge opens the pulse three clocks after it is sampled
// (two synchroniser stages and the edge register); a software trigger opens
// it on the next clock. rf_on stays high for exactly pulse_len clocks;
// pulse_start is high on the first of them and pulse_end on the clock after
// the last.
module pulse_ctrl #(
  parameter int LEN_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ext_trig,
  input  logic             soft_trig,
  input  logic [LEN_W-1:0] pulse_len,
  output logic             rf_on,
  output logic             pulse_start,
  output logic             pulse_end,
  output logic [31:0]      shot_count
);

  logic [2:0]       sync;      // [0],[1] synchroniser, [2] previous value
  logic             trig_edge;
  logic [LEN_W-1:0] remain;

  assign trig_edge = sync[1] & ~sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync        <= '0;
      rf_on       <= 1'b0;
      pulse_start <= 1'b0;
      pulse_end   <= 1'b0;
      remain      <= '0;
      shot_count  <= '0;
    end else begin
      sync        <= {sync[1:0], ext_trig};
      pulse_start <= 1'b0;
      pulse_end   <= 1'b0;
      if (!rf_on) begin
        if ((trig_edge || soft_trig) && pulse_len != '0) begin
          rf_on       <= 1'b1;
          pulse_start <= 1'b1;
          remain      <= pulse_len - LEN_W'(1);
          shot_count  <= shot_count + 32'd1;
        end
      end else if (remain == '0) begin
        rf_on     <= 1'b0;
        pulse_end <= 1'b1;
      end else begin
        remain <= remain - LEN_W'(1);
      end
    end
  end

  // A pulse never starts while one is open.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) pulse_start |-> rf_on && !$past(rf_on));

endmodule
