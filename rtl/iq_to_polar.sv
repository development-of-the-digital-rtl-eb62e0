// iq_to_polar: amplitude and phase of the measured field from its I and Q,
// so that the digitally measured amplitude and phase can be read by the host
// and compared with those of the analogue amplitude detector and phase
// comparator.
//
// Pipelined CORDIC in vectoring mode. A first stage folds the vector into the
// right half plane (a 180 degree turn when I < 0); each of the ITER
// following stages rotates it by +-atan(2^-i) towards the I axis and adds the
// rotation to an angle accumulator; a last stage multiplies the remaining I
// by 1/K = 0.60725 (39797 / 2^16) to remove the CORDIC gain
// K = prod sqrt(1 + 2^-2i) = 1.64676. I and Q carry four guard bits
// through the rotations. The angle table holds
// round(atan(2^-i) * 2^18 / (2*pi)), i.e. 2^18 units per turn; the phase
// output keeps the upper PH_W bits, two's complement, so -2^(PH_W-1)
// is -180 degrees. Computing amplitude and phase comes from the PEFP prototype
// (the loop study converts I/Q to amplitude and phase for display, and the
// digital and analogue measurements are compared); CORDIC and the formats
// are this design's choices.
//
// Timing: fully pipelined, one vector per clock; a result appears
// ITER + 2 clocks after its input (18 at the default), with out_valid
// following in_valid.
module iq_to_polar #(
  parameter int IN_W = 16,
  parameter int PH_W = 16,
  parameter int ITER = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  output logic                   out_valid,
  output logic [IN_W-1:0]        amplitude,
  output logic signed [PH_W-1:0] phase
);

  localparam int G  = 4;          // guard bits below the input LSB
  localparam int XW = IN_W + 3 + G;  // room for sqrt(2) * K growth, sign, guard bits
  localparam int ZW = 18;         // angle: 2^18 units per turn
  localparam logic [ZW-1:0] ATAN [16] = '{
    18'd32768, 18'd19344, 18'd10221, 18'd5188, 18'd2604, 18'd1303, 18'd652, 18'd326,
    18'd163,   18'd81,    18'd41,    18'd20,   18'd10,   18'd5,    18'd3,    18'd1 };
  localparam logic [16:0] INV_K = 17'd39797;

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic        [ZW-1:0] z [ITER+1];
  logic        [ITER+1:0] v;
  logic signed [XW+17:0] scaled;

  // stage 0: fold into the right half plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      if (in_i < 0) begin
        x[0] <= -(XW'(in_i) <<< G);
        y[0] <= -(XW'(in_q) <<< G);
        z[0] <= ZW'(1) << (ZW - 1);   // half a turn
      end else begin
        x[0] <= XW'(in_i) <<< G;
        y[0] <= XW'(in_q) <<< G;
        z[0] <= '0;
      end
    end
  end

  // stages 1..ITER: micro-rotations
  for (genvar s = 0; s < ITER; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[s+1] <= '0; y[s+1] <= '0; z[s+1] <= '0; v[s+1] <= 1'b0;
      end else begin
        v[s+1] <= v[s];
        if (y[s] >= 0) begin
          x[s+1] <= x[s] + (y[s] >>> s);
          y[s+1] <= y[s] - (x[s] >>> s);
          z[s+1] <= z[s] + ATAN[s];
        end else begin
          x[s+1] <= x[s] - (y[s] >>> s);
          y[s+1] <= y[s] + (x[s] >>> s);
          z[s+1] <= z[s] - ATAN[s];
        end
      end
    end
  end

  // last stage: remove the CORDIC gain, round the angle
  assign scaled = x[ITER] * $signed({1'b0, INV_K});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      amplitude <= '0; phase <= '0; v[ITER+1] <= 1'b0;
    end else begin
      v[ITER+1] <= v[ITER];
      amplitude <= IN_W'((scaled + (XW+18)'(1 << (15 + G))) >>> (16 + G));
      phase     <= PH_W'((z[ITER] + ZW'(1 << (ZW - PH_W - 1))) >> (ZW - PH_W));
    end
  end

  assign out_valid = v[ITER+1];

  initial assert (ITER >= 1 && ITER <= 16 && PH_W < ZW) else $error("iq_to_polar: ITER must be 1..16, PH_W below 18");

endmodule
