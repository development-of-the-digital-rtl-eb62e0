// polar_to_iq: turns an amplitude and phase set value into the I and Q set
// values that the feedback compares with, so the host may program the field
// either way.
//
// Pipelined CORDIC in rotation mode. A first stage scales the amplitude by
// 1/K = 39797 / 2^16 (K = 1.64676, the gain the rotations will add) and, for
// phases beyond +-90 degrees, starts from the negated vector with the phase
// moved by half a turn. Each of the ITER following stages rotates by
// +-atan(2^-i) (table: round(atan(2^-i) * 2^18 / (2*pi)), 2^18 units per
// turn) so as to drive the remaining angle to zero. I and Q carry four guard
// bits that the last stage rounds away. Converting amplitude/phase set values
// to I/Q follows the loop study's command block; doing it in the FPGA with a
// CORDIC, and the formats, are this design's choices.
//
// Formats: amplitude unsigned, in the measured-I/Q units; phase two's
// complement with 2^PH_W per turn. Outputs are signed, OUT_W bits, and
// saturate only if the amplitude exceeds 2^(OUT_W-1) - 1.
//
// Timing: fully pipelined, one conversion per clock; the result appears
// ITER + 2 clocks after its input (18 at the default), with out_valid.
module polar_to_iq #(
  parameter int AMP_W = 16,
  parameter int PH_W  = 16,
  parameter int OUT_W = 16,
  parameter int ITER  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [AMP_W-1:0]        amplitude,
  input  logic signed [PH_W-1:0]  phase,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);

  localparam int G  = 4;
  localparam int XW = AMP_W + 3 + G;
  localparam int ZW = 18;
  localparam logic [ZW-1:0] ATAN [16] = '{
    18'd32768, 18'd19344, 18'd10221, 18'd5188, 18'd2604, 18'd1303, 18'd652, 18'd326,
    18'd163,   18'd81,    18'd41,    18'd20,   18'd10,   18'd5,    18'd3,    18'd1 };
  localparam logic [16:0] INV_K = 17'd39797;
  localparam logic signed [XW-1:0] OMAX = XW'((2 ** (OUT_W - 1)) - 1);
  localparam logic signed [XW-1:0] OMIN = -XW'(2 ** (OUT_W - 1));

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic signed [ZW-1:0] z [ITER+1];
  logic        [ITER+1:0] v;

  logic [AMP_W+17+G:0]  scaled_amp;   // amplitude / K with G guard bits, before rounding
  logic signed [ZW-1:0] z_in;
  logic                 far;          // |phase| beyond a quarter turn

  assign scaled_amp = ({amplitude, G'(0)} * INV_K) + (AMP_W+18+G)'(1 << 15);
  assign z_in       = ZW'(phase) <<< (ZW - PH_W);
  assign far        = (z_in[ZW-1] != z_in[ZW-2]);   // outside [-90, +90) degrees

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      y[0] <= '0;
      if (far) begin
        x[0] <= -XW'(scaled_amp >> 16);
        z[0] <= z_in + (ZW'(1) << (ZW - 1));   // move by half a turn
      end else begin
        x[0] <= XW'(scaled_amp >> 16);
        z[0] <= z_in;
      end
    end
  end

  for (genvar s = 0; s < ITER; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[s+1] <= '0; y[s+1] <= '0; z[s+1] <= '0; v[s+1] <= 1'b0;
      end else begin
        v[s+1] <= v[s];
        if (z[s] >= 0) begin
          x[s+1] <= x[s] - (y[s] >>> s);
          y[s+1] <= y[s] + (x[s] >>> s);
          z[s+1] <= z[s] - ZW'(ATAN[s]);
        end else begin
          x[s+1] <= x[s] + (y[s] >>> s);
          y[s+1] <= y[s] - (x[s] >>> s);
          z[s+1] <= z[s] + ZW'(ATAN[s]);
        end
      end
    end
  end

  function automatic logic signed [OUT_W-1:0] round_clip(input logic signed [XW-1:0] a);
    logic signed [XW-1:0] r;
    r = (a + XW'(1 << (G - 1))) >>> G;
    if (r > OMAX)      return OMAX[OUT_W-1:0];
    else if (r < OMIN) return OMIN[OUT_W-1:0];
    else               return r[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_i <= '0; out_q <= '0; v[ITER+1] <= 1'b0;
    end else begin
      v[ITER+1] <= v[ITER];
      out_i     <= round_clip(x[ITER]);
      out_q     <= round_clip(y[ITER]);
    end
  end

  assign out_valid = v[ITER+1];

  initial assert (ITER >= 1 && ITER <= 16 && PH_W <= ZW) else $error("polar_to_iq: ITER must be 1..16, PH_W at most 18");

endmodule
