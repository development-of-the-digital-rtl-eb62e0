// llrf_pkg: widths, register map and the configuration bundle shared by the
// blocks of the pulsed I/Q feedback controller.
//
// The ADC and DAC widths (14 bit) are those of the converters on the FPGA
// board. Everything else here (internal I/Q width, gain formats, register
// addresses, reset values) is this design's own choice; the reset values of
// the gains are the P gain 3 and the I gain 200000 1/s used in the loop study,
// the latter converted to a per-sample gain at the 40 MHz clock
// (200000 * 25 ns = 0.005, i.e. 328 with 16 fraction bits).
package llrf_pkg;

  localparam int ADC_W   = 14;  // ADC sample width
  localparam int DAC_W   = 14;  // DAC code width
  localparam int IQ_W    = 16;  // measured I/Q and set values
  localparam int GAIN_W  = 18;  // unsigned gain registers
  localparam int KP_FRAC = 8;   // fraction bits of Kp
  localparam int KI_FRAC = 16;  // fraction bits of Ki (per sample)
  localparam int LEN_W   = 24;  // pulse length counter
  localparam int STRIDE_W = 16; // capture decimation
  localparam int BUS_AW  = 12;  // host word address width
  localparam int BUS_DW  = 32;  // host data width

  localparam logic [GAIN_W-1:0] KP_RESET = GAIN_W'(3 << KP_FRAC);   // 3.0
  localparam logic [GAIN_W-1:0] KI_RESET = GAIN_W'(328);            // 0.005
  localparam logic [LEN_W-1:0]  PULSE_LEN_RESET = LEN_W'(4000);     // 100 us

  // Host register word addresses. Addresses with bit 11 set read the
  // capture buffer (entry = address bits below 11).
  typedef enum logic [BUS_AW-1:0] {
    REG_CTRL      = 12'h000,  // [0] feedback enable, [1] software trigger (self-clearing)
    REG_SP_I      = 12'h001,  // signed I set value
    REG_SP_Q      = 12'h002,  // signed Q set value
    REG_KP_I      = 12'h003,
    REG_KP_Q      = 12'h004,
    REG_KI_I      = 12'h005,
    REG_KI_Q      = 12'h006,
    REG_PULSE_LEN = 12'h007,  // pulse length in clocks, 0 disables pulses
    REG_STRIDE    = 12'h008,  // capture keeps one sample in STRIDE (0 counts as 1)
    REG_STATUS    = 12'h009,  // [0] rf_on, [1] feedback enable, [2] I clipped, [3] Q clipped, [4] buffer full
    REG_SHOTS     = 12'h00A,  // pulses since reset
    REG_LIVE_IQ   = 12'h00B,  // {meas_i, meas_q}
    REG_CAP_COUNT = 12'h00C,  // entries captured in the last/current pulse
    REG_DRIVE     = 12'h00D,  // {dac_i, dac_q}, sign-extended to 16 bits each
    REG_AMP_PH    = 12'h00E,  // {amplitude, phase}: phase 2^16 per turn, two's complement
    REG_SP_AMP    = 12'h00F,  // set value as amplitude (measured units); a write
    REG_SP_PH     = 12'h010   // to either converts {SP_AMP, SP_PH} into SP_I/SP_Q
  } reg_addr_e;

  localparam logic [BUS_AW-1:0] CAP_BASE = 12'h800;

  typedef struct packed {
    logic                       fb_en;
    logic                       soft_trig;
    logic signed [IQ_W-1:0]     sp_i;
    logic signed [IQ_W-1:0]     sp_q;
    logic [IQ_W-1:0]            sp_amp;
    logic signed [IQ_W-1:0]     sp_ph;
    logic                       sp_polar_wr;   // one clock after a write to SP_AMP/SP_PH
    logic [GAIN_W-1:0]          kp_i;
    logic [GAIN_W-1:0]          kp_q;
    logic [GAIN_W-1:0]          ki_i;
    logic [GAIN_W-1:0]          ki_q;
    logic [LEN_W-1:0]           pulse_len;
    logic [STRIDE_W-1:0]        stride;
  } llrf_cfg_t;

endpackage
