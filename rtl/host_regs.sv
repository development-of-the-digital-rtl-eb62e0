// host_regs: the register file through which the host processor sets up and
// watches the controller.
//
// The host writes the I/Q set values, the four PI gains, the pulse length,
// the capture stride and a control word; it reads them back along with the
// status, shot count, live measured I/Q and its amplitude and phase, the
// current DAC drive and the capture buffer. Values take effect on the next clock, so set values and
// gains can be changed while the loop runs, as the PEFP prototype requires. The
// bus is a simple synchronous word bus, as the local side of a PCI bridge
// would present it; the protocol and register map (see llrf_pkg) are this
// design's choices.
//
// Timing: a write with bus_wr high is applied at that clock edge. A read with
// bus_rd high returns bus_rdata with bus_rvalid one clock later, for registers
// and buffer entries alike. Writing bit 1 of REG_CTRL gives a one-clock
// software trigger; the bit reads back as 0.
module host_regs
  import llrf_pkg::*;
#(
  parameter int CAP_AW = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host bus
  input  logic [BUS_AW-1:0]        bus_addr,
  input  logic                     bus_wr,
  input  logic [BUS_DW-1:0]        bus_wdata,
  input  logic                     bus_rd,
  output logic [BUS_DW-1:0]        bus_rdata,
  output logic                     bus_rvalid,
  // configuration out
  output llrf_cfg_t                cfg,
  // status in
  input  logic                     rf_on,
  input  logic [1:0]               pi_sat,      // {Q, I} controller clipped
  input  logic [31:0]              shot_count,
  input  logic signed [IQ_W-1:0]   meas_i,
  input  logic signed [IQ_W-1:0]   meas_q,
  input  logic signed [DAC_W-1:0]  dac_i,
  input  logic signed [DAC_W-1:0]  dac_q,
  input  logic [CAP_AW:0]          cap_count,
  input  logic                     cap_full,
  input  logic [IQ_W-1:0]          amplitude,
  input  logic signed [IQ_W-1:0]   phase,
  // amplitude/phase set value converted to I/Q
  input  logic                     sp_conv_valid,
  input  logic signed [IQ_W-1:0]   sp_conv_i,
  input  logic signed [IQ_W-1:0]   sp_conv_q,
  // capture buffer read port
  output logic [CAP_AW-1:0]        cap_raddr,
  input  logic [2*IQ_W-1:0]        cap_rdata
);

  logic            rd_cap;   // the pending read is a buffer read
  logic [BUS_DW-1:0] reg_rdata;

  assign cap_raddr = bus_addr[CAP_AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.fb_en     <= 1'b0;
      cfg.soft_trig <= 1'b0;
      cfg.sp_i      <= '0;
      cfg.sp_q      <= '0;
      cfg.sp_amp    <= '0;
      cfg.sp_ph     <= '0;
      cfg.sp_polar_wr <= 1'b0;
      cfg.kp_i      <= KP_RESET;
      cfg.kp_q      <= KP_RESET;
      cfg.ki_i      <= KI_RESET;
      cfg.ki_q      <= KI_RESET;
      cfg.pulse_len <= PULSE_LEN_RESET;
      cfg.stride    <= STRIDE_W'(1);
    end else begin
      cfg.soft_trig   <= 1'b0;
      cfg.sp_polar_wr <= 1'b0;
      // a converted amplitude/phase set value lands in SP_I/SP_Q; a direct
      // bus write to SP_I/SP_Q in the same clock takes precedence
      if (sp_conv_valid) begin
        cfg.sp_i <= sp_conv_i;
        cfg.sp_q <= sp_conv_q;
      end
      if (bus_wr) begin
        unique case (bus_addr)
          REG_CTRL:      {cfg.soft_trig, cfg.fb_en} <= bus_wdata[1:0];
          REG_SP_I:      cfg.sp_i      <= bus_wdata[IQ_W-1:0];
          REG_SP_Q:      cfg.sp_q      <= bus_wdata[IQ_W-1:0];
          REG_KP_I:      cfg.kp_i      <= bus_wdata[GAIN_W-1:0];
          REG_KP_Q:      cfg.kp_q      <= bus_wdata[GAIN_W-1:0];
          REG_KI_I:      cfg.ki_i      <= bus_wdata[GAIN_W-1:0];
          REG_KI_Q:      cfg.ki_q      <= bus_wdata[GAIN_W-1:0];
          REG_PULSE_LEN: cfg.pulse_len <= bus_wdata[LEN_W-1:0];
          REG_STRIDE:    cfg.stride    <= bus_wdata[STRIDE_W-1:0];
          REG_SP_AMP:    {cfg.sp_polar_wr, cfg.sp_amp} <= {1'b1, bus_wdata[IQ_W-1:0]};
          REG_SP_PH:     {cfg.sp_polar_wr, cfg.sp_ph}  <= {1'b1, bus_wdata[IQ_W-1:0]};
          default: ;  // read-only or unmapped: ignored
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rvalid <= 1'b0;
      rd_cap     <= 1'b0;
      reg_rdata  <= '0;
    end else begin
      bus_rvalid <= bus_rd;
      rd_cap     <= bus_rd && (bus_addr >= CAP_BASE);
      if (bus_rd) begin
        unique case (bus_addr)
          REG_CTRL:      reg_rdata <= BUS_DW'(cfg.fb_en);
          REG_SP_I:      reg_rdata <= BUS_DW'(cfg.sp_i);
          REG_SP_Q:      reg_rdata <= BUS_DW'(cfg.sp_q);
          REG_KP_I:      reg_rdata <= BUS_DW'(cfg.kp_i);
          REG_KP_Q:      reg_rdata <= BUS_DW'(cfg.kp_q);
          REG_KI_I:      reg_rdata <= BUS_DW'(cfg.ki_i);
          REG_KI_Q:      reg_rdata <= BUS_DW'(cfg.ki_q);
          REG_PULSE_LEN: reg_rdata <= BUS_DW'(cfg.pulse_len);
          REG_STRIDE:    reg_rdata <= BUS_DW'(cfg.stride);
          REG_STATUS:    reg_rdata <= BUS_DW'({cap_full, pi_sat, cfg.fb_en, rf_on});
          REG_SHOTS:     reg_rdata <= shot_count;
          REG_LIVE_IQ:   reg_rdata <= {meas_i, meas_q};
          REG_CAP_COUNT: reg_rdata <= BUS_DW'(cap_count);
          REG_DRIVE:     reg_rdata <= {IQ_W'(dac_i), IQ_W'(dac_q)};
          REG_AMP_PH:    reg_rdata <= {amplitude, phase};
          REG_SP_AMP:    reg_rdata <= BUS_DW'(cfg.sp_amp);
          REG_SP_PH:     reg_rdata <= BUS_DW'(cfg.sp_ph);
          default:       reg_rdata <= '0;
        endcase
      end
    end
  end

  assign bus_rdata = rd_cap ? BUS_DW'(cap_rdata) : reg_rdata;

  // The host never reads and writes in the same cycle.
  a_bus_excl: assert property (@(posedge clk) !(bus_rd && bus_wr));

endmodule
