// tb_host_regs: bus-level test of the register file. Checks the reset values
// (Kp 3.0, Ki 0.005, pulse length 4000, stride 1), write/read-back of every
// writable register, that the configuration outputs follow writes on the
// next clock, the one-clock software trigger, the read-only status words,
// buffer reads through a small synchronous RAM model here, and that reads
// answer exactly one clock later.
module tb_host_regs;
  import llrf_pkg::*;
  localparam int CAP_AW = 10;
  logic clk = 0, rst_n = 0;
  logic [BUS_AW-1:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [BUS_DW-1:0] bus_wdata = '0, bus_rdata;
  logic bus_rvalid;
  llrf_cfg_t cfg;
  logic rf_on = 0;
  logic [1:0] pi_sat = 2'b00;
  logic [31:0] shot_count = 32'd0;
  logic signed [IQ_W-1:0] meas_i = '0, meas_q = '0;
  logic signed [DAC_W-1:0] dac_i = '0, dac_q = '0;
  logic [CAP_AW:0] cap_count = '0;
  logic cap_full = 0;
  logic [IQ_W-1:0] amplitude = '0;
  logic signed [IQ_W-1:0] phase = '0;
  logic sp_conv_valid = 0;
  logic signed [IQ_W-1:0] sp_conv_i = '0, sp_conv_q = '0;
  logic [CAP_AW-1:0] cap_raddr;
  logic [2*IQ_W-1:0] cap_rdata;
  int checks = 0, failures = 0;

  host_regs #(.CAP_AW(CAP_AW)) dut (.*);

  // synchronous RAM model of the capture buffer: entry a holds a*7919
  always_ff @(posedge clk) cap_rdata <= 32'(cap_raddr) * 32'd7919;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic wr(logic [BUS_AW-1:0] a, logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(posedge clk); #1 bus_wr = 0;
  endtask

  task automatic rd(logic [BUS_AW-1:0] a, output logic [31:0] d);
    bus_addr = a; bus_rd = 1;
    @(posedge clk); #1 bus_rd = 0;
    check("rvalid one clock after read", longint'(bus_rvalid), 1);
    d = bus_rdata;
    @(posedge clk); #1;
    check("rvalid drops", longint'(bus_rvalid), 0);
  endtask

  logic [31:0] d;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    rd(REG_KP_I, d); check("Kp I reset", d, 768);
    rd(REG_KP_Q, d); check("Kp Q reset", d, 768);
    rd(REG_KI_I, d); check("Ki I reset", d, 328);
    rd(REG_KI_Q, d); check("Ki Q reset", d, 328);
    rd(REG_PULSE_LEN, d); check("pulse len reset", d, 4000);
    rd(REG_STRIDE, d); check("stride reset", d, 1);
    rd(REG_CTRL, d); check("ctrl reset", d, 0);
    // write/read every writable register
    wr(REG_SP_I, 32'hFFFF_F830);   check("cfg.sp_i", longint'(cfg.sp_i), -2000);
    wr(REG_SP_Q, 32'h0000_1234);   check("cfg.sp_q", longint'(cfg.sp_q), 32'h1234);
    wr(REG_KP_I, 32'h0003_FFFF);   check("cfg.kp_i", longint'(cfg.kp_i), 32'h3FFFF);
    wr(REG_KP_Q, 32'h0000_0101);   check("cfg.kp_q", longint'(cfg.kp_q), 32'h101);
    wr(REG_KI_I, 32'h0001_0000);   check("cfg.ki_i", longint'(cfg.ki_i), 32'h10000);
    wr(REG_KI_Q, 32'h0000_0007);   check("cfg.ki_q", longint'(cfg.ki_q), 7);
    wr(REG_PULSE_LEN, 32'h00AB_CDEF); check("cfg.pulse_len", longint'(cfg.pulse_len), 32'hABCDEF);
    wr(REG_STRIDE, 32'h0000_0009); check("cfg.stride", longint'(cfg.stride), 9);
    rd(REG_SP_I, d); check("sp_i read", longint'(d[15:0]), 16'hF830);
    rd(REG_SP_Q, d); check("sp_q read", d, 32'h1234);
    rd(REG_KP_I, d); check("kp_i read", d, 32'h3FFFF);
    rd(REG_KP_Q, d); check("kp_q read", d, 32'h101);
    rd(REG_KI_I, d); check("ki_i read", d, 32'h10000);
    rd(REG_KI_Q, d); check("ki_q read", d, 7);
    rd(REG_PULSE_LEN, d); check("pulse_len read", d, 32'hABCDEF);
    rd(REG_STRIDE, d); check("stride read", d, 9);
    // control: feedback enable and one-clock soft trigger
    wr(REG_CTRL, 32'h3);
    check("fb_en set", longint'(cfg.fb_en), 1);
    check("soft_trig pulse", longint'(cfg.soft_trig), 1);
    @(posedge clk); #1;
    check("soft_trig self-clears", longint'(cfg.soft_trig), 0);
    check("fb_en held", longint'(cfg.fb_en), 1);
    rd(REG_CTRL, d); check("ctrl read", d, 1);
    // status words
    rf_on = 1; pi_sat = 2'b10; shot_count = 32'hDEAD_BEEF;
    meas_i = -16'sd3; meas_q = 16'sd77; dac_i = -14'sd100; dac_q = 14'sd8191; cap_count = 11'd1024;
    cap_full = 1; amplitude = 16'd51234; phase = -16'sd5;
    rd(REG_STATUS, d); check("status", d, 5'b11011);
    rd(REG_AMP_PH, d); check("amplitude/phase", d, 32'hC822_FFFB);
    rd(REG_SHOTS, d); check("shots", d, 32'hDEAD_BEEF);
    rd(REG_LIVE_IQ, d); check("live iq", d, 32'hFFFD_004D);
    rd(REG_CAP_COUNT, d); check("cap count", d, 1024);
    rd(REG_DRIVE, d); check("drive", d, 32'hFF9C_1FFF);
    rd(12'h07F, d); check("unmapped reads 0", d, 0);
    wr(REG_STATUS, 32'hFFFF_FFFF);  // read-only: ignored
    check("ro write ignored", longint'(cfg.fb_en), 1);
    // amplitude/phase set value: a write pulses sp_polar_wr for one clock
    wr(REG_SP_AMP, 32'h0000_1A34);
    check("sp_amp", longint'(cfg.sp_amp), 32'h1A34);
    check("polar write strobe", longint'(cfg.sp_polar_wr), 1);
    @(posedge clk); #1;
    check("polar strobe clears", longint'(cfg.sp_polar_wr), 0);
    wr(REG_SP_PH, 32'h0000_C000);
    check("sp_ph", longint'(cfg.sp_ph), -16384);
    check("polar write strobe 2", longint'(cfg.sp_polar_wr), 1);
    rd(REG_SP_AMP, d); check("sp_amp read", d, 32'h1A34);
    rd(REG_SP_PH, d); check("sp_ph read", longint'(d[15:0]), 16'hC000);
    // converted result loads SP_I/SP_Q
    sp_conv_i = 16'sd1234; sp_conv_q = -16'sd4321; sp_conv_valid = 1;
    @(posedge clk); #1 sp_conv_valid = 0;
    check("converted I loaded", longint'(cfg.sp_i), 1234);
    check("converted Q loaded", longint'(cfg.sp_q), -4321);
    // a direct write in the same clock wins
    sp_conv_i = 16'sd7; sp_conv_valid = 1;
    wr(REG_SP_I, 32'd99);
    sp_conv_valid = 0;
    check("bus write wins over conversion", longint'(cfg.sp_i), 99);
    // buffer reads
    for (int a = 0; a < 20; a++) begin
      int e = $urandom_range(0, 1023);
      rd(CAP_BASE + 12'(e), d); check("buffer entry", d, longint'(e) * 7919);
    end
    // back-to-back reads: each answers one clock later
    bus_rd = 1; bus_addr = REG_KP_Q; @(posedge clk); #1;
    bus_addr = CAP_BASE + 12'd5;
    check("b2b 1 valid", longint'(bus_rvalid), 1); check("b2b 1", bus_rdata, 32'h101);
    @(posedge clk); #1; bus_rd = 0;
    check("b2b 2 valid", longint'(bus_rvalid), 1); check("b2b 2", bus_rdata, 5 * 7919);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
