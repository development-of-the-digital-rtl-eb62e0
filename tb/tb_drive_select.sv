// tb_drive_select: random set values, PI outputs and mode bits; checks each
// DAC code one clock later against the rule: zero outside the pulse, the PI
// output in closed loop, the set value clipped to 14 bits in open loop.
module tb_drive_select;
  localparam int IQ_W = 16, DAC_W = 14;
  logic clk = 0, rst_n = 0, rf_on = 0, fb_en = 0;
  logic signed [IQ_W-1:0] sp_i = '0, sp_q = '0;
  logic signed [DAC_W-1:0] pi_i = '0, pi_q = '0, dac_i, dac_q;
  int checks = 0, failures = 0;
  int n_open = 0, n_closed = 0, n_off = 0, n_clip = 0;

  drive_select #(.IQ_W(IQ_W), .DAC_W(DAC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip14(int v);
    return (v > 8191) ? 8191 : (v < -8192) ? -8192 : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      int ei, eq;
      rf_on = ($urandom_range(0, 4) != 0);
      fb_en = $urandom_range(0, 1) == 1;
      sp_i = 16'($urandom_range(0, 65535) >> $urandom_range(0, 3));
      sp_q = 16'($urandom_range(0, 65535) >> $urandom_range(0, 3));
      pi_i = 14'($urandom_range(0, 16383));
      pi_q = 14'($urandom_range(0, 16383));
      if (!rf_on) begin ei = 0; eq = 0; n_off++; end
      else if (fb_en) begin ei = int'(pi_i); eq = int'(pi_q); n_closed++; end
      else begin
        ei = clip14(int'(sp_i)); eq = clip14(int'(sp_q)); n_open++;
        if (ei != int'(sp_i)) n_clip++;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(dac_i) != ei || int'(dac_q) != eq) begin
        failures++;
        $display("FAIL rf_on=%0d fb=%0d: got %0d %0d expected %0d %0d", rf_on, fb_en, dac_i, dac_q, ei, eq);
      end
    end
    checks++;
    if (n_open == 0 || n_closed == 0 || n_off == 0 || n_clip == 0) begin
      failures++; $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
