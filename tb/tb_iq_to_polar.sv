// tb_iq_to_polar: streams one vector per clock (random and on the axes and
// diagonals, all four quadrants, full scale) through the CORDIC and compares
// each result, ITER + 2 = 18 clocks later, with sqrt(I^2 + Q^2) and
// atan2(Q, I) computed here in floating point. Tolerance: amplitude 3 LSB +
// 0.01 %, phase 4 LSB of 2^16 per turn (0.022 degrees) above amplitude 1024
// and 16 LSB between 64 and 1024.
module tb_iq_to_polar;
  localparam int IN_W = 16, PH_W = 16, ITER = 16, LAT = ITER + 2;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IN_W-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic [IN_W-1:0] amplitude;
  logic signed [PH_W-1:0] phase;
  int checks = 0, failures = 0;

  iq_to_polar #(.IN_W(IN_W), .PH_W(PH_W), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  int qi[$], qq[$];
  bit qv[$];
  int nvalid = 0;

  // compare outputs with the vector sent LAT clocks earlier
  always @(posedge clk) begin
    #2;
    if (rst_n && qv.size() > LAT) begin
      int i0, q0; bit v0;
      real ea, ep, dp;
      i0 = qi.pop_front(); q0 = qq.pop_front(); v0 = qv.pop_front();
      checks++;
      if (out_valid != v0) begin failures++; $display("FAIL valid timing"); end
      if (v0) begin
        nvalid++;
        ea = $sqrt(real'(i0) * real'(i0) + real'(q0) * real'(q0));
        ep = $atan2(real'(q0), real'(i0)) / (2.0 * 3.14159265358979) * 65536.0;
        dp = real'(phase) - ep;
        while (dp > 32768.0) dp -= 65536.0;
        while (dp < -32768.0) dp += 65536.0;
        checks++;
        if (fabs(real'(amplitude) - ea) > 3.0 + 1e-4 * ea) begin
          failures++; $display("FAIL amplitude (%0d,%0d): %0d vs %f", i0, q0, amplitude, ea);
        end
        checks++;
        if (ea > 64.0 && fabs(dp) > ((ea > 1024.0) ? 4.0 : 16.0)) begin
          failures++; $display("FAIL phase (%0d,%0d): %0d vs %f", i0, q0, phase, ep);
        end
      end
    end
  end

  task automatic send(int i, int q, bit v);
    in_i = 16'(i); in_q = 16'(q); in_valid = v;
    qi.push_back(i); qq.push_back(q); qv.push_back(v);
    @(posedge clk); #1;
  endtask

  int dirs[8][2] = '{'{20000, 0}, '{0, 20000}, '{-20000, 0}, '{0, -20000},
                      '{16000, 16000}, '{-16000, 16000}, '{-16000, -16000}, '{16000, -16000}};
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 8; k++) send(dirs[k][0], dirs[k][1], 1);
    send(32767, 32767, 1); send(-32768, -32768, 1); send(-32768, 0, 1); send(0, 0, 1);
    for (int k = 0; k < 5000; k++) begin
      int sh = $urandom_range(0, 8);
      send($signed(16'($urandom)) >>> sh, $signed(16'($urandom)) >>> sh, $urandom_range(0, 9) != 0);
    end
    repeat (LAT + 2) send(0, 0, 0);
    checks++;
    if (nvalid < 4000) begin failures++; $display("FAIL too few results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
