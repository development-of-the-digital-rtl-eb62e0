// tb_polar_to_iq: streams one amplitude/phase pair per clock (random, the
// four axes, the quadrant borders and the largest amplitude) through the
// CORDIC and compares each result, ITER + 2 = 18 clocks later, with
// A*cos(phi) and A*sin(phi) computed here in floating point. Tolerance:
// 2 LSB + 0.01 % of the amplitude. Also checks out_valid timing and the
// saturation of an amplitude that does not fit the output width.
module tb_polar_to_iq;
  localparam int AMP_W = 16, PH_W = 16, OUT_W = 16, ITER = 16, LAT = ITER + 2;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [AMP_W-1:0] amplitude = '0;
  logic signed [PH_W-1:0] phase = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;

  polar_to_iq #(.AMP_W(AMP_W), .PH_W(PH_W), .OUT_W(OUT_W), .ITER(ITER)) dut (.*);

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
  function automatic real clipo(real x);
    return (x > 32767.0) ? 32767.0 : (x < -32768.0) ? -32768.0 : x;
  endfunction

  int qa[$], qp[$];
  bit qv[$];
  int nvalid = 0;

  always @(posedge clk) begin
    #2;
    if (rst_n && qv.size() > LAT) begin
      int a0, p0; bit v0;
      real ang, ei, eq, tol;
      a0 = qa.pop_front(); p0 = qp.pop_front(); v0 = qv.pop_front();
      checks++;
      if (out_valid != v0) begin failures++; $display("FAIL valid timing"); end
      if (v0) begin
        nvalid++;
        ang = real'(p0) / 65536.0 * 2.0 * 3.14159265358979;
        ei = clipo(real'(a0) * $cos(ang));
        eq = clipo(real'(a0) * $sin(ang));
        tol = 2.0 + 1e-4 * real'(a0);
        checks++;
        if (fabs(real'(out_i) - ei) > tol || fabs(real'(out_q) - eq) > tol) begin
          failures++;
          $display("FAIL (%0d, %0d): %0d %0d expected %f %f", a0, p0, out_i, out_q, ei, eq);
        end
      end
    end
  end

  task automatic send(int a, int p, bit v);
    amplitude = 16'(a); phase = 16'(p); in_valid = v;
    qa.push_back(a); qp.push_back($signed(16'(p))); qv.push_back(v);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    send(20000, 0, 1); send(20000, 16384, 1); send(20000, -32768, 1); send(20000, -16384, 1);
    send(20000, 16383, 1); send(20000, 16385, 1); send(20000, -16385, 1); send(20000, -16383, 1);
    send(20000, 32767, 1); send(32767, 8192, 1); send(0, 1234, 1); send(1, 0, 1);
    send(65535, 8192, 1);   // 46341 per axis: saturates
    for (int k = 0; k < 5000; k++)
      send($urandom_range(0, 32767) >> $urandom_range(0, 8), $urandom_range(0, 65535), $urandom_range(0, 9) != 0);
    repeat (LAT + 2) send(0, 0, 0);
    checks++;
    if (nvalid < 4000) begin failures++; $display("FAIL too few results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
