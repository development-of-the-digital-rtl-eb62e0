// tb_iq_detector: drives the detector with a 10 MHz IF sampled four times per
// period, x[n] = I*cos(pi*n/2) - Q*sin(pi*n/2) + offset, with I, Q and the
// offset changing between segments, and compares every output with a
// sliding-window reference built from the sample history here. Checks the
// one-clock latency, the valid flag after four samples, the rejection of a
// DC offset and the steady value 2*I, 2*Q.
module tb_iq_detector;
  localparam int ADC_W = 14, IQ_W = 16;
  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] adc_data;
  logic signed [IQ_W-1:0]  meas_i, meas_q;
  logic [1:0] phase;
  logic meas_valid;
  int checks = 0, failures = 0;

  iq_detector #(.ADC_W(ADC_W), .IQ_W(IQ_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];
  function automatic int ifsample(int n, int i, int q, int off);
    case (n % 4)
      0: return i + off;
      1: return -q + off;
      2: return -i + off;
      default: return q + off;
    endcase
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int seg_i[6] = '{3000, -5000, 8191, 0, -1234, 4000};
  int seg_q[6] = '{1000, 2500, -8191, -7000, 6000, -4000};
  int seg_o[6] = '{0, 37, -120, 0, 500, -500};
  int n = 0;

  initial begin
    adc_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 6; s++) begin
      for (int k = 0; k < 40; k++) begin
        int x, ri, rq, h[4];
        x = ifsample(n, seg_i[s], seg_q[s], seg_o[s]);
        if (x > 8191) x = 8191;
        if (x < -8192) x = -8192;
        adc_data = ADC_W'(x);
        hist.push_back(x);
        @(posedge clk); #1;
        // reference: latest sample of each phase within the last four
        for (int j = 0; j < 4; j++) h[j] = 0;
        for (int m = (n > 3 ? n - 3 : 0); m <= n; m++) h[m % 4] = hist[m];
        ri = h[0] - h[2];
        rq = h[3] - h[1];
        check("valid", int'(meas_valid), int'(n >= 3));
        if (n >= 3) begin
          check("I", int'(meas_i), ri);
          check("Q", int'(meas_q), rq);
        end
        check("phase", int'(phase), (n + 1) % 4);
        if (k == 39 && seg_o[s] >= -200 && s != 2) begin
          // steady state equals twice the baseband value, offset removed
          check("steady I", int'(meas_i), 2 * seg_i[s]);
          check("steady Q", int'(meas_q), 2 * seg_q[s]);
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
