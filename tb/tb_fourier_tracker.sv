// Testbench for fourier_tracker with a 64-sample window: i_q carries a DC part,
// a fundamental and a second harmonic whose amplitude steps up midway (as after
// a fault). After every sample the magnitude is compared with a direct
// floating-point evaluation of f*|sum over the last 64 samples of
// i_q*(sin 2theta, cos 2theta)|, and, once the window is full of the new
// signal, with the second-harmonic amplitude itself.
module tb_fourier_tracker;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, sample = 0, done;
  q16_t i_q, mag;
  trig_t sin_2th, cos_2th;
  logic [31:0] f;
  int checks = 0, failures = 0;
  real hs [$], hc [$];

  fourier_tracker #(.WINDOW(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a2, th, iq, s, c, e;
    int lat;
    i_q = 0; sin_2th = 0; cos_2th = 0;
    f = 32'($rtoi(2.0 / W * 4294967296.0));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8 * W; n++) begin
      a2 = (n < 4 * W) ? 0.5 : 3.0;
      th = 2.0 * PI * 4.0 * n / W;            // 4 electrical periods per window
      iq = 20.0 + 1.5 * $cos(th) + a2 * $cos(2.0 * th + 0.7);
      @(negedge clk);
      i_q = r2q(iq, 16); sin_2th = r2q($sin(2.0 * th), 30); cos_2th = r2q($cos(2.0 * th), 30);
      hs.push_back(q2r(i_q, 16) * q2r(sin_2th, 30));
      hc.push_back(q2r(i_q, 16) * q2r(cos_2th, 30));
      if (hs.size() > W) begin void'(hs.pop_front()); void'(hc.pop_front()); end
      s = 0; c = 0;
      foreach (hs[k]) begin s += hs[k]; c += hc[k]; end
      e = 2.0 / W * $sqrt(s * s + c * c);
      sample = 1;
      @(negedge clk); sample = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (rabs(q2r(mag, 16) - e) > 2e-3) begin
        failures++;
        $display("FAIL n=%0d mag %f expected %f", n, q2r(mag, 16), e);
      end
      if (n == 4 * W - 1 || n == 8 * W - 1) begin
        checks++;
        if (rabs(q2r(mag, 16) - a2) > 5e-3) begin
          failures++;
          $display("FAIL n=%0d second harmonic %f expected %f", n, q2r(mag, 16), a2);
        end
      end
      checks++;
      if (lat > 40) begin failures++; $display("FAIL latency %0d", lat); end
      if (n == 0) $display("tracker latency %0d cycles", lat);
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
