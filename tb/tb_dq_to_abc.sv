// Testbench for dq_to_abc: random dq currents and angles; the phase currents are
// compared with i_x = i_d*cos(theta - k*2pi/3) - i_q*sin(theta - k*2pi/3), the
// direct form of inverse Park plus inverse Clarke, and must sum to zero. The
// 10-cycle budget of the transformation subsystem is checked.
module tb_dq_to_abc;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0, done;
  q16_t i_d, i_q, i_a, i_b, i_c;
  trig_t sin_th, cos_th;
  int checks = 0, failures = 0;

  dq_to_abc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_d = 0; i_q = 0; sin_th = 0; cos_th = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (1000) begin
      real th, d, q, e [3], g [3];
      int lat;
      th = $urandom_range(0, 99999) / 100000.0 * 2.0 * PI;
      d = ($urandom_range(0, 60000) - 30000.0) / 100.0;
      q = ($urandom_range(0, 60000) - 30000.0) / 100.0;
      @(negedge clk);
      i_d = r2q(d, 16); i_q = r2q(q, 16); sin_th = r2q($sin(th), 30); cos_th = r2q($cos(th), 30);
      for (int k = 0; k < 3; k++)
        e[k] = d * $cos(th - k * 2.0 * PI / 3.0) - q * $sin(th - k * 2.0 * PI / 3.0);
      start = 1;
      @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      g[0] = q2r(i_a, 16); g[1] = q2r(i_b, 16); g[2] = q2r(i_c, 16);
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (rabs(g[k] - e[k]) > 1e-3) begin
          failures++;
          $display("FAIL phase %0d got %f expected %f", k, g[k], e[k]);
        end
      end
      checks++;
      if (rabs(g[0] + g[1] + g[2]) > 1e-3) begin failures++; $display("FAIL sum"); end
      checks++;
      if (lat > 10) begin failures++; $display("FAIL latency %0d", lat); end
      if (checks == 5) $display("transformation latency %0d cycles", lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
