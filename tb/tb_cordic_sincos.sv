// Testbench for cordic_sincos: the quadrant boundaries and random angles; results
// are compared with $sin/$cos to 1e-6 and the latency (ITER + 3) is checked.
module tb_cordic_sincos;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  angle_t angle;
  trig_t sin_o, cos_o;
  int checks = 0, failures = 0;

  cordic_sincos #(.ITER(30)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input angle_t a);
    int lat = 0;
    real ph, es, ec;
    @(negedge clk);
    angle = a; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    ph = real'(a) / 4294967296.0 * 2.0 * 3.14159265358979323846;
    es = $sin(ph); ec = $cos(ph);
    checks++;
    if (rabs(q2r(sin_o, 30) - es) > 1e-6 || rabs(q2r(cos_o, 30) - ec) > 1e-6) begin
      failures++;
      $display("FAIL angle=%h sin=%f (%f) cos=%f (%f)", a, q2r(sin_o, 30), es, q2r(cos_o, 30), ec);
    end
    checks++;
    if (lat != 33) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    angle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int q = 0; q < 16; q++) begin
      run_one(32'(q) << 28);
      run_one((32'(q) << 28) - 1);
    end
    repeat (300) run_one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
