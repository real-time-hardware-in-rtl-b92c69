// Testbench for angle_calc: runs steps at several speeds, time steps and faulted
// phases and checks the integrated angle against a floating-point integral of
// omega*dt, the eq. (9) phase shift, all six sine/cosine outputs, and that the
// result arrives within the 43-cycle budget of the angle subsystem.
module tb_angle_calc;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0, done;
  q16_t omega_e;
  dt_t dt;
  fault_phase_e fault_phase;
  angle_t theta, theta_fault;
  trig_t sin_th, cos_th, sin_f, cos_f, sin_2th, cos_2th;
  int checks = 0, failures = 0;
  real th_ref = 0.0;   // turns

  angle_calc #(.ITER(30)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (rabs(got - exp) > tol) begin
      failures++;
      $display("FAIL %s got %f expected %f", what, got, exp);
    end
  endfunction

  function automatic real wrapd(input real t);   // difference in turns, wrapped to [-0.5, 0.5)
    real r = t - $floor(t);
    return (r >= 0.5) ? r - 1.0 : r;
  endfunction

  task automatic do_step(input real w, input real dts, input fault_phase_e fp);
    int lat = 0;
    real shift, thf, ph;
    @(negedge clk);
    omega_e = r2q(w, 16); dt = 32'($rtoi(dts * 4294967296.0)); fault_phase = fp;
    start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    th_ref += (real'(omega_e) / 65536.0) * (real'(dt) / 4294967296.0) / (2.0 * PI);
    checks++;
    if (lat > 43) begin failures++; $display("FAIL latency %0d > 43", lat); end
    if (checks == 1) $display("angle latency %0d cycles", lat);
    chk("theta", wrapd(real'(theta) / 4294967296.0 - th_ref), 0.0, 1e-7);
    shift = (fp == FAULT_PHASE_A) ? 1.0 / 3.0 : (fp == FAULT_PHASE_B) ? 2.0 / 3.0 : 0.0;
    thf = th_ref - shift;
    chk("theta_fault", wrapd(real'(theta_fault) / 4294967296.0 - thf), 0.0, 1e-7);
    ph = 2.0 * PI * th_ref;
    chk("sin", q2r(sin_th, 30), $sin(ph), 1e-5);
    chk("cos", q2r(cos_th, 30), $cos(ph), 1e-5);
    chk("sin2", q2r(sin_2th, 30), $sin(2.0 * ph), 1e-5);
    chk("cos2", q2r(cos_2th, 30), $cos(2.0 * ph), 1e-5);
    chk("sin_f", q2r(sin_f, 30), $sin(2.0 * PI * thf + 2.0 * PI / 3.0), 1e-5);
    chk("cos_f", q2r(cos_f, 30), $cos(2.0 * PI * thf + 2.0 * PI / 3.0), 1e-5);
    repeat ($urandom_range(10, 20)) @(negedge clk);
  endtask

  initial begin
    omega_e = 0; dt = 0; fault_phase = FAULT_PHASE_C;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 3500 r/min, 3 pole pairs: 1099.56 rad/s; dt = 1.25 us
    repeat (200) do_step(1099.5574, 1.25e-6, FAULT_PHASE_C);
    repeat (200) do_step(2042.0352, 1.25e-6, FAULT_PHASE_A);
    repeat (200) do_step(-314.159, 1.0e-6, FAULT_PHASE_B);
    // large steps to sweep the whole circle quickly
    repeat (300) do_step(20000.0 + $urandom_range(0, 5000), 50e-6, fault_phase_e'($urandom_range(0, 2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
