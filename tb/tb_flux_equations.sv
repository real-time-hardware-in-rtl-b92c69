// Testbench for flux_equations: random voltages, currents, angles, speeds and
// machine parameters are applied step by step while a floating-point model
// integrates eqs. (10a)-(10c) from the same values; the three flux states must
// agree. Covers the healthy case (fault_en low: i_f ignored, psi_f held), the
// faulted case, generator mode into a resistive load, re-initialisation, and the 8-cycle budget of the flux subsystem.
module tb_flux_equations;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, init = 0, start = 0, done, fault_en, gen_mode;
  q16_t v_alpha, v_beta, i_d, i_q, i_f, omega_e, r_load;
  trig_t sin_th, cos_th, sin_f, cos_f, mu;
  res_t rs, rf;
  dt_t dt;
  flux_t psi_d0, psi_q0, psi_f0, psi_d, psi_q, psi_f;
  int checks = 0, failures = 0;
  real md, mq, mf;

  flux_equations dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (rabs(got - exp) > tol) begin
      failures++;
      $display("FAIL %s got %.9f expected %.9f", what, got, exp);
    end
  endfunction

  task automatic do_step(input logic fen, input logic gm = 1'b0);
    real th, thf, va, vb, vd, vq, idr, iqr, ifr, w, rsr, rfr, mur, dts, sf, cf;
    int lat;
    th  = $urandom_range(0, 35999) / 36000.0 * 2.0 * PI;
    thf = $urandom_range(0, 35999) / 36000.0 * 2.0 * PI;
    @(negedge clk);
    v_alpha = r2q($urandom_range(0, 1200) - 600.0, 16);
    v_beta  = r2q($urandom_range(0, 1200) - 600.0, 16);
    sin_th  = r2q($sin(th), 30);  cos_th = r2q($cos(th), 30);
    sin_f   = r2q($sin(thf), 30); cos_f  = r2q($cos(thf), 30);
    i_d     = r2q(($urandom_range(0, 4000) - 2000.0) / 10.0, 16);
    i_q     = r2q(($urandom_range(0, 4000) - 2000.0) / 10.0, 16);
    i_f     = r2q(($urandom_range(0, 8000) - 4000.0) / 10.0, 16);
    omega_e = r2q($urandom_range(0, 4000) - 2000.0, 16);
    fault_en = fen;
    gen_mode = gm;
    start = 1;
    // model, from the quantised values the block sees
    va = q2r(v_alpha, 16); vb = q2r(v_beta, 16);
    vd = va * q2r(cos_th, 30) + vb * q2r(sin_th, 30);
    vq = vb * q2r(cos_th, 30) - va * q2r(sin_th, 30);
    if (gm) begin
      vd = -q2r(r_load, 16) * q2r(i_d, 16);
      vq = -q2r(r_load, 16) * q2r(i_q, 16);
    end
    idr = q2r(i_d, 16); iqr = q2r(i_q, 16); ifr = fen ? q2r(i_f, 16) : 0.0;
    w = q2r(omega_e, 16); rsr = q2r(rs, 24); rfr = q2r(rf, 24); mur = q2r(mu, 30);
    dts = real'(dt) / 4294967296.0;
    sf = q2r(sin_f, 30); cf = q2r(cos_f, 30);
    begin
      real nd, nq, nf;
      nd = md + dts * (vd - rsr * idr + w * mq + 2.0 / 3.0 * mur * rsr * sf * ifr);
      nq = mq + dts * (vq - rsr * iqr - w * md + 2.0 / 3.0 * mur * rsr * cf * ifr);
      nf = fen ? mf + dts * (rfr * ifr - mur * rsr * (idr * sf + iqr * cf - ifr)) : mf;
      md = nd; mq = nq; mf = nf;
    end
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat > 8) begin failures++; $display("FAIL latency %0d > 8", lat); end
    chk("psi_d", q2r(psi_d, 28), md, 2e-7);
    chk("psi_q", q2r(psi_q, 28), mq, 2e-7);
    chk("psi_f", q2r(psi_f, 28), mf, 2e-7);
    // resynchronise the model to the block so errors do not accumulate
    md = q2r(psi_d, 28); mq = q2r(psi_q, 28); mf = q2r(psi_f, 28);
    repeat ($urandom_range(0, 5)) @(negedge clk);
  endtask

  initial begin
    {v_alpha, v_beta, i_d, i_q, i_f, omega_e, sin_th, cos_th, sin_f, cos_f} = '0;
    fault_en = 0; gen_mode = 0; r_load = r2q(2.2, 16);
    rs = r2q(0.05, 24); rf = r2q(0.0055, 24); mu = r2q(2.0 / 36.0, 30);
    dt = 32'($rtoi(1.25e-6 * 4294967296.0));
    psi_d0 = r2q(0.08, 28); psi_q0 = r2q(-0.01, 28); psi_f0 = r2q(0.002, 28);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    chk("init d", q2r(psi_d, 28), 0.08, 1e-8);
    chk("init f", q2r(psi_f, 28), 0.002, 1e-8);
    md = q2r(psi_d, 28); mq = q2r(psi_q, 28); mf = q2r(psi_f, 28);
    repeat (300) do_step(1'b0);
    repeat (300) do_step(1'b1);
    rs = r2q(0.5, 24); rf = r2q(2.2, 24); mu = r2q(0.25, 30);
    dt = 32'($rtoi(10e-6 * 4294967296.0));
    repeat (300) do_step(1'($urandom));
    repeat (300) do_step(1'($urandom), 1'b1);
    r_load = r2q(0.69, 16);
    repeat (100) do_step(1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
