// Generator-mode sweep of pmsm_hil_emulator at its default sizes: the emulated
// machine is held at a fixed speed, as on a dynamometer, feeds a three-phase
// resistive load, and an inter-turn fault in phase c is switched on part-way
// through. This is the set of operating points the original design was
// validated on: 500, 1500, 3500, 5500 and 6500 r/min of a 6-pole machine
// (omega_e = n * 2*pi/60 * 3), loads of 2.2 ohm and 0.69 ohm, and a near-open
// circuit. The near-open case uses 500 ohm, because this design models the
// load as a finite resistance (its own choice).
//
// The current maps are loaded with affine functions of the grid indices,
// giving a linear machine: L_d = L_q = 1 mH, 0.05 Wb magnet flux, and a fault
// coil of 40 uH. The maps are the testbench's, not finite-element data. Each
// operating point starts from the magnet flux with run low. It then runs
// healthy for HEALTHY_STEPS and faulted for FAULT_STEPS. Every emulation step
// is checked against a floating-point model of one step of the parallel
// schedule (angle, eqs. for psi_d/psi_q/psi_f, map currents, phase currents),
// and every DAC update against the phase currents. For each point the peak
// and rms fault current are printed. The test counts as failures:
//   - an operating point where the faulted run produced no fault current;
//   - a healthy run where the fault current was not zero;
//   - a point that never ran.
// Timing: steps every 50 clocks, DAC updates every 349 clocks; both counted.
module tb_generator_sweep;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NP = 12, NT = 61, DEPTH = NP * NP * NP * NT, AW = $clog2(DEPTH);
  localparam int HEALTHY_STEPS = 800, FAULT_STEPS = 1600;
  localparam int N_SPEED = 5, N_LOAD = 3;

  logic clk = 0, rst_n = 0, run = 0;
  logic [5:0] pwm_in = 6'b010101;
  logic signed [15:0] dac_code [3];
  logic dac_stb;
  logic [15:0] enc_angle;
  emu_cfg_t cfg;
  map_axis_t axis_d, axis_q, axis_f;
  q16_t dac_gain;
  logic lut_we = 0;
  map_sel_e lut_sel;
  logic [AW-1:0] lut_addr;
  logic [15:0] lut_wdata;
  logic fault_sample = 0;
  logic [31:0] fault_f = 0;
  q16_t fault_mag;
  logic fault_mag_valid, step;
  logic [31:0] step_count;
  logic [2:0] sw_state;
  q16_t v_alpha, v_beta;
  angle_t theta;
  flux_t psi [3];
  q16_t i_dqf [3], i_abc [3];

  pmsm_hil_emulator dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_steps = 0, n_dac = 0, n_points = 0;
  int c [3][5] = '{'{-16000, 2327, 0, 50, 0}, '{-8533, 0, 1551, 0, 3}, '{6400, 20, 0, -1164, 0}};
  real pmin [3] = '{-0.2, -0.2, -0.004};
  real pstep[3] = '{0.4 / 11.0, 0.4 / 11.0, 0.008 / 11.0};
  real rpm [N_SPEED] = '{500.0, 1500.0, 3500.0, 5500.0, 6500.0};
  real rload [N_LOAD] = '{2.2, 0.69, 500.0};

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (rabs(got - exp) > tol) begin
      failures++;
      if (failures < 30) $display("FAIL step %0d %s got %.7f expected %.7f", n_steps, what, got, exp);
    end
  endfunction

  function automatic real wrapd(input real t);
    real r;
    r = t - $floor(t);
    return (r >= 0.5) ? r - 1.0 : r;
  endfunction

  function automatic real gclamp(input real g, input int n);
    if (g < 0.0) return 0.0;
    if (g > n - 1) return n - 1;
    return g;
  endfunction

  // ---------------- per-step reference model ----------------------------------
  logic have_pred = 0;
  real e_th, e_psi [3], e_i [3], e_abc [3];
  real if_peak, if_sq;
  int  if_n;

  always @(negedge clk) if (rst_n && step) begin
    real th, sf, cf, vd, vq, ip [3], ps [3], w, dts, rsr, rfr, mur, ifx, g [4];
    if (have_pred) begin
      chk("theta", wrapd(real'(theta) / 4294967296.0 - e_th), 0.0, 1e-7);
      for (int k = 0; k < 3; k++) chk($sformatf("psi%0d", k), q2r(psi[k], 28), e_psi[k], 3e-7);
      chk("i_d", q2r(i_dqf[0], 16), e_i[0], 0.02);
      chk("i_q", q2r(i_dqf[1], 16), e_i[1], 0.02);
      chk("i_f", q2r(i_dqf[2], 16), cfg.fault_en ? e_i[2] : 0.0, 0.02);
      for (int k = 0; k < 3; k++) chk($sformatf("i_abc%0d", k), q2r(i_abc[k], 16), e_abc[k], 0.02);
    end
    n_steps++;
    if (cfg.fault_en) begin
      if (rabs(q2r(i_dqf[2], 16)) > if_peak) if_peak = rabs(q2r(i_dqf[2], 16));
      if_sq += q2r(i_dqf[2], 16) ** 2;
      if_n++;
    end else begin
      checks++;
      if (i_dqf[2] != 0) begin failures++; $display("FAIL healthy fault current %f", q2r(i_dqf[2], 16)); end
    end
    th  = real'(theta) / 4294967296.0;
    sf = $sin(2.0 * PI * th + 2.0 * PI / 3.0); cf = $cos(2.0 * PI * th + 2.0 * PI / 3.0);
    vd = -q2r(cfg.r_load, 16) * q2r(i_dqf[0], 16);
    vq = -q2r(cfg.r_load, 16) * q2r(i_dqf[1], 16);
    for (int k = 0; k < 3; k++) ps[k] = q2r(psi[k], 28);
    ip[0] = q2r(i_dqf[0], 16); ip[1] = q2r(i_dqf[1], 16); ip[2] = q2r(dut.i_f_model, 16);
    w = q2r(cfg.omega_e, 16); dts = real'(cfg.dt) / 4294967296.0;
    rsr = q2r(cfg.rs, 24); rfr = q2r(cfg.rf, 24); mur = q2r(cfg.mu, 30);
    ifx = cfg.fault_en ? ip[2] : 0.0;
    e_th = th + w * dts / (2.0 * PI);
    e_psi[0] = ps[0] + dts * (vd - rsr * ip[0] + w * ps[1] + 2.0 / 3.0 * mur * rsr * sf * ifx);
    e_psi[1] = ps[1] + dts * (vq - rsr * ip[1] - w * ps[0] + 2.0 / 3.0 * mur * rsr * cf * ifx);
    e_psi[2] = cfg.fault_en ? ps[2] + dts * (rfr * ifx - mur * rsr * (ip[0] * sf + ip[1] * cf - ifx)) : ps[2];
    for (int k = 0; k < 3; k++) g[k] = gclamp((ps[k] - pmin[k]) / pstep[k], NP);
    g[3] = (th - $floor(th)) * (NT - 1);
    for (int m = 0; m < 3; m++)
      e_i[m] = (c[m][0] + c[m][1] * g[0] + c[m][2] * g[1] + c[m][3] * g[2] + c[m][4] * g[3]) / 64.0;
    for (int k = 0; k < 3; k++)
      e_abc[k] = ip[0] * $cos(2.0 * PI * th - k * 2.0 * PI / 3.0) - ip[1] * $sin(2.0 * PI * th - k * 2.0 * PI / 3.0);
    have_pred = 1;
  end

  // ---------------- DAC check -------------------------------------------------
  q16_t abc_prev [3];
  always @(negedge clk) begin
    if (rst_n && dac_stb) begin
      n_dac++;
      for (int k = 0; k < 3; k++) begin
        real e;
        e = $floor(q2r(abc_prev[k], 16) * q2r(dac_gain, 16));
        if (e > 32767.0) e = 32767.0;
        if (e < -32768.0) e = -32768.0;
        checks++;
        if (real'(dac_code[k]) != e) begin
          failures++;
          if (failures < 30) $display("FAIL dac %0d got %0d expected %f", k, dac_code[k], e);
        end
      end
    end
    for (int k = 0; k < 3; k++) abc_prev[k] = i_abc[k];
  end

  // ---------------- sequence --------------------------------------------------
  task automatic run_steps(input int n);
    int target;
    target = n_steps + n;
    while (n_steps < target) @(negedge clk);
  endtask

  initial begin
    int steps0, dac0;
    lut_sel = MAP_ID; lut_addr = 0; lut_wdata = 0;
    cfg = '0;
    cfg.rs = r2q(0.05, 24); cfg.rf = r2q(0.0055, 24); cfg.mu = r2q(2.0 / 36.0, 30);
    cfg.fault_en = 0; cfg.fault_phase = FAULT_PHASE_C;
    cfg.dt = 32'($rtoi(1.25e-6 * 4294967296.0));
    cfg.vdc = r2q(200.0, 16);
    cfg.gen_mode = 1;
    cfg.psi_d0 = r2q(0.05, 28); cfg.psi_q0 = 0; cfg.psi_f0 = 0;
    axis_d = '{psi_min: r2q(pmin[0], 28), inv_step: r2q(1.0 / pstep[0], 16)};
    axis_q = '{psi_min: r2q(pmin[1], 28), inv_step: r2q(1.0 / pstep[1], 16)};
    axis_f = '{psi_min: r2q(pmin[2], 28), inv_step: r2q(1.0 / pstep[2], 16)};
    dac_gain = r2q(100.0, 16);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++)
      for (int a = 0; a < DEPTH; a++) begin
        int ix, iy, iz, it;
        ix = a % NP; iy = (a / NP) % NP; iz = (a / (NP * NP)) % NP; it = a / (NP * NP * NP);
        @(negedge clk);
        lut_we = 1; lut_sel = map_sel_e'(m); lut_addr = AW'(a);
        lut_wdata = 16'(c[m][0] + c[m][1] * ix + c[m][2] * iy + c[m][3] * iz + c[m][4] * it);
      end
    @(negedge clk); lut_we = 0;
    $display("   r/min  load/ohm  peak i_f/A  rms i_f/A");
    for (int l = 0; l < N_LOAD; l++)
      for (int s = 0; s < N_SPEED; s++) begin
        // stop, reload the initial flux, set the operating point
        @(negedge clk); run = 0;
        repeat (60) @(negedge clk);
        have_pred = 0;
        cfg.fault_en = 0;
        cfg.omega_e = r2q(rpm[s] * 2.0 * PI / 60.0 * 3.0, 16);
        cfg.r_load = r2q(rload[l], 16);
        if_peak = 0.0; if_sq = 0.0; if_n = 0;
        steps0 = n_steps; dac0 = n_dac;
        run = 1;
        run_steps(HEALTHY_STEPS);
        @(negedge step); cfg.fault_en = 1;
        run_steps(FAULT_STEPS);
        $display("%8.0f  %8.2f  %10.3f  %9.3f", rpm[s], rload[l], if_peak, $sqrt(if_sq / if_n));
        n_points++;
        checks++;
        if (if_peak < 0.1) begin failures++; $display("FAIL no fault current at %f r/min, %f ohm", rpm[s], rload[l]); end
        // rates: 50 clocks per step, 349 clocks per DAC update
        checks++;
        if (rabs(real'(n_dac - dac0) - real'(n_steps - steps0) * 50.0 / 349.0) > 2.0) begin
          failures++; $display("FAIL DAC rate: %0d updates in %0d steps", n_dac - dac0, n_steps - steps0);
        end
      end
    checks++;
    if (n_points != N_SPEED * N_LOAD) begin failures++; $display("FAIL only %0d operating points", n_points); end
    $display("steps %0d, dac updates %0d, operating points %0d", n_steps, n_dac, n_points);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
