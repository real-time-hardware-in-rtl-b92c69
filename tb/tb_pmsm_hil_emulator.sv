// End-to-end testbench of pmsm_hil_emulator at its default sizes (12 x 12 x 12 x 61
// maps, 50-clock steps, 349-clock DAC period, 1024-sample fault-indicator window).
//
// The testbench plays the controller and the host. It loads the three current
// maps with affine functions of the grid indices (a linear machine: i_d from
// psi_d with a small psi_f coupling, i_q from psi_q, i_f from psi_f and psi_d),
// runs the machine at 1227 rad/s as a generator into a 2.2 ohm resistive load,
// healthy and then with a fault in phase c, and then switches to motoring:
// sine-triangle PWM at a 10 kHz carrier, referenced to the angle word the
// emulator returns, with the fault moved to phase a and then b.
//
// Every emulation step is checked against a floating-point model of one step of
// the parallel schedule: from the state seen at the step pulse it predicts the
// new angle, the three flux states (eqs. 10a-c), the three map currents and the
// phase currents, and compares them before the next step. The converter is
// checked against the gate pattern, the DAC codes against the phase currents,
// and the fault indicator against a sliding Fourier sum of the i_q samples.
// Mechanisms counted (each must occur): emulation steps, each of the 8
// switching states, PWM samples reaching the converter, the healthy-to-fault
// switch, each faulted phase, generator and motoring steps and the switch
// between them, DAC updates, fault-indicator updates.
module tb_pmsm_hil_emulator;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NP = 12, NT = 61, DEPTH = NP * NP * NP * NT, AW = $clog2(DEPTH);
  localparam int W = 1024;               // fault indicator window
  localparam int FS_PERIOD = 200;        // fault indicator sampling period, clocks
  localparam int CARRIER = 4000;         // PWM carrier period, clocks (10 kHz)

  logic clk = 0, rst_n = 0, run = 0;
  logic [5:0] pwm_in;
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
  logic [31:0] fault_f;
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
  int n_steps = 0, n_gen = 0, n_mot = 0, n_mode_sw = 0, n_states [8], n_fault_on = 0, n_phase [3], n_dac = 0, n_fd = 0, n_pwm = 0;
  int c [3][5] = '{'{-16000, 2327, 0, 50, 0}, '{-8533, 0, 1551, 0, 3}, '{6400, 20, 0, -1164, 0}};
  real pmin [3] = '{-0.2, -0.2, -0.004};
  real pstep[3] = '{0.4 / 11.0, 0.4 / 11.0, 0.008 / 11.0};
  real carrier = -1.0, car_dir = 1.0;

  initial begin
    repeat (3_000_000) @(posedge clk);
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
    real r = t - $floor(t);
    return (r >= 0.5) ? r - 1.0 : r;
  endfunction

  function automatic real gclamp(input real g, input int n);
    if (g < 0.0) return 0.0;
    if (g > n - 1) return n - 1;
    return g;
  endfunction

  function automatic real shift_of(input fault_phase_e fp);
    return (fp == FAULT_PHASE_A) ? 1.0 / 3.0 : (fp == FAULT_PHASE_B) ? 2.0 / 3.0 : 0.0;
  endfunction

  // ---------------- controller: sine-triangle PWM from the angle feedback -------
  always @(negedge clk) if (run) begin
    real th, m;
    logic [2:0] up;
    carrier += car_dir * 4.0 / CARRIER;
    if (carrier >= 1.0) car_dir = -1.0;
    if (carrier <= -1.0) car_dir = 1.0;
    th = enc_angle / 65536.0 * 2.0 * PI;
    m = 0.65;
    for (int k = 0; k < 3; k++) up[k] = (m * $cos(th + PI / 2.0 - k * 2.0 * PI / 3.0) > carrier);
    pwm_in = {~up[2], up[2], ~up[1], up[1], ~up[0], up[0]};
  end

  // ---------------- converter check: state follows a steady gate pattern --------
  logic [5:0] pwm_hist [16];
  always @(negedge clk) begin
    logic steady;
    for (int k = 15; k > 0; k--) pwm_hist[k] = pwm_hist[k - 1];
    pwm_hist[0] = pwm_in;
    steady = 1;
    for (int k = 1; k < 16; k++) if (pwm_hist[k] != pwm_hist[0]) steady = 0;
    if (run && rst_n && steady) begin
      logic a, b, cc;
      int exp_st;
      real va, vb, vdc;
      int t [8];
      t = '{0, 5, 3, 4, 1, 6, 2, 7};
      a = pwm_hist[0][0]; b = pwm_hist[0][2]; cc = pwm_hist[0][4];
      exp_st = t[{a, b, cc}];
      vdc = q2r(cfg.vdc, 16);
      va = vdc * (2.0 * a - b - cc) / 3.0;
      vb = vdc * (1.0 * b - cc) / $sqrt(3.0);
      checks++;
      if (int'(sw_state) != exp_st || rabs(q2r(v_alpha, 16) - va) > 1e-3 || rabs(q2r(v_beta, 16) - vb) > 1e-3) begin
        failures++;
        if (failures < 30) $display("FAIL converter state %0d exp %0d", sw_state, exp_st);
      end
      n_states[sw_state]++;
    end
  end
  always @(posedge clk) if (dut.u_pwm.sample_stb) n_pwm++;

  // ---------------- per-step reference model ----------------------------------
  logic have_pred = 0;
  real e_th, e_psi [3], e_i [3], e_abc [3];

  always @(negedge clk) if (rst_n && step) begin
    real th, thf, sd, cd, sf, cf, vd, vq, ip [3], ps [3], w, dts, rsr, rfr, mur, ifx, g [4];
    // results of the previous step
    if (have_pred) begin
      chk("theta", wrapd(real'(theta) / 4294967296.0 - e_th), 0.0, 1e-7);
      for (int k = 0; k < 3; k++) chk($sformatf("psi%0d", k), q2r(psi[k], 28), e_psi[k], 3e-7);
      chk("i_d", q2r(i_dqf[0], 16), e_i[0], 0.02);
      chk("i_q", q2r(i_dqf[1], 16), e_i[1], 0.02);
      chk("i_f", q2r(i_dqf[2], 16), cfg.fault_en ? e_i[2] : 0.0, 0.02);
      for (int k = 0; k < 3; k++) chk($sformatf("i_abc%0d", k), q2r(i_abc[k], 16), e_abc[k], 0.02);
    end
    n_steps++;
    // prediction for this step, from what the subsystems see now
    th  = real'(theta) / 4294967296.0;
    thf = th - shift_of(cfg.fault_phase);   // the phase in force when the angle block last finished
    sd = $sin(2.0 * PI * th); cd = $cos(2.0 * PI * th);
    sf = $sin(2.0 * PI * thf + 2.0 * PI / 3.0); cf = $cos(2.0 * PI * thf + 2.0 * PI / 3.0);
    vd = q2r(v_alpha, 16) * cd + q2r(v_beta, 16) * sd;
    vq = q2r(v_beta, 16) * cd - q2r(v_alpha, 16) * sd;
    if (cfg.gen_mode) begin
      vd = -q2r(cfg.r_load, 16) * q2r(i_dqf[0], 16);
      vq = -q2r(cfg.r_load, 16) * q2r(i_dqf[1], 16);
      n_gen++;
    end else n_mot++;
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
    g[3] = (thf - $floor(thf)) * (NT - 1);
    for (int m = 0; m < 3; m++)
      e_i[m] = (c[m][0] + c[m][1] * g[0] + c[m][2] * g[1] + c[m][3] * g[2] + c[m][4] * g[3]) / 64.0;
    for (int k = 0; k < 3; k++)
      e_abc[k] = ip[0] * $cos(2.0 * PI * th - k * 2.0 * PI / 3.0) - ip[1] * $sin(2.0 * PI * th - k * 2.0 * PI / 3.0);
    have_pred = 1;
    if (cfg.fault_en) n_phase[cfg.fault_phase]++;
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

  // ---------------- fault indicator: sampling and check -----------------------
  real hs [$], hc [$], fd_exp;
  int fs_cnt = 0;
  always @(negedge clk) begin
    fault_sample = 0;
    if (run) begin
      fs_cnt++;
      if (fs_cnt == FS_PERIOD) begin
        real th2, s, cs;
        fs_cnt = 0;
        fault_sample = 1;
        th2 = 2.0 * 2.0 * PI * real'(theta) / 4294967296.0;
        hs.push_back(q2r(i_dqf[1], 16) * $sin(th2));
        hc.push_back(q2r(i_dqf[1], 16) * $cos(th2));
        if (hs.size() > W) begin void'(hs.pop_front()); void'(hc.pop_front()); end
        s = 0; cs = 0;
        foreach (hs[k]) begin s += hs[k]; cs += hc[k]; end
        fd_exp = 2.0 / W * $sqrt(s * s + cs * cs);
      end
    end
    if (rst_n && fault_mag_valid) begin
      n_fd++;
      chk("fault indicator", q2r(fault_mag, 16), fd_exp, 0.01 + 0.01 * fd_exp);
    end
  end

  // ---------------- sequence --------------------------------------------------
  task automatic run_steps(input int n);
    int target = n_steps + n;
    while (n_steps < target) @(negedge clk);
  endtask

  initial begin
    real fd_healthy, fd_fault;
    pwm_in = 6'b010101;
    lut_sel = MAP_ID; lut_addr = 0; lut_wdata = 0;
    cfg = '0;
    cfg.rs = r2q(0.05, 24); cfg.rf = r2q(0.0055, 24); cfg.mu = r2q(2.0 / 36.0, 30);
    cfg.fault_en = 0; cfg.fault_phase = FAULT_PHASE_C;
    cfg.dt = 32'($rtoi(1.25e-6 * 4294967296.0));
    cfg.vdc = r2q(200.0, 16); cfg.omega_e = r2q(2.0 * PI / (W * FS_PERIOD * 25e-9), 16);
    cfg.gen_mode = 1; cfg.r_load = r2q(2.2, 16);
    cfg.psi_d0 = r2q(0.05, 28); cfg.psi_q0 = 0; cfg.psi_f0 = 0;
    axis_d = '{psi_min: r2q(pmin[0], 28), inv_step: r2q(1.0 / pstep[0], 16)};
    axis_q = '{psi_min: r2q(pmin[1], 28), inv_step: r2q(1.0 / pstep[1], 16)};
    axis_f = '{psi_min: r2q(pmin[2], 28), inv_step: r2q(1.0 / pstep[2], 16)};
    dac_gain = r2q(100.0, 16);
    fault_f = 32'($rtoi(2.0 / W * 4294967296.0));
    repeat (3) @(posedge clk);
    rst_n = 1;
    // host loads the three maps
    for (int m = 0; m < 3; m++)
      for (int a = 0; a < DEPTH; a++) begin
        int ix, iy, iz, it;
        ix = a % NP; iy = (a / NP) % NP; iz = (a / (NP * NP)) % NP; it = a / (NP * NP * NP);
        @(negedge clk);
        lut_we = 1; lut_sel = map_sel_e'(m); lut_addr = AW'(a);
        lut_wdata = 16'(c[m][0] + c[m][1] * ix + c[m][2] * iy + c[m][3] * iz + c[m][4] * it);
      end
    @(negedge clk); lut_we = 0;
    run = 1;
    run_steps(W * FS_PERIOD / 50);               // generator, healthy, one indicator window
    fd_healthy = q2r(fault_mag, 16);
    @(negedge step); cfg.fault_en = 1; n_fault_on++;
    run_steps(W * FS_PERIOD / 50);               // generator, fault in phase c
    fd_fault = q2r(fault_mag, 16);
    @(negedge step); cfg.gen_mode = 0; n_mode_sw++;
    run_steps(W * FS_PERIOD / 50);               // motoring, fault in phase c
    @(negedge step); cfg.fault_phase = FAULT_PHASE_A;
    run_steps(1000);
    @(negedge step); cfg.fault_phase = FAULT_PHASE_B;
    run_steps(1000);
    $display("generator steps %0d, motoring steps %0d", n_gen, n_mot);
    $display("steps %0d, pwm samples %0d, dac updates %0d, indicator updates %0d", n_steps, n_pwm, n_dac, n_fd);
    $display("switching states seen %p, fault steps per phase %p", n_states, n_phase);
    $display("indicator healthy %f A, faulted %f A, psi_f %f Wb, i_f %f A", fd_healthy, fd_fault,
             q2r(psi[2], 28), q2r(i_dqf[2], 16));
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (n_states[k] == 0) begin failures++; $display("FAIL switching state %0d never seen", k); end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_phase[k] == 0) begin failures++; $display("FAIL faulted phase %0d never used", k); end
    end
    checks++; if (n_steps == 0 || n_pwm == 0) begin failures++; $display("FAIL no steps / pwm samples"); end
    checks++; if (n_gen == 0 || n_mot == 0 || n_mode_sw == 0) begin failures++; $display("FAIL mode switch not exercised"); end
    checks++; if (n_fault_on == 0) begin failures++; $display("FAIL fault never switched on"); end
    checks++; if (n_dac == 0) begin failures++; $display("FAIL no DAC update"); end
    checks++; if (n_fd == 0) begin failures++; $display("FAIL no indicator update"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
