// pmsm_hil_emulator: real-time emulator of a PMSM drive with an inter-turn stator fault.
//
// The emulator stands in for an inverter and a permanent-magnet synchronous
// machine in hardware-in-the-loop tests of a motor controller. It takes the six
// gate signals of the controller, and gives back phase currents (as DAC codes)
// and a digital rotor angle. Inside, the machine is a flux-state model in the
// rotor dq frame with a third state for the shorted turns of one phase:
//   pwm_sampler         gate inputs sampled at 5 MHz
//   converter_emulation ideal inverter, switching state -> v_alpha, v_beta
//   angle_calc          theta += omega_e*dt, faulted-phase shift, CORDIC sin/cos
//   flux_equations      forward-Euler integration of psi_d, psi_q, psi_f
//   current_maps        three 4D look-up tables psi -> i_d, i_q, i_f
//   dq_to_abc           inverse Park and Clarke -> i_a, i_b, i_c
//   output_measure      DAC sampling at ~115 kS/s, angle word
//   fourier_tracker     second-harmonic magnitude of i_q, a fault indicator
// The four model subsystems run in parallel: step_scheduler pulses `step`
// every STEP_CYCLES clocks (50 clocks = 1.25 us at 40 MHz) and every subsystem
// starts on it using the values the others produced in the previous step, so
// each dependency adds one step of delay, as in the original design.
// cfg.gen_mode selects the machine's terminal connection: the inverter
// (motoring, driven by the controller's PWM) or a resistive load (generator
// mode at a speed set by cfg.omega_e, as in the validation tests).
// While `run` is low the flux states are held at cfg.psi_*0 and no steps occur;
// the host loads the three current maps through the lut_* port beforehand.
// fault_sample is the sampling strobe of the fault indicator (the controller's
// control rate); the indicator is fed with the emulated i_q. In the original it
// runs in the controller on measured currents; placing it here is this
// design's choice.
// Dead time is not modelled, so only the upper switch of each leg (the sampled
// `legs`) sets the inverter state; the sampler's full `gates` word and its
// strobe are left unconnected here.
//
// Timing: one emulation step per STEP_CYCLES clocks; every model output changes
// once per step. The DAC codes update every DAC_PERIOD clocks.
module pmsm_hil_emulator
  import pmsm_pkg::*;
#(
  parameter int STEP_CYCLES = 50,
  parameter int SAMPLE_DIV  = 8,
  parameter int DAC_PERIOD  = 349,
  parameter int N_PSI       = 12,
  parameter int N_THETA     = 61,
  parameter int ENTRY_W     = 16,
  parameter int MAP_FRAC    = 6,
  parameter int CORDIC_ITER = 30,
  parameter int FD_WINDOW   = 1024,
  localparam int AW         = $clog2(N_PSI * N_PSI * N_PSI * N_THETA)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  // controller side
  input  logic [5:0]         pwm_in,
  output logic signed [15:0] dac_code [3],
  output logic               dac_stb,
  output logic [15:0]        enc_angle,
  // host side
  input  emu_cfg_t           cfg,
  input  map_axis_t          axis_d,
  input  map_axis_t          axis_q,
  input  map_axis_t          axis_f,
  input  q16_t               dac_gain,
  input  logic               lut_we,
  input  map_sel_e           lut_sel,
  input  logic [AW-1:0]      lut_addr,
  input  logic [ENTRY_W-1:0] lut_wdata,
  // fault indicator
  input  logic               fault_sample,
  input  logic [31:0]        fault_f,
  output q16_t               fault_mag,
  output logic               fault_mag_valid,
  // model state, for monitoring
  output logic               step,
  output logic [31:0]        step_count,
  output logic [2:0]         sw_state,
  output q16_t               v_alpha,
  output q16_t               v_beta,
  output angle_t             theta,
  output flux_t              psi [3],      // d, q, f
  output q16_t               i_dqf [3],    // d, q, f
  output q16_t               i_abc [3]
);
  logic [5:0]  gates;
  logic [2:0]  legs;
  logic        pwm_stb;
  logic        ang_done, flux_done, map_done, abc_done;
  angle_t      theta_fault;
  trig_t       sin_th, cos_th, sin_f, cos_f, sin_2th, cos_2th;
  q16_t        i_f_model;

  step_scheduler #(.STEP_CYCLES(STEP_CYCLES)) u_step (
    .clk, .rst_n, .run, .step, .step_count
  );

  pwm_sampler #(.SAMPLE_DIV(SAMPLE_DIV)) u_pwm (
    .clk, .rst_n, .pwm_in, .gates, .legs, .sample_stb(pwm_stb)
  );

  converter_emulation u_conv (
    .clk, .rst_n, .legs, .vdc(cfg.vdc), .state(sw_state), .v_alpha, .v_beta
  );

  angle_calc #(.ITER(CORDIC_ITER)) u_angle (
    .clk, .rst_n, .start(step), .omega_e(cfg.omega_e), .dt(cfg.dt),
    .fault_phase(cfg.fault_phase), .done(ang_done), .theta, .theta_fault,
    .sin_th, .cos_th, .sin_f, .cos_f, .sin_2th, .cos_2th
  );

  flux_equations u_flux (
    .clk, .rst_n, .init(!run), .start(step), .v_alpha, .v_beta,
    .sin_th, .cos_th, .sin_f, .cos_f,
    .i_d(i_dqf[0]), .i_q(i_dqf[1]), .i_f(i_f_model), .omega_e(cfg.omega_e),
    .rs(cfg.rs), .rf(cfg.rf), .mu(cfg.mu), .fault_en(cfg.fault_en),
    .gen_mode(cfg.gen_mode), .r_load(cfg.r_load), .dt(cfg.dt),
    .psi_d0(cfg.psi_d0), .psi_q0(cfg.psi_q0), .psi_f0(cfg.psi_f0),
    .done(flux_done), .psi_d(psi[0]), .psi_q(psi[1]), .psi_f(psi[2])
  );

  current_maps #(.N_PSI(N_PSI), .N_THETA(N_THETA), .ENTRY_W(ENTRY_W), .MAP_FRAC(MAP_FRAC)) u_maps (
    .clk, .rst_n, .start(step), .psi_d(psi[0]), .psi_q(psi[1]), .psi_f(psi[2]),
    .theta(theta_fault), .axis_d, .axis_q, .axis_f,
    .lut_we, .lut_sel, .lut_addr, .lut_wdata,
    .done(map_done), .i_d(i_dqf[0]), .i_q(i_dqf[1]), .i_f(i_f_model)
  );

  dq_to_abc u_abc (
    .clk, .rst_n, .start(step), .i_d(i_dqf[0]), .i_q(i_dqf[1]),
    .sin_th, .cos_th, .done(abc_done), .i_a(i_abc[0]), .i_b(i_abc[1]), .i_c(i_abc[2])
  );

  output_measure #(.DAC_PERIOD(DAC_PERIOD), .DAC_W(16), .ENC_W(16)) u_out (
    .clk, .rst_n, .i_abc, .dac_gain, .theta, .dac_code, .dac_stb, .enc_angle
  );

  fourier_tracker #(.WINDOW(FD_WINDOW)) u_fd (
    .clk, .rst_n, .sample(fault_sample), .i_q(i_dqf[1]), .sin_2th, .cos_2th,
    .f(fault_f), .done(fault_mag_valid), .mag(fault_mag)
  );

  // The fault current is zero in a healthy machine.
  assign i_dqf[2] = cfg.fault_en ? i_f_model : '0;

  // Every subsystem must finish within one step: none may still be working
  // when the next step begins.
  logic ang_pend, flux_pend, map_pend, abc_pend;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {ang_pend, flux_pend, map_pend, abc_pend} <= '0;
    else begin
      ang_pend  <= step ? 1'b1 : (ang_done  ? 1'b0 : ang_pend);
      flux_pend <= step ? 1'b1 : (flux_done ? 1'b0 : flux_pend);
      map_pend  <= step ? 1'b1 : (map_done  ? 1'b0 : map_pend);
      abc_pend  <= step ? 1'b1 : (abc_done  ? 1'b0 : abc_pend);
    end
  end
  a_step_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                step |-> !(ang_pend || flux_pend || map_pend || abc_pend));
endmodule
