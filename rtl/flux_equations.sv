// flux_equations: forward-Euler integration of the dq and fault-coil flux linkages.
//
// The PMSM with an inter-turn short circuit is modelled in the rotor dq frame
// with three flux states: psi_d, psi_q and psi_f, the flux of the shorted turns.
// Each emulation step (pulse on `start`) computes
//   psi_d += dt * ( v_d - Rs*i_d + w*psi_q + 2/3*mu*Rs*sin(thf)*i_f )
//   psi_q += dt * ( v_q - Rs*i_q - w*psi_d + 2/3*mu*Rs*cos(thf)*i_f )
//   psi_f += dt * ( Rf*i_f - mu*Rs*( i_d*sin(thf) + i_q*cos(thf) - i_f ) )
// with thf = theta_fault + 2*pi/3. In motoring mode v_d, v_q are the Park
// transform of the inverter voltages v_alpha, v_beta at the rotor angle. In
// generator mode (gen_mode high) the terminals feed a balanced star-connected
// resistive load, so v_d = -R_load*i_d and v_q = -R_load*i_q; the original
// design is validated in this mode but does not describe its implementation,
// so this form is this design's own. The equations are the
// original design's; the voltage across the shorted turns is taken as Rf*i_f,
// the short-circuit resistance.
// The pipeline (this design's own arrangement) has four register stages:
//   1 Park transform, R*i, w*psi, mu*Rs and the fault-angle products
//   2 products with mu*Rs and Rf*i_f
//   3 the three bracketed sums, in volts
//   4 multiply by dt and accumulate
// With fault_en low the machine is healthy: i_f is taken as zero in all three
// equations and psi_f is held at its initial value (this design's choice; the
// original does not say how the healthy case is run).
// `init` (or reset) loads psi_d0/psi_q0/psi_f0.
//
// Interface: voltages/currents/speed/load resistance Q16.16, flux Q4.28, resistances Q8.24,
// mu and trig Q2.30, dt unsigned Q0.32 s. Timing: `done` pulses 4 cycles after
// `start` (the original's flux block takes 8); the psi outputs update with it.
module flux_equations
  import pmsm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  logic  start,
  input  q16_t  v_alpha,
  input  q16_t  v_beta,
  input  trig_t sin_th,
  input  trig_t cos_th,
  input  trig_t sin_f,
  input  trig_t cos_f,
  input  q16_t  i_d,
  input  q16_t  i_q,
  input  q16_t  i_f,
  input  q16_t  omega_e,
  input  res_t  rs,
  input  res_t  rf,
  input  trig_t mu,
  input  logic  fault_en,
  input  logic  gen_mode,
  input  q16_t  r_load,
  input  dt_t   dt,
  input  flux_t psi_d0,
  input  flux_t psi_q0,
  input  flux_t psi_f0,
  output logic  done,
  output flux_t psi_d,
  output flux_t psi_q,
  output flux_t psi_f
);
  logic [2:0] vld;
  q16_t  ifx;                                  // fault current as seen by the model
  // stage 1
  q16_t  vd1, vq1, rsid1, rsiq1, wpq1, wpd1, ifs1, ifc1, fb1, if1;
  res_t  murs1;
  // stage 2
  q16_t  vd2, vq2, rsid2, rsiq2, wpq2, wpd2, td2, tq2, tf2, rfif2;
  // stage 3
  logic signed [33:0] sd3, sq3, sf3;

  assign ifx = fault_en ? i_f : '0;

  function automatic q16_t dpsi(input logic signed [33:0] v);
    logic signed [67:0] p;
    p = 68'(v) * 68'(signed'({1'b0, dt}));    // Q16.48 Wb
    return 32'(p >>> (48 - FLUX_FRAC));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld   <= '0;
      done  <= 1'b0;
      psi_d <= '0;
      psi_q <= '0;
      psi_f <= '0;
      {vd1, vq1, rsid1, rsiq1, wpq1, wpd1, ifs1, ifc1, fb1, if1, murs1} <= '0;
      {vd2, vq2, rsid2, rsiq2, wpq2, wpd2, td2, tq2, tf2, rfif2} <= '0;
      {sd3, sq3, sf3} <= '0;
    end else begin
      vld  <= {vld[1:0], start};
      done <= vld[2];
      // stage 1
      if (gen_mode) begin
        vd1 <= -fmul(r_load, i_d, CUR_FRAC);
        vq1 <= -fmul(r_load, i_q, CUR_FRAC);
      end else begin
        vd1 <= fmul(v_alpha, cos_th, TRIG_FRAC) + fmul(v_beta, sin_th, TRIG_FRAC);
        vq1 <= fmul(v_beta, cos_th, TRIG_FRAC) - fmul(v_alpha, sin_th, TRIG_FRAC);
      end
      rsid1 <= fmul(rs, i_d, RES_FRAC);
      rsiq1 <= fmul(rs, i_q, RES_FRAC);
      wpq1  <= fmul(omega_e, psi_q, FLUX_FRAC);
      wpd1  <= fmul(omega_e, psi_d, FLUX_FRAC);
      ifs1  <= fmul(ifx, sin_f, TRIG_FRAC);
      ifc1  <= fmul(ifx, cos_f, TRIG_FRAC);
      fb1   <= fmul(i_d, sin_f, TRIG_FRAC) + fmul(i_q, cos_f, TRIG_FRAC) - ifx;
      if1   <= ifx;
      murs1 <= fmul(mu, rs, TRIG_FRAC);
      // stage 2
      vd2   <= vd1;
      vq2   <= vq1;
      rsid2 <= rsid1;
      rsiq2 <= rsiq1;
      wpq2  <= wpq1;
      wpd2  <= wpd1;
      td2   <= fmul(fmul(murs1, TWO_THIRDS, TRIG_FRAC), ifs1, RES_FRAC);
      tq2   <= fmul(fmul(murs1, TWO_THIRDS, TRIG_FRAC), ifc1, RES_FRAC);
      tf2   <= fmul(murs1, fb1, RES_FRAC);
      rfif2 <= fmul(rf, if1, RES_FRAC);
      // stage 3
      sd3 <= 34'(vd2) - 34'(rsid2) + 34'(wpq2) + 34'(td2);
      sq3 <= 34'(vq2) - 34'(rsiq2) - 34'(wpd2) + 34'(tq2);
      sf3 <= 34'(rfif2) - 34'(tf2);
      // stage 4
      if (init) begin
        psi_d <= psi_d0;
        psi_q <= psi_q0;
        psi_f <= psi_f0;
      end else if (vld[2]) begin
        psi_d <= psi_d + dpsi(sd3);
        psi_q <= psi_q + dpsi(sq3);
        if (fault_en) psi_f <= psi_f + dpsi(sf3);
      end
    end
  end
endmodule
