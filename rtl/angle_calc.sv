// angle_calc: rotor-angle integration and the sines and cosines the model needs.
//
// Each emulation step (pulse on `start`) the electrical angle is advanced by
// omega_e * dt, the forward-Euler integral of the speed, in a 48-bit phase
// accumulator (32 bits of binary angle plus 16 guard bits that keep the
// per-step rounding from drifting). The speed is an input: the emulated
// machine runs at the speed imposed by the dynamometer, as in the original
// set-up. Two CORDIC units then run in parallel:
//   * on theta, giving sin/cos for the Park and inverse Park transforms;
//   * on theta_fault + 2*pi/3, giving the sin/cos of the fault terms of the
//     flux equations, where theta_fault is theta shifted by the faulted
//     phase (eq. 9): -2*pi/3 for phase a, -4*pi/3 for phase b, 0 for phase c.
// theta_fault is also the angle at which the current maps are read, since the
// maps describe a fault in phase c. The dq quantities themselves do not depend
// on which phase is labelled "c", so the Park transforms use the unshifted angle.
// sin(2*theta) and cos(2*theta) for the harmonic tracker are formed from the
// first CORDIC by the double-angle identities.
//
// Interface: omega_e Q16.16 rad/s, dt unsigned Q0.32 s, angles as binary angles
// (2^32 = 2*pi), trig outputs Q2.30. Timing: `done` is high ITER + 8 cycles after
// the cycle in which `start` is high (38 cycles for ITER = 30, inside the 43-cycle budget of the original
// angle block); all outputs change together on done and hold until the next one.
module angle_calc
  import pmsm_pkg::*;
#(
  parameter int ITER = 30
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  q16_t         omega_e,
  input  dt_t          dt,
  input  fault_phase_e fault_phase,
  output logic         done,
  output angle_t       theta,        // electrical angle
  output angle_t       theta_fault,  // angle shifted by eq. (9), for the maps
  output trig_t        sin_th,
  output trig_t        cos_th,
  output trig_t        sin_f,        // sin(theta_fault + 2*pi/3)
  output trig_t        cos_f,        // cos(theta_fault + 2*pi/3)
  output trig_t        sin_2th,
  output trig_t        cos_2th
);
  logic [2:0]          ph;            // pipeline position before the CORDICs
  logic signed [64:0]  rad_q48;       // omega_e * dt, Q16.48 rad
  logic signed [95:0]  dturn;         // turns * 2^80
  logic [47:0]         acc;
  angle_t              th_new, thf_new;
  logic                c_start, d0, d1, b0, b1, got0, got1;
  trig_t               s0, c0, s1, c1;

  always_comb begin
    th_new = acc[47:16];
    unique case (fault_phase)
      FAULT_PHASE_A: thf_new = th_new - ANGLE_2PI_3;
      FAULT_PHASE_B: thf_new = th_new - ANGLE_4PI_3;
      default:       thf_new = th_new;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph          <= '0;
      rad_q48     <= '0;
      dturn       <= '0;
      acc         <= '0;
      c_start     <= 1'b0;
      got0        <= 1'b0;
      got1        <= 1'b0;
      done        <= 1'b0;
      theta       <= '0;
      theta_fault <= '0;
      sin_th      <= '0;
      cos_th      <= 32'sd1073741824;
      sin_f       <= '0;
      cos_f       <= 32'sd1073741824;
      sin_2th     <= '0;
      cos_2th     <= 32'sd1073741824;
    end else begin
      c_start <= 1'b0;
      done    <= 1'b0;
      ph      <= {ph[1:0], start};
      if (start)  rad_q48 <= 65'(omega_e) * 65'(signed'({1'b0, dt}));
      if (ph[0])  dturn   <= 96'(rad_q48) * 96'(signed'({1'b0, TURNS_PER_RAD}));
      if (ph[1])  acc     <= acc + 48'(dturn >>> 32);
      if (ph[2])  c_start <= 1'b1;
      if (d0) got0 <= 1'b1;
      if (d1) got1 <= 1'b1;
      if ((got0 || d0) && (got1 || d1)) begin
        got0        <= 1'b0;
        got1        <= 1'b0;
        done        <= 1'b1;
        theta       <= th_new;
        theta_fault <= thf_new;
        sin_th      <= s0;
        cos_th      <= c0;
        sin_f       <= s1;
        cos_f       <= c1;
        sin_2th     <= fmul(s0, c0, 29);                       // 2 sin cos
        cos_2th     <= fmul(c0, c0, 30) - fmul(s0, s0, 30);    // cos^2 - sin^2
      end
    end
  end

  cordic_sincos #(.ITER(ITER)) u_cordic_th (
    .clk, .rst_n, .start(c_start), .angle(th_new),
    .busy(b0), .done(d0), .sin_o(s0), .cos_o(c0)
  );

  cordic_sincos #(.ITER(ITER)) u_cordic_f (
    .clk, .rst_n, .start(c_start), .angle(thf_new + ANGLE_2PI_3),
    .busy(b1), .done(d1), .sin_o(s1), .cos_o(c1)
  );

  // A new step must not begin while the CORDICs are still busy.
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) start |-> !(b0 || b1);
  endproperty
  a_no_overrun: assert property (p_no_overrun);
endmodule
