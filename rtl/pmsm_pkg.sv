// pmsm_pkg: number formats, types and constants shared by the PMSM drive emulator.
//
// Every internal variable is a 32-bit two's-complement fixed-point number, as in the
// original design; the split between integer and fraction bits is this design's own
// choice and is picked per physical quantity so that the forward-Euler flux increment
// (a few hundred microvolt-seconds per step) keeps enough resolution:
//   current, voltage, speed : Q16.16  (A, V, rad/s)
//   flux linkage            : Q4.28   (Wb)
//   resistance              : Q8.24   (ohm)
//   sine, cosine, mu        : Q2.30
//   time step dt            : unsigned Q0.32 (s)
//   angle                   : unsigned 32-bit binary angle, 2^32 = one electrical turn
package pmsm_pkg;

  localparam int CUR_FRAC  = 16;
  localparam int FLUX_FRAC = 28;
  localparam int RES_FRAC  = 24;
  localparam int TRIG_FRAC = 30;

  typedef logic signed [31:0] q16_t;     // current, voltage, speed
  typedef logic signed [31:0] flux_t;    // flux linkage
  typedef logic signed [31:0] res_t;     // resistance
  typedef logic signed [31:0] trig_t;    // sin, cos, mu
  typedef logic        [31:0] angle_t;   // binary angle
  typedef logic        [31:0] dt_t;      // time step

  // Binary-angle constants.
  localparam angle_t ANGLE_2PI_3 = 32'h5555_5555;  // 2*pi/3
  localparam angle_t ANGLE_4PI_3 = 32'hAAAA_AAAA;  // 4*pi/3

  // sqrt(3)/2 and 1/sqrt(3) in Q2.30.
  localparam trig_t SQRT3_2   = 32'sd929887697;
  localparam trig_t INV_SQRT3 = 32'sd619925131;
  // 2/3 in Q2.30.
  localparam trig_t TWO_THIRDS = 32'sd715827883;
  // 2^32 / (2*pi) in Q0.32 turns per radian, scaled: value = round(2^32/(2*pi)).
  localparam logic [31:0] TURNS_PER_RAD = 32'd683565276;

  // Faulted phase, eq. (9).
  typedef enum logic [1:0] {
    FAULT_PHASE_A = 2'd0,
    FAULT_PHASE_B = 2'd1,
    FAULT_PHASE_C = 2'd2
  } fault_phase_e;

  // Map selector of the table load port.
  typedef enum logic [1:0] {
    MAP_ID = 2'd0,
    MAP_IQ = 2'd1,
    MAP_IF = 2'd2
  } map_sel_e;

  // Run-time machine and fault parameters written by the host.
  typedef struct packed {
    res_t         rs;          // stator phase resistance
    res_t         rf;          // fault resistance
    trig_t        mu;          // faulted turns / total turns
    logic         fault_en;    // inter-turn short circuit present
    fault_phase_e fault_phase; // faulted phase, eq. (9)
    dt_t          dt;          // emulation time step
    q16_t         vdc;         // DC-link voltage
    logic         gen_mode;    // 1: terminals on a resistive load, 0: driven by the inverter
    q16_t         r_load;      // per-phase load resistance in generator mode, Q16.16 ohm
    q16_t         omega_e;     // electrical speed, rad/s
    flux_t        psi_d0;      // flux values loaded at reset
    flux_t        psi_q0;
    flux_t        psi_f0;
  } emu_cfg_t;

  // Axis description of one flux axis of the current maps: grid coordinate
  // g = (psi - psi_min) * inv_step, inv_step in Q16.16 per Wb.
  typedef struct packed {
    flux_t psi_min;
    q16_t  inv_step;
  } map_axis_t;

  // Signed multiply with arithmetic right shift, for 32x32 fixed-point products.
  function automatic logic signed [31:0] fmul(input logic signed [31:0] a,
                                              input logic signed [31:0] b,
                                              input int unsigned sh);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return 32'(p >>> sh);
  endfunction

endpackage
