// dq_to_abc: converts the rotor-frame currents into the three phase currents.
//
// Two steps, as in the original design: the inverse Park transform
//   i_alpha = i_d*cos(theta) - i_q*sin(theta)
//   i_beta  = i_d*sin(theta) + i_q*cos(theta)
// and the amplitude-invariant inverse Clarke transform
//   i_a = i_alpha
//   i_b = -i_alpha/2 + (sqrt(3)/2)*i_beta
//   i_c = -i_alpha/2 - (sqrt(3)/2)*i_beta
// The scaling matches converter_emulation, so a current of amplitude 1 in dq
// gives phase currents of amplitude 1.
//
// Interface: currents Q16.16 A, sin/cos Q2.30. Timing: pulse `start` with the
// inputs valid; i_a/i_b/i_c update and `done` pulses 3 cycles later (the
// original's transformation takes 10 cycles).
module dq_to_abc
  import pmsm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  q16_t  i_d,
  input  q16_t  i_q,
  input  trig_t sin_th,
  input  trig_t cos_th,
  output logic  done,
  output q16_t  i_a,
  output q16_t  i_b,
  output q16_t  i_c
);
  logic [1:0] vld;
  q16_t       ial, ibe, half_al, s3_be;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld     <= '0;
      done    <= 1'b0;
      ial     <= '0;
      ibe     <= '0;
      half_al <= '0;
      s3_be   <= '0;
      i_a     <= '0;
      i_b     <= '0;
      i_c     <= '0;
    end else begin
      vld  <= {vld[0], start};
      done <= vld[1];
      if (start) begin
        ial <= fmul(i_d, cos_th, TRIG_FRAC) - fmul(i_q, sin_th, TRIG_FRAC);
        ibe <= fmul(i_d, sin_th, TRIG_FRAC) + fmul(i_q, cos_th, TRIG_FRAC);
      end
      if (vld[0]) begin
        half_al <= ial >>> 1;
        s3_be   <= fmul(ibe, SQRT3_2, TRIG_FRAC);
      end
      if (vld[1]) begin
        i_a <= ial;
        i_b <= s3_be - half_al;
        i_c <= -s3_be - half_al;
      end
    end
  end
endmodule
