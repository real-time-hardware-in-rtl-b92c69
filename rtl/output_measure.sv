// output_measure: the emulator's outputs towards the controller under test.
//
// Phase currents leave the emulator as analogue signals. The DAC converts at a
// fixed rate well below the emulation rate, so every DAC_PERIOD clocks this
// block samples the three phase currents, scales them by a run-time gain
// (DAC codes per ampere) and saturates them to the DAC's signed DAC_W-bit
// range; `dac_stb` then pulses to start a conversion. With a 40 MHz clock,
// 349 clocks give 8.725 us, about 115 kS/s, the DAC rate of the original
// set-up. The rotor-angle feedback is a parallel digital word: the top ENC_W
// bits of the binary angle, registered every clock.
// The sample period follows the original design; the gain, saturation and DAC
// code width are this design's choices, as the original gives only the rate.
//
// Interface: currents Q16.16 A, dac_gain Q16.16 codes/A, theta a binary angle.
// Timing: dac_code changes one cycle after each sampling instant, together
// with the one-cycle dac_stb pulse; the first sample is taken DAC_PERIOD
// clocks after reset.
module output_measure
  import pmsm_pkg::*;
#(
  parameter int DAC_PERIOD = 349,
  parameter int DAC_W      = 16,
  parameter int ENC_W      = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  q16_t                    i_abc [3],
  input  q16_t                    dac_gain,
  input  angle_t                  theta,
  output logic signed [DAC_W-1:0] dac_code [3],
  output logic                    dac_stb,
  output logic [ENC_W-1:0]        enc_angle
);
  localparam logic signed [47:0] CODE_MAX = 48'sd2 ** (DAC_W - 1) - 48'sd1;
  localparam logic signed [47:0] CODE_MIN = -(48'sd2 ** (DAC_W - 1));

  logic [$clog2(DAC_PERIOD)-1:0] cnt;

  function automatic logic signed [DAC_W-1:0] to_code(input q16_t i, input q16_t g);
    logic signed [47:0] c;
    c = 48'(64'(i) * 64'(g) >>> 32);     // Q16.16 * Q16.16 -> integer codes
    if (c > CODE_MAX)      return DAC_W'(CODE_MAX);
    else if (c < CODE_MIN) return DAC_W'(CODE_MIN);
    else                   return DAC_W'(c);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      dac_stb   <= 1'b0;
      enc_angle <= '0;
      for (int k = 0; k < 3; k++) dac_code[k] <= '0;
    end else begin
      enc_angle <= theta[31 -: ENC_W];
      dac_stb   <= 1'b0;
      if (cnt == $bits(cnt)'(DAC_PERIOD - 1)) begin
        cnt     <= '0;
        dac_stb <= 1'b1;
        for (int k = 0; k < 3; k++) dac_code[k] <= to_code(i_abc[k], dac_gain);
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
