// pwm_sampler: samples the six gate-drive inputs of the emulated inverter.
//
// The controller under test drives six PWM gate signals Q1..Q6 (Q1/Q2 leg a,
// Q3/Q4 leg b, Q5/Q6 leg c, odd = upper switch). The inputs are asynchronous to
// the emulator clock, so each passes a two-flop synchroniser; the synchronised
// value is then sampled every SAMPLE_DIV clocks (8 clocks of 40 MHz = 5 MHz, the
// sampling rate of the original design). Dead time is not modelled, as in the
// original: the leg state is taken from the upper switch alone.
//
// Interface: pwm_in[0] = Q1 ... pwm_in[5] = Q6. legs = {c, b, a} upper-switch
// states, held between samples; sample_stb pulses for one cycle when they update.
// Timing: an input change reaches legs 3 to SAMPLE_DIV+2 cycles later.
module pwm_sampler #(
  parameter int SAMPLE_DIV = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] pwm_in,
  output logic [5:0] gates,      // sampled Q1..Q6
  output logic [2:0] legs,       // {c, b, a}
  output logic       sample_stb
);
  logic [5:0] sync1, sync2;
  logic [$clog2(SAMPLE_DIV)-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1      <= '0;
      sync2      <= '0;
      div_cnt    <= '0;
      gates      <= '0;
      sample_stb <= 1'b0;
    end else begin
      sync1      <= pwm_in;
      sync2      <= sync1;
      sample_stb <= 1'b0;
      if (div_cnt == $bits(div_cnt)'(SAMPLE_DIV - 1)) begin
        div_cnt    <= '0;
        gates      <= sync2;
        sample_stb <= 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

  assign legs = {gates[4], gates[2], gates[0]};
endmodule
