// step_scheduler: the emulation-step clock of the drive emulator.
//
// The emulator's subsystems (angle, flux equations, current maps, current
// transformation) run side by side, each on the latest registered results of
// the others, so one emulation step lasts as long as the slowest subsystem. In
// the original design that is the current-map interpolation at 50 clocks of
// 40 MHz, i.e. 1.25 us per step. This block pulses `step` once every
// STEP_CYCLES clocks while `run` is high, and counts the steps taken.
// The free-running counter form is this design's choice.
//
// Timing: the first pulse comes STEP_CYCLES clocks after run rises; clearing
// run stops the pulses and restarts the count.
module step_scheduler #(
  parameter int STEP_CYCLES = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  output logic        step,
  output logic [31:0] step_count
);
  logic [$clog2(STEP_CYCLES)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      step       <= 1'b0;
      step_count <= '0;
    end else begin
      step <= 1'b0;
      if (!run) begin
        cnt <= '0;
      end else if (cnt == $bits(cnt)'(STEP_CYCLES - 1)) begin
        cnt        <= '0;
        step       <= 1'b1;
        step_count <= step_count + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
