// Testbench for pwm_sampler: random gate patterns; checks that the strobe comes
// exactly every 8 clocks (5 MHz at 40 MHz) and that each sample equals the input
// seen three clock edges earlier (two synchroniser flops plus the sample flop),
// and that legs are the upper switches Q1, Q3, Q5.
module tb_pwm_sampler;
  logic clk = 0, rst_n = 0;
  logic [5:0] pwm_in, gates;
  logic [2:0] legs;
  logic sample_stb;
  logic [5:0] hist [4];
  int checks = 0, failures = 0, last_stb = -1, cyc = 0;

  pwm_sampler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of the input as seen at each rising edge
  always @(posedge clk) begin
    hist[3] <= hist[2]; hist[2] <= hist[1]; hist[1] <= hist[0]; hist[0] <= pwm_in;
  end

  initial begin
    pwm_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      cyc++;
      if ($urandom_range(0, 3) == 0) pwm_in = 6'($urandom);
      if (sample_stb) begin
        checks++;
        if (gates != hist[2] || legs != {gates[4], gates[2], gates[0]}) begin
          failures++;
          $display("FAIL gates=%b expected %b", gates, hist[2]);
        end
        if (last_stb >= 0) begin
          checks++;
          if (cyc - last_stb != 8) begin
            failures++;
            $display("FAIL strobe period %0d", cyc - last_stb);
          end
        end
        last_stb = cyc;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
