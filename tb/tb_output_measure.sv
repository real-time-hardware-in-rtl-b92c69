// Testbench for output_measure: the DAC strobe must come every 349 clocks
// (about 115 kS/s at 40 MHz); each DAC code must equal the current sampled at
// that instant times the gain, saturated to 16 bits; the angle word must be the
// top 16 bits of the angle.
module tb_output_measure;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, dac_stb;
  q16_t i_abc [3], dac_gain;
  angle_t theta;
  logic signed [15:0] dac_code [3];
  logic [15:0] enc_angle;
  int checks = 0, failures = 0, last = -1, cyc = 0, nsat = 0;

  output_measure #(.DAC_PERIOD(349), .DAC_W(16), .ENC_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) i_abc[k] = 0;
    dac_gain = r2q(100.0, 16);   // 100 codes per ampere
    theta = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (60000) begin
      @(negedge clk);
      cyc++;
      if (dac_stb) begin
        for (int k = 0; k < 3; k++) begin
          real e;
          e = $floor(q2r(i_abc[k], 16) * 100.0);
          if (e > 32767.0) begin e = 32767.0; nsat++; end
          if (e < -32768.0) begin e = -32768.0; nsat++; end
          checks++;
          if (real'(dac_code[k]) != e) begin
            failures++;
            $display("FAIL code %0d got %0d expected %f", k, dac_code[k], e);
          end
        end
        if (last >= 0) begin
          checks++;
          if (cyc - last != 349) begin failures++; $display("FAIL period %0d", cyc - last); end
        end
        last = cyc;
      end
      checks++;
      if (enc_angle != theta[31:16]) begin failures++; $display("FAIL angle word"); end
      for (int k = 0; k < 3; k++) i_abc[k] = r2q(($urandom_range(0, 80000) - 40000.0) / 100.0, 16);
      theta = $urandom;
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
