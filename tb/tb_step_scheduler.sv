// Testbench for step_scheduler: the step pulse must come every 50 clocks while
// run is high (1.25 us at 40 MHz), not at all while it is low, and the step
// count must match the pulses seen.
module tb_step_scheduler;
  logic clk = 0, rst_n = 0, run = 0, step;
  logic [31:0] step_count;
  int checks = 0, failures = 0, n = 0, last = -1, cyc = 0;
  logic run_q = 0;   // run as seen one clock earlier

  step_scheduler #(.STEP_CYCLES(50)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    cyc++;
    if (step) begin
      n++;
      checks++;
      if (!run_q) begin failures++; $display("FAIL step while stopped"); end
      if (last >= 0) begin
        checks++;
        if (cyc - last != 50) begin failures++; $display("FAIL period %0d", cyc - last); end
      end
      last = cyc;
    end
    run_q = run;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    checks++;
    if (n != 0) begin failures++; $display("FAIL steps before run"); end
    run = 1;
    repeat (5000) @(negedge clk);
    run = 0; last = -1;
    repeat (2) @(negedge clk);
    checks++;
    if (step_count != 32'(n) || n != 100) begin
      failures++; $display("FAIL count %0d pulses %0d", step_count, n);
    end
    repeat (300) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
