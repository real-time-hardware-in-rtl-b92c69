// Testbench for converter_emulation: every leg combination at several DC-link
// voltages; expected phase voltages come from (2a-b-c)/3*Vdc and (b-c)/sqrt(3)*Vdc
// computed in floating point, and the switching state number from the state table.
module tb_converter_emulation;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] legs;
  q16_t vdc, v_alpha, v_beta;
  logic [2:0] state;
  int checks = 0, failures = 0;

  converter_emulation dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_state(input logic a, b, c);
    int t [8] = '{0, 5, 3, 4, 1, 6, 2, 7};   // indexed by {a,b,c}
    return t[{a, b, c}];
  endfunction

  initial begin
    real vd, ea, eb;
    legs = 0; vdc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      vd = (n == 0) ? 600.0 : (n == 1) ? 48.0 : $urandom_range(1, 1000) + 0.25;
      for (int k = 0; k < 8; k++) begin
        logic a, b, c;
        {c, b, a} = 3'(k);
        @(negedge clk);
        legs = 3'(k);
        vdc  = q16_t'($rtoi(vd * 65536.0));
        @(negedge clk);
        ea = vd * (2.0 * a - b - c) / 3.0;
        eb = vd * (1.0 * b - c) / $sqrt(3.0);
        checks++;
        if (rabs(real'(v_alpha) / 65536.0 - ea) > 1e-3 || rabs(real'(v_beta) / 65536.0 - eb) > 1e-3) begin
          failures++;
          $display("FAIL legs=%b vdc=%f va=%f (exp %f) vb=%f (exp %f)", legs, vd,
                   real'(v_alpha) / 65536.0, ea, real'(v_beta) / 65536.0, eb);
        end
        checks++;
        if (int'(state) != exp_state(a, b, c)) begin
          failures++;
          $display("FAIL legs=%b state=%0d exp %0d", legs, state, exp_state(a, b, c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
