// converter_emulation: ideal two-level three-phase inverter.
//
// The three leg states (upper switch on = 1) are first turned into the switching
// state number 0..7 of the converter table (the "Bin/Dec" step): 0 = (0,0,0),
// 1 = (1,0,0), 2 = (1,1,0), 3 = (0,1,0), 4 = (0,1,1), 5 = (0,0,1), 6 = (1,0,1),
// 7 = (1,1,1), written as (a,b,c). A case statement on that number (the "Switch
// Case" step) gives the phase voltages in thirds of the DC-link voltage, e.g.
// state 1 gives (2, -1, -1) * Vdc/3; both zero states give 0. The output is the
// amplitude-invariant Clarke transform of those phase voltages:
//   v_alpha = va,  v_beta = (vb - vc) / sqrt(3).
// The state table follows the original design; the amplitude-invariant Clarke
// scaling is this design's choice, matched by dq_to_abc.
//
// Interface: legs = {c, b, a}; vdc in Q16.16 volts; outputs in Q16.16 volts.
// Timing: outputs are registered, one cycle after legs/vdc change; `state`
// gives the switching state number of the same cycle.
module converter_emulation
  import pmsm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] legs,
  input  q16_t       vdc,
  output logic [2:0] state,
  output q16_t       v_alpha,
  output q16_t       v_beta
);
  logic [2:0]        st;
  logic signed [2:0] ka, kb, kc;     // phase voltages in units of Vdc/3
  q16_t              vdc_3;

  // Bin/Dec: leg bits to switching state number.
  always_comb begin
    unique case ({legs[0], legs[1], legs[2]})   // (a, b, c)
      3'b000:  st = 3'd0;
      3'b100:  st = 3'd1;
      3'b110:  st = 3'd2;
      3'b010:  st = 3'd3;
      3'b011:  st = 3'd4;
      3'b001:  st = 3'd5;
      3'b101:  st = 3'd6;
      default: st = 3'd7;                       // 3'b111
    endcase
  end

  // Switch Case: switching state to phase voltages.
  always_comb begin
    unique case (st)
      3'd1:    begin ka =  3'sd2; kb = -3'sd1; kc = -3'sd1; end
      3'd2:    begin ka =  3'sd1; kb =  3'sd1; kc = -3'sd2; end
      3'd3:    begin ka = -3'sd1; kb =  3'sd2; kc = -3'sd1; end
      3'd4:    begin ka = -3'sd2; kb =  3'sd1; kc =  3'sd1; end
      3'd5:    begin ka = -3'sd1; kb = -3'sd1; kc =  3'sd2; end
      3'd6:    begin ka =  3'sd1; kb = -3'sd2; kc =  3'sd1; end
      default: begin ka =  3'sd0; kb =  3'sd0; kc =  3'sd0; end   // 0 and 7
    endcase
  end

  // Vdc/3 by a constant multiply: 1/3 in Q2.30.
  assign vdc_3 = fmul(vdc, 32'sd357913941, 30);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      v_alpha <= '0;
      v_beta  <= '0;
    end else begin
      state   <= st;
      v_alpha <= 32'(34'(ka) * 34'(vdc_3));
      v_beta  <= fmul(32'(34'(kb - kc) * 34'(vdc_3)), INV_SQRT3, 30);
    end
  end
endmodule
