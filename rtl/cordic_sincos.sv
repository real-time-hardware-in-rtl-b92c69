// cordic_sincos: sine and cosine of a binary angle by iterative CORDIC.
//
// The angle is an unsigned 32-bit binary angle (2^32 = 2*pi). Angles in the left
// half-plane are first rotated by pi (and the results negated) so that the
// CORDIC rotation-mode iterations only see |angle| <= pi/2, where they converge.
// The vector starts at (1/K, 0), K being the CORDIC gain, and is rotated by
// +-atan(2^-i) for i = 0..ITER-1, one micro-rotation per clock, with the
// arctangent table held in binary-angle units. Results are Q2.30.
// The original design names a CORDIC for sin/cos in its angle block but gives
// no detail; word widths, iteration count and the sequential form are this
// design's choices. Error is a few LSB of Q2.30 for ITER = 30.
//
// Interface: pulse `start` with `angle` valid; `busy` is high while iterating;
// `done` pulses for one cycle when sin_o/cos_o are valid (they hold until the
// next done). `done` is high ITER + 3 cycles after the cycle in which `start` is high. A start while busy
// is ignored.
module cordic_sincos
  import pmsm_pkg::*;
#(
  parameter int ITER = 30
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  angle_t angle,
  output logic   busy,
  output logic   done,
  output trig_t  sin_o,
  output trig_t  cos_o
);
  localparam logic signed [33:0] INV_GAIN = 34'sd652032874;   // (1/K) in Q2.30

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ITER, S_OUT} state_e;
  state_e state;

  logic signed [33:0] x, y;
  logic signed [31:0] z;
  logic               negate;
  logic [4:0]         i;
  angle_t             a_in;

  function automatic logic [31:0] atan_tab(input logic [4:0] k);
    unique case (k)
      5'd0: atan_tab = 32'd536870912;
      5'd1: atan_tab = 32'd316933406;
      5'd2: atan_tab = 32'd167458907;
      5'd3: atan_tab = 32'd85004756;
      5'd4: atan_tab = 32'd42667331;
      5'd5: atan_tab = 32'd21354465;
      5'd6: atan_tab = 32'd10679838;
      5'd7: atan_tab = 32'd5340245;
      5'd8: atan_tab = 32'd2670163;
      5'd9: atan_tab = 32'd1335087;
      5'd10: atan_tab = 32'd667544;
      5'd11: atan_tab = 32'd333772;
      5'd12: atan_tab = 32'd166886;
      5'd13: atan_tab = 32'd83443;
      5'd14: atan_tab = 32'd41722;
      5'd15: atan_tab = 32'd20861;
      5'd16: atan_tab = 32'd10430;
      5'd17: atan_tab = 32'd5215;
      5'd18: atan_tab = 32'd2608;
      5'd19: atan_tab = 32'd1304;
      5'd20: atan_tab = 32'd652;
      5'd21: atan_tab = 32'd326;
      5'd22: atan_tab = 32'd163;
      5'd23: atan_tab = 32'd81;
      5'd24: atan_tab = 32'd41;
      5'd25: atan_tab = 32'd20;
      5'd26: atan_tab = 32'd10;
      5'd27: atan_tab = 32'd5;
      5'd28: atan_tab = 32'd3;
      5'd29: atan_tab = 32'd1;
      5'd30: atan_tab = 32'd1;
      5'd31: atan_tab = 32'd0;
    endcase
  endfunction

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      x      <= '0;
      y      <= '0;
      z      <= '0;
      i      <= '0;
      negate <= 1'b0;
      a_in   <= '0;
      done   <= 1'b0;
      sin_o  <= '0;
      cos_o  <= 32'sd1073741824;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_in  <= angle;
          state <= S_LOAD;
        end
        S_LOAD: begin
          // Quadrant reduction: angles in (pi/2, 3*pi/2) are rotated by pi.
          if (a_in[31] != a_in[30]) begin
            z      <= signed'(a_in + 32'h8000_0000);
            negate <= 1'b1;
          end else begin
            z      <= signed'(a_in);
            negate <= 1'b0;
          end
          x     <= INV_GAIN;
          y     <= '0;
          i     <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          if (z >= 0) begin
            x <= x - (y >>> i);
            y <= y + (x >>> i);
            z <= z - signed'(atan_tab(i));
          end else begin
            x <= x + (y >>> i);
            y <= y - (x >>> i);
            z <= z + signed'(atan_tab(i));
          end
          if (i == 5'(ITER - 1)) state <= S_OUT;
          i <= i + 1'b1;
        end
        S_OUT: begin
          sin_o <= negate ? -32'(y) : 32'(y);
          cos_o <= negate ? -32'(x) : 32'(x);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
