// isqrt64: integer square root of a 64-bit unsigned number, one result bit per clock.
//
// Classic digit-by-digit (restoring) method: the radicand is consumed two bits
// at a time from the top; each clock the trial value (4*root + 1) is subtracted
// from the partial remainder and the next root bit is 1 if that did not go
// negative. The result is floor(sqrt(x)).
//
// Interface: pulse `start` with `x` valid; `root` is valid when `done` pulses,
// 33 cycles later, and holds until the next result. A start while busy is ignored.
module isqrt64 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] x,
  output logic        busy,
  output logic        done,
  output logic [31:0] root
);
  logic [63:0] rad;
  logic [33:0] rem;
  logic [31:0] q;
  logic [5:0]  n;
  logic [33:0] trial, rem_sh;

  assign rem_sh = {rem[31:0], rad[63:62]};
  assign trial  = {q, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad  <= '0;
      rem  <= '0;
      q    <= '0;
      n    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rad  <= x;
          rem  <= '0;
          q    <= '0;
          n    <= 6'd32;
          busy <= 1'b1;
        end
      end else if (n != 0) begin
        rad <= {rad[61:0], 2'b00};
        if (rem_sh >= trial) begin
          rem <= rem_sh - trial;
          q   <= {q[30:0], 1'b1};
        end else begin
          rem <= rem_sh;
          q   <= {q[30:0], 1'b0};
        end
        n <= n - 1'b1;
      end else begin
        root <= q;
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end
endmodule
