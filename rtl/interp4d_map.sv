// interp4d_map: one four-dimensional current map and its interpolator.
//
// The map holds one current (i_d, i_q or i_f) on a regular grid over
// (psi_d, psi_q, psi_f, theta), flattened into a one-dimensional memory with
// psi_d the fastest index: address = ix + NX*(iy + NY*(iz + NZ*it)). Reading a
// point takes five memory words: the grid node below the point ("base") and the
// four nodes one step further along each axis, at the fixed offsets
//   x = 1, y = NX, z = NX*NY, t = NX*NY*NZ.
// The result is the first-order expansion about the base node
//   I = I0 + fx*(Ix - I0) + fy*(Iy - I0) + fz*(Iz - I0) + ft*(It - I0)
// with fx..ft the fractional grid coordinates, one term per axis as in the
// original design's interpolation diagram. The five words are read one per
// clock from a single memory port (the original fills the device's block RAM
// with the three maps, which leaves no room for copies).
// The memory has a separate write port through which the host loads the map.
// Entries are signed ENTRY_W-bit currents with MAP_FRAC fraction bits; the
// entry width and scaling are this design's choice.
//
// Interface: pulse `start` with base_addr and the 17-bit fractions (65536 = 1.0)
// valid; `value` (Q16.16 A) updates when `done` pulses, 10 cycles after the
// cycle in which `start` is high.
// The write port may be used at any time; a write during an interpolation
// makes that result mix old and new data.
module interp4d_map
  import pmsm_pkg::*;
#(
  parameter int NX       = 12,
  parameter int NY       = 12,
  parameter int NZ       = 12,
  parameter int NT       = 61,
  parameter int ENTRY_W  = 16,
  parameter int MAP_FRAC = 6,
  localparam int DEPTH   = NX * NY * NZ * NT,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [AW-1:0]      base_addr,
  input  logic [16:0]        fx,
  input  logic [16:0]        fy,
  input  logic [16:0]        fz,
  input  logic [16:0]        ft,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [ENTRY_W-1:0] wdata,
  output logic               done,
  output q16_t               value
);
  localparam logic [AW-1:0] OFF_X = AW'(1);
  localparam logic [AW-1:0] OFF_Y = AW'(NX);
  localparam logic [AW-1:0] OFF_Z = AW'(NX * NY);
  localparam logic [AW-1:0] OFF_T = AW'(NX * NY * NZ);

  logic signed [ENTRY_W-1:0] mem [DEPTH];
  logic signed [ENTRY_W-1:0] q;
  logic [AW-1:0]             raddr;
  logic                      re;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) q <= mem[raddr];
  end

  typedef enum logic [1:0] {S_IDLE, S_READ, S_MUL, S_SUM} state_e;
  state_e state;

  logic [AW-1:0]             base;
  logic [16:0]               f [4];
  logic [2:0]                iss;           // words issued
  logic [2:0]                cap;           // index of the word arriving in q
  logic                      cap_v;
  logic signed [ENTRY_W-1:0] node [5];
  logic signed [ENTRY_W+18:0] prod [4];
  logic signed [ENTRY_W+21:0] acc;            // sum with 16 + MAP_FRAC fraction bits

  assign acc = ((ENTRY_W+22)'(node[0]) <<< 16) + (ENTRY_W+22)'(prod[0]) + (ENTRY_W+22)'(prod[1])
             + (ENTRY_W+22)'(prod[2]) + (ENTRY_W+22)'(prod[3]);

  always_comb begin
    unique case (iss)
      3'd0:    raddr = base;
      3'd1:    raddr = base + OFF_X;
      3'd2:    raddr = base + OFF_Y;
      3'd3:    raddr = base + OFF_Z;
      default: raddr = base + OFF_T;
    endcase
    re = (state == S_READ) && (iss < 3'd5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      base  <= '0;
      iss   <= '0;
      cap   <= '0;
      cap_v <= 1'b0;
      done  <= 1'b0;
      value <= '0;
      for (int k = 0; k < 4; k++) begin
        f[k]    <= '0;
        prod[k] <= '0;
      end
      for (int k = 0; k < 5; k++) node[k] <= '0;
    end else begin
      done  <= 1'b0;
      cap_v <= re;
      cap   <= iss;
      if (cap_v) node[cap] <= q;
      unique case (state)
        S_IDLE: if (start) begin
          base  <= base_addr;
          f[0]  <= fx;
          f[1]  <= fy;
          f[2]  <= fz;
          f[3]  <= ft;
          iss   <= '0;
          state <= S_READ;
        end
        S_READ: begin
          if (iss < 3'd5) iss <= iss + 1'b1;
          else if (!cap_v) state <= S_MUL;   // last word captured
        end
        S_MUL: begin
          for (int k = 0; k < 4; k++)
            prod[k] <= ((ENTRY_W+19)'(node[k+1]) - (ENTRY_W+19)'(node[0]))
                       * (ENTRY_W+19)'(signed'({1'b0, f[k]}));
          state <= S_SUM;
        end
        S_SUM: begin
          value <= 32'(acc >>> MAP_FRAC);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
