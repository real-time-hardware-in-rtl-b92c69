// current_maps: the three current maps i_d, i_q, i_f = f(psi_d, psi_q, psi_f, theta).
//
// The flux-to-current relationship of the machine (saturation, saliency,
// slotting and the shorted turns included) is precomputed offline and held in
// three tables on a grid of N_PSI points along each flux axis and N_THETA points
// in rotor angle: 12 x 12 x 12 x 61 = 105,408 entries per map in the original
// design. This block turns the flux states and the angle into grid
// coordinates, splits each coordinate into its integer part (which forms the
// base address) and its fractional part, and lets three interp4d_map units
// read and interpolate the three maps in parallel.
// Grid coordinates:
//   flux axis:  g = (psi - psi_min) * inv_step, clamped to [0, N_PSI-1]
//   angle axis: g = theta * (N_THETA-1) / 2^32, i.e. the angle grid covers one
//               electrical revolution with both ends stored
// The axis origins and steps are run-time inputs so that tables of other
// machines can be loaded; the angle span of one electrical revolution and the
// clamping at the table edges are this design's choices.
//
// Interface: psi in Q4.28 Wb, theta a binary angle, psi_min Q4.28,
// inv_step Q16.16 (1/Wb); i_d, i_q, i_f in Q16.16 A. Table load port:
// lut_sel picks the map (0 = i_d, 1 = i_q, 2 = i_f), lut_addr the flattened
// address, lut_wdata the entry. Timing: `done` pulses 13 cycles after `start`
// (the original's interpolation takes 50); outputs hold between updates.
module current_maps
  import pmsm_pkg::*;
#(
  parameter int N_PSI    = 12,
  parameter int N_THETA  = 61,
  parameter int ENTRY_W  = 16,
  parameter int MAP_FRAC = 6,
  localparam int DEPTH   = N_PSI * N_PSI * N_PSI * N_THETA,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  flux_t              psi_d,
  input  flux_t              psi_q,
  input  flux_t              psi_f,
  input  angle_t             theta,
  input  map_axis_t          axis_d,
  input  map_axis_t          axis_q,
  input  map_axis_t          axis_f,
  input  logic               lut_we,
  input  map_sel_e           lut_sel,
  input  logic [AW-1:0]      lut_addr,
  input  logic [ENTRY_W-1:0] lut_wdata,
  output logic               done,
  output q16_t               i_d,
  output q16_t               i_q,
  output q16_t               i_f
);
  localparam int IW = $clog2(N_THETA);

  // Grid coordinate of a flux axis, Q20.44 before clamping.
  function automatic logic signed [65:0] grid(input flux_t p, input map_axis_t ax);
    logic signed [32:0] diff;
    diff = 33'(p) - 33'(ax.psi_min);
    return 66'(diff) * 66'(ax.inv_step);
  endfunction

  // Integer index and 17-bit fraction of a clamped flux-axis coordinate.
  function automatic logic [IW+16:0] split(input logic signed [65:0] g);
    logic signed [65:0] ip;
    ip = g >>> 44;
    if (g < 0)                         return {IW'(0), 17'd0};
    else if (ip >= 66'(N_PSI - 1))     return {IW'(N_PSI - 2), 17'd65536};
    else                               return {IW'(ip), 1'b0, g[43:28]};
  endfunction

  logic [1:0]          vld;
  logic signed [65:0]  gd, gq, gf;
  logic [IW+31:0]      gt;
  logic [IW+16:0]      sd, sq, sf;
  logic [IW-1:0]       it;
  logic [16:0]         ft;
  logic [AW-1:0]       base;
  logic [16:0]         fd_r, fq_r, ff_r, ft_r;
  logic                go;
  logic [2:0]          dn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      gd   <= '0;
      gq   <= '0;
      gf   <= '0;
      gt   <= '0;
      sd   <= '0;
      sq   <= '0;
      sf   <= '0;
      it   <= '0;
      ft   <= '0;
      base <= '0;
      fd_r <= '0;
      fq_r <= '0;
      ff_r <= '0;
      ft_r <= '0;
      go   <= 1'b0;
    end else begin
      vld <= {vld[0], start};
      go  <= vld[1];
      // 1: grid coordinates
      gd <= grid(psi_d, axis_d);
      gq <= grid(psi_q, axis_q);
      gf <= grid(psi_f, axis_f);
      gt <= (IW+32)'(theta) * (IW+32)'(N_THETA - 1);
      // 2: integer and fractional parts
      sd <= split(gd);
      sq <= split(gq);
      sf <= split(gf);
      it <= gt[IW+31:32];
      ft <= {1'b0, gt[31:16]};
      // 3: base address of the surrounding grid cell
      base <= AW'(sd[IW+16:17])
            + AW'(N_PSI) * AW'(sq[IW+16:17])
            + AW'(N_PSI * N_PSI) * AW'(sf[IW+16:17])
            + AW'(N_PSI * N_PSI * N_PSI) * AW'(it);
      fd_r <= sd[16:0];
      fq_r <= sq[16:0];
      ff_r <= sf[16:0];
      ft_r <= ft;
    end
  end

  assign done = &dn;

  interp4d_map #(.NX(N_PSI), .NY(N_PSI), .NZ(N_PSI), .NT(N_THETA),
                 .ENTRY_W(ENTRY_W), .MAP_FRAC(MAP_FRAC)) u_map_d (
    .clk, .rst_n, .start(go), .base_addr(base), .fx(fd_r), .fy(fq_r), .fz(ff_r), .ft(ft_r),
    .we(lut_we && lut_sel == MAP_ID), .waddr(lut_addr), .wdata(lut_wdata),
    .done(dn[0]), .value(i_d)
  );

  interp4d_map #(.NX(N_PSI), .NY(N_PSI), .NZ(N_PSI), .NT(N_THETA),
                 .ENTRY_W(ENTRY_W), .MAP_FRAC(MAP_FRAC)) u_map_q (
    .clk, .rst_n, .start(go), .base_addr(base), .fx(fd_r), .fy(fq_r), .fz(ff_r), .ft(ft_r),
    .we(lut_we && lut_sel == MAP_IQ), .waddr(lut_addr), .wdata(lut_wdata),
    .done(dn[1]), .value(i_q)
  );

  interp4d_map #(.NX(N_PSI), .NY(N_PSI), .NZ(N_PSI), .NT(N_THETA),
                 .ENTRY_W(ENTRY_W), .MAP_FRAC(MAP_FRAC)) u_map_f (
    .clk, .rst_n, .start(go), .base_addr(base), .fx(fd_r), .fy(fq_r), .fz(ff_r), .ft(ft_r),
    .we(lut_we && lut_sel == MAP_IF), .waddr(lut_addr), .wdata(lut_wdata),
    .done(dn[2]), .value(i_f)
  );
endmodule
