// Testbench for current_maps at the full 12 x 12 x 12 x 61 grid. The three maps
// are loaded with different affine functions of the grid indices, which the
// first-order interpolation reproduces exactly, so the expected currents can be
// computed from the flux and angle inputs alone: the grid coordinates are
// formed here in floating point from the axis origins and steps, clamped to the
// grid, and put into the affine functions. Random points inside the grid, points
// beyond each edge (clamping) and the whole angle range are tried, and the
// 50-cycle budget of the map subsystem is checked.
module tb_current_maps;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  localparam int NP = 12, NT = 61, DEPTH = NP * NP * NP * NT, AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, start = 0, lut_we = 0, done;
  flux_t psi_d, psi_q, psi_f;
  angle_t theta;
  map_axis_t axis_d, axis_q, axis_f;
  map_sel_e lut_sel;
  logic [AW-1:0] lut_addr;
  logic [15:0] lut_wdata;
  q16_t i_d, i_q, i_f;
  int checks = 0, failures = 0;
  // entry = c[0] + c[1]*ix + c[2]*iy + c[3]*iz + c[4]*it, per map
  int c [3][5] = '{'{-3000, 40, -15, 7, 3}, '{1000, -9, 60, 2, -4}, '{0, 25, 25, 120, 1}};
  real pmin [3] = '{-0.30, -0.25, -0.05};
  real pstep[3] = '{0.06, 0.05, 0.01};

  current_maps #(.N_PSI(NP), .N_THETA(NT), .ENTRY_W(16), .MAP_FRAC(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gclamp(input real g, input int n);
    if (g < 0.0) return 0.0;
    if (g > n - 1) return n - 1;
    return g;
  endfunction

  task automatic probe(input real pd, input real pq, input real pf, input angle_t th);
    real g [4], e [3];
    int lat;
    @(negedge clk);
    psi_d = r2q(pd, 28); psi_q = r2q(pq, 28); psi_f = r2q(pf, 28); theta = th;
    g[0] = gclamp((q2r(psi_d, 28) - pmin[0]) / pstep[0], NP);
    g[1] = gclamp((q2r(psi_q, 28) - pmin[1]) / pstep[1], NP);
    g[2] = gclamp((q2r(psi_f, 28) - pmin[2]) / pstep[2], NP);
    g[3] = real'(th) / 4294967296.0 * (NT - 1);
    for (int m = 0; m < 3; m++)
      e[m] = (c[m][0] + c[m][1] * g[0] + c[m][2] * g[1] + c[m][3] * g[2] + c[m][4] * g[3]) / 64.0;
    start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat > 50) begin failures++; $display("FAIL latency %0d", lat); end
    if (checks == 1) $display("map latency %0d cycles", lat);
    checks += 3;
    if (rabs(q2r(i_d, 16) - e[0]) > 0.01 || rabs(q2r(i_q, 16) - e[1]) > 0.01 || rabs(q2r(i_f, 16) - e[2]) > 0.01) begin
      failures++;
      $display("FAIL psi=(%f %f %f) th=%h got (%f %f %f) expected (%f %f %f)", pd, pq, pf, th,
               q2r(i_d, 16), q2r(i_q, 16), q2r(i_f, 16), e[0], e[1], e[2]);
    end
  endtask

  initial begin
    psi_d = 0; psi_q = 0; psi_f = 0; theta = 0; lut_sel = MAP_ID; lut_addr = 0; lut_wdata = 0;
    axis_d = '{psi_min: r2q(pmin[0], 28), inv_step: r2q(1.0 / pstep[0], 16)};
    axis_q = '{psi_min: r2q(pmin[1], 28), inv_step: r2q(1.0 / pstep[1], 16)};
    axis_f = '{psi_min: r2q(pmin[2], 28), inv_step: r2q(1.0 / pstep[2], 16)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++)
      for (int a = 0; a < DEPTH; a++) begin
        int ix, iy, iz, it;
        ix = a % NP; iy = (a / NP) % NP; iz = (a / (NP * NP)) % NP; it = a / (NP * NP * NP);
        @(negedge clk);
        lut_we = 1; lut_sel = map_sel_e'(m); lut_addr = AW'(a);
        lut_wdata = 16'(c[m][0] + c[m][1] * ix + c[m][2] * iy + c[m][3] * iz + c[m][4] * it);
      end
    @(negedge clk); lut_we = 0;
    // grid nodes exactly
    probe(pmin[0], pmin[1], pmin[2], 0);
    // random interior points, whole angle range
    repeat (400) probe(pmin[0] + ($urandom_range(0, 10000) / 10000.0) * 11 * pstep[0],
                       pmin[1] + ($urandom_range(0, 10000) / 10000.0) * 11 * pstep[1],
                       pmin[2] + ($urandom_range(0, 10000) / 10000.0) * 11 * pstep[2],
                       $urandom);
    // beyond the edges: clamped
    repeat (50) probe(pmin[0] - 0.1 - $urandom_range(0, 100) / 1000.0, pmin[1] + 12 * pstep[1] + 0.01,
                      pmin[2] + 0.5 * pstep[2], $urandom);
    repeat (50) probe(pmin[0] + 20 * pstep[0], pmin[1] - 1.0, pmin[2] + 30 * pstep[2], $urandom);
    probe(0.0, 0.0, 0.0, 32'hFFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
