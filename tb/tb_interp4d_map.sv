// Testbench for interp4d_map on a small 4 x 3 x 5 x 6 grid: the memory is loaded
// with random entries through the write port, then random cells and fractions
// are read; the result must equal I0 + sum_k f_k*(I_k - I0) over the base node
// and its four axis neighbours, computed here from the testbench's own copy.
module tb_interp4d_map;
  import pmsm_pkg::*;
  import tb_util_pkg::*;
  localparam int NX = 4, NY = 3, NZ = 5, NT = 6, DEPTH = NX * NY * NZ * NT;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, start = 0, we = 0, done;
  logic [AW-1:0] base_addr, waddr;
  logic [16:0] fx, fy, fz, ft;
  logic [15:0] wdata;
  q16_t value;
  int checks = 0, failures = 0;
  int tab [DEPTH];

  interp4d_map #(.NX(NX), .NY(NY), .NZ(NZ), .NT(NT), .ENTRY_W(16), .MAP_FRAC(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    base_addr = 0; waddr = 0; wdata = 0; {fx, fy, fz, ft} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      tab[a] = $urandom_range(0, 65535) - 32768;
      we = 1; waddr = AW'(a); wdata = 16'(tab[a]);
    end
    @(negedge clk); we = 0;
    repeat (500) begin
      int ix, iy, iz, it, b, lat;
      real f [4], e;
      ix = $urandom_range(0, NX - 2); iy = $urandom_range(0, NY - 2);
      iz = $urandom_range(0, NZ - 2); it = $urandom_range(0, NT - 2);
      b = ix + NX * (iy + NY * (iz + NZ * it));
      @(negedge clk);
      base_addr = AW'(b);
      fx = 17'($urandom_range(0, 65536)); fy = 17'($urandom_range(0, 65536));
      fz = 17'($urandom_range(0, 65536)); ft = 17'($urandom_range(0, 65536));
      f[0] = fx / 65536.0; f[1] = fy / 65536.0; f[2] = fz / 65536.0; f[3] = ft / 65536.0;
      e = tab[b] + f[0] * (tab[b + 1] - tab[b]) + f[1] * (tab[b + NX] - tab[b])
        + f[2] * (tab[b + NX * NY] - tab[b]) + f[3] * (tab[b + NX * NY * NZ] - tab[b]);
      e = e / 64.0;    // MAP_FRAC = 6
      start = 1;
      @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (rabs(q2r(value, 16) - e) > 1e-4) begin
        failures++;
        $display("FAIL base=%0d got %f expected %f", b, q2r(value, 16), e);
      end
      checks++;
      if (lat > 50) begin failures++; $display("FAIL latency %0d", lat); end
      if (checks == 2) $display("interpolation latency %0d cycles", lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
