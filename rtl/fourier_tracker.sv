// fourier_tracker: magnitude of one harmonic of a signal by a sliding Fourier series.
//
// Used as an inter-turn fault indicator: a stator short circuit raises the
// third harmonic of the phase currents, which appears as a second harmonic in
// the q-axis current. Per sample the block multiplies i_q by sin(2*theta) and by
// cos(2*theta) and accumulates each product. The running sums are delayed by
// WINDOW samples; the difference between the current and the delayed sum is
// the Fourier integral over the last WINDOW samples. Each of the two integrals
// is multiplied by the normalising factor f (2/WINDOW for the amplitude when the
// window spans whole periods), squared, and the square root of their sum is the
// harmonic magnitude. The structure follows the original design's diagram; word
// widths, the window length and the sequential square root are this design's
// choices. Until WINDOW samples have been taken the delayed sums read as zero.
//
// Interface: i_q Q16.16 A, sin_2th/cos_2th Q2.30, f unsigned Q0.32, mag
// Q16.16 A. Timing: pulse `sample` (at the controller's sampling rate) with the
// inputs valid; `mag` updates and `done` is high 40 cycles after the cycle in
// which `sample` is high. Samples must be at least 41 cycles apart.
module fourier_tracker
  import pmsm_pkg::*;
#(
  parameter int WINDOW = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample,
  input  q16_t        i_q,
  input  trig_t       sin_2th,
  input  trig_t       cos_2th,
  input  logic [31:0] f,
  output logic        done,
  output q16_t        mag
);
  localparam int PW = $clog2(WINDOW);

  logic signed [47:0] acc_s, acc_c, old_s, old_c, win_s, win_c;
  logic signed [47:0] hist_s [WINDOW];
  logic signed [47:0] hist_c [WINDOW];
  logic [PW-1:0]      ptr;
  logic               full;
  logic [3:0]         vld;
  logic signed [31:0] a_s, a_c;
  logic [63:0]        sq_sum;
  logic               sq_busy, sq_done;
  logic [31:0]        root;
  logic               start_sq;

  // Delay line z^-WINDOW: read the sum stored WINDOW samples ago, then overwrite it.
  always_ff @(posedge clk) begin
    if (vld[0]) begin
      old_s <= hist_s[ptr];
      old_c <= hist_c[ptr];
    end
    if (vld[1]) begin
      hist_s[ptr] <= acc_s;
      hist_c[ptr] <= acc_c;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_s  <= '0;
      acc_c  <= '0;
      win_s  <= '0;
      win_c  <= '0;
      ptr    <= '0;
      full   <= 1'b0;
      vld    <= '0;
      a_s    <= '0;
      a_c    <= '0;
      sq_sum <= '0;
      done   <= 1'b0;
      mag    <= '0;
      start_sq <= 1'b0;
    end else begin
      vld  <= {vld[2:0], sample};
      done <= sq_done;
      start_sq <= vld[3];
      // 1: multiply and accumulate
      if (sample) begin
        acc_s <= acc_s + 48'(fmul(i_q, sin_2th, TRIG_FRAC));
        acc_c <= acc_c + 48'(fmul(i_q, cos_2th, TRIG_FRAC));
      end
      // 2: window sums (old_* read in this cycle's edge)
      if (vld[1]) begin
        win_s <= acc_s - (full ? old_s : 48'sd0);
        win_c <= acc_c - (full ? old_c : 48'sd0);
        if (ptr == PW'(WINDOW - 1)) begin
          ptr  <= '0;
          full <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
      // 3: scale by f
      if (vld[2]) begin
        a_s <= 32'((80'(win_s) * 80'(signed'({1'b0, f}))) >>> 32);
        a_c <= 32'((80'(win_c) * 80'(signed'({1'b0, f}))) >>> 32);
      end
      // 4: sum of squares, Q32.32
      if (vld[3]) sq_sum <= 64'(64'(a_s) * 64'(a_s)) + 64'(64'(a_c) * 64'(a_c));
      if (sq_done) mag <= signed'(root);
    end
  end

  isqrt64 u_sqrt (
    .clk, .rst_n, .start(start_sq), .x(sq_sum),
    .busy(sq_busy), .done(sq_done), .root(root)
  );

  // samples closer than the pipeline length would restart the square root
  a_sample_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    start_sq |-> !sq_busy)
    else $error("fourier_tracker: samples closer than 41 cycles");

endmodule
