// tb_fft_r4_pipeline: complete 64-point FFT (three radix-4 stages). Random
// complex frames are streamed in, two of them back to back; each output
// word at position p must equal bin digitrev4(p) of the direct DFT computed
// here (no scaling inside the FFT, so bins grow by up to N). The tolerance
// covers the 16-bit fractional twiddles and per-stage rounding. Tags must
// travel with their frame and overrun must stay low.
module tb_fft_r4_pipeline;
  import chan_pkg::*;
  localparam int N = 64, LANES = 8, NW = $clog2(N), F = 4;
  localparam real PI2 = 6.283185307179586;
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [NW-1:0] in_addr [LANES], out_addr [LANES];
  cplx_t in_data [LANES], out_data [LANES];
  tag_t  in_tag = '0, out_tag;
  logic  out_valid, overrun;
  fft_r4_pipeline #(.N(N), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  int  xr [F][N], xi [F][N];
  real zr [F][N], zi [F][N];
  int  fo = 0, wo = 0;

  function automatic int digrev(input int p);
    int r;
    r = 0;
    for (int d = 0; d < NW / 2; d++) r = r * 4 + ((p >> (2 * d)) & 3);
    return r;
  endfunction

  always @(posedge clk)
    if (rst_n) begin
      check(!overrun, "no overrun");
      if (out_valid) begin
        for (int i = 0; i < LANES; i++) begin
          int k;
          check(int'(out_addr[i]) == wo * LANES + i, "positions in order");
          k = digrev(int'(out_addr[i]));
          check($sqrt((out_data[i].re - zr[fo][k]) ** 2 + (out_data[i].im - zi[fo][k]) ** 2) <= 24.0,
                $sformatf("frame %0d X[%0d] = (%0d,%0d) want (%0.1f,%0.1f)", fo, k,
                          out_data[i].re, out_data[i].im, zr[fo][k], zi[fo][k]));
        end
        check(out_tag == tag_t'(8'(fo + 1)), "tag travels with the frame");
        wo++;
        if (wo == N / LANES) begin wo = 0; fo++; end
      end
    end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    for (int f = 0; f < F; f++) begin
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $urandom_range(0, 8000) - 4000;
        xi[f][n] = $urandom_range(0, 8000) - 4000;
      end
      if (f == 2) for (int n = 0; n < N; n++) begin    // a pure tone at bin 5
        xr[f][n] = $rtoi(4000 * $cos(PI2 * 5 * n / N));
        xi[f][n] = $rtoi(4000 * $sin(PI2 * 5 * n / N));
      end
      for (int k = 0; k < N; k++) begin
        zr[f][k] = 0; zi[f][k] = 0;
        for (int n = 0; n < N; n++) begin
          zr[f][k] += xr[f][n] * $cos(PI2 * n * k / N) + xi[f][n] * $sin(PI2 * n * k / N);
          zi[f][k] += xi[f][n] * $cos(PI2 * n * k / N) - xr[f][n] * $sin(PI2 * n * k / N);
        end
      end
    end
    for (int i = 0; i < LANES; i++) begin in_addr[i] = '0; in_data[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < F; f++) begin
      for (int c = 0; c < N / LANES; c++) begin
        @(negedge clk);
        in_valid = 1;
        in_tag   = tag_t'(8'(f + 1));
        for (int i = 0; i < LANES; i++) begin
          in_addr[i]    = NW'(c * LANES + i);
          in_data[i].re = DATA_W'(xr[f][c * LANES + i]);
          in_data[i].im = DATA_W'(xi[f][c * LANES + i]);
        end
      end
      if (f == 0 || f == 2) begin
        @(negedge clk);
        in_valid = 0;
        repeat (f * 3 + 2) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (60) @(negedge clk);
    check(fo == F, $sformatf("frames out: %0d", fo));
    finish_tb();
  end
endmodule
