// tb_hr_column_stage: prime-factor column stage with N = 16, M = 3 (a
// 48-point transform). For a random 48-sample frame x the test forms the
// rows x[(N*m + M*n2) mod 48], takes their 16-point DFTs itself and feeds
// them in (row by row, bins in a scrambled order). Every output word at
// address k must equal bin k of the direct 48-point DFT of x, every address
// 0..47 must appear exactly once per spectrum, and out_first/out_last must
// bracket N output clocks. Two frames are sent.
module tb_hr_column_stage;
  import chan_pkg::*;
  localparam int N = 16, M = 3, PN = M * N, NW = $clog2(N), XW = $clog2(PN), F = 2;
  localparam real PI2 = 6.283185307179586;
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [5:0] in_row = '0;
  logic [NW-1:0] in_idx [8];
  cplx_t in_data [8];
  logic out_valid, out_first, out_last, overrun;
  logic [XW-1:0] out_addr [M];
  cplx_t out_data [M];
  hr_column_stage #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  real xr [F][PN], xi [F][PN], yr [F][PN], yi [F][PN];
  int  br [F][M][N], bi [F][M][N];
  int  seen [PN];
  int  fo = 0, oc = 0;

  always @(posedge clk)
    if (rst_n) begin
      check(!overrun, "no overrun");
      if (out_valid) begin
        check(out_first == (oc == 0), "out_first on the first clock");
        check(out_last == (oc == N - 1), "out_last on clock N-1");
        for (int i = 0; i < M; i++) begin
          int k;
          k = int'(out_addr[i]);
          seen[k]++;
          check($sqrt((out_data[i].re - yr[fo][k]) ** 2 + (out_data[i].im - yi[fo][k]) ** 2) <= 8.0,
                $sformatf("frame %0d X[%0d] = (%0d,%0d) want (%0.1f,%0.1f)", fo, k,
                          out_data[i].re, out_data[i].im, yr[fo][k], yi[fo][k]));
        end
        oc++;
        if (out_last) begin
          for (int k = 0; k < PN; k++) check(seen[k] == 1, $sformatf("bin %0d seen %0d times", k, seen[k]));
          for (int k = 0; k < PN; k++) seen[k] = 0;
          oc = 0;
          fo++;
        end
      end
    end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    for (int k = 0; k < PN; k++) seen[k] = 0;
    for (int f = 0; f < F; f++) begin
      for (int n = 0; n < PN; n++) begin
        xr[f][n] = $urandom_range(0, 8000) - 4000.0;
        xi[f][n] = $urandom_range(0, 8000) - 4000.0;
      end
      for (int k = 0; k < PN; k++) begin
        yr[f][k] = 0; yi[f][k] = 0;
        for (int n = 0; n < PN; n++) begin
          yr[f][k] += xr[f][n] * $cos(PI2 * n * k / PN) + xi[f][n] * $sin(PI2 * n * k / PN);
          yi[f][k] += xi[f][n] * $cos(PI2 * n * k / PN) - xr[f][n] * $sin(PI2 * n * k / PN);
        end
      end
      for (int m = 0; m < M; m++)
        for (int k2 = 0; k2 < N; k2++) begin
          real sr, si;
          sr = 0; si = 0;
          for (int n2 = 0; n2 < N; n2++) begin
            int n;
            n = (N * m + M * n2) % PN;
            sr += xr[f][n] * $cos(PI2 * n2 * k2 / N) + xi[f][n] * $sin(PI2 * n2 * k2 / N);
            si += xi[f][n] * $cos(PI2 * n2 * k2 / N) - xr[f][n] * $sin(PI2 * n2 * k2 / N);
          end
          br[f][m][k2] = $rtoi(sr >= 0 ? sr + 0.5 : sr - 0.5);
          bi[f][m][k2] = $rtoi(si >= 0 ? si + 0.5 : si - 0.5);
        end
    end
    for (int i = 0; i < 8; i++) begin in_idx[i] = '0; in_data[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < F; f++) begin
      for (int m = 0; m < M; m++)
        for (int c = 0; c < N / 8; c++) begin
          @(negedge clk);
          in_valid = 1;
          in_row   = 6'(m);
          for (int i = 0; i < 8; i++) begin
            int k2;
            k2 = (N / 8 - 1 - c) + (N / 8) * i;   // scrambled, each bin once per row
            in_idx[i]  = NW'(k2);
            in_data[i].re = DATA_W'(br[f][m][k2]);
            in_data[i].im = DATA_W'(bi[f][m][k2]);
          end
          if (c == 0 && m == 1) begin      // a gap inside a frame
            @(negedge clk);
            in_valid = 0;
          end
        end
      @(negedge clk);
      in_valid = 0;
      repeat (N + 8) @(negedge clk);
    end
    repeat (N + 10) @(negedge clk);
    check(fo == F, $sformatf("spectra out: %0d", fo));
    finish_tb();
  end
endmodule
