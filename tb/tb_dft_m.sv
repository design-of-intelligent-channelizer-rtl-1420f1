// tb_dft_m: 7-point DFT. Random complex inputs (about 21 bits) are applied
// every clock; each output set is compared with the direct DFT
// X[k] = sum_n x[n] exp(-j 2 pi n k / 7) computed here, and must appear three
// clocks after its input. Tolerance follows from the 16-bit fractional constants.
module tb_dft_m;
  import chan_pkg::*;
  localparam int M = 7;
  localparam real PI2 = 6.283185307179586;
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t x [M], y [M];
  dft_m #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  real er [$], ei [$];   // M entries per output set
  int  cyc = 0, in_cyc [$];
  localparam int LAT = 3;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      real r [M], i [M];
      for (int k = 0; k < M; k++) begin r[k] = er.pop_front(); i[k] = ei.pop_front(); end
      check(cyc - in_cyc.pop_front() == LAT, $sformatf("latency %0d", cyc));
      for (int k = 0; k < M; k++)
        check($sqrt((y[k].re - r[k]) ** 2 + (y[k].im - i[k]) ** 2) <= 48.0,   // 6 products, each within 2^-17 * 2^21 + 1
              $sformatf("X[%0d] = (%0d,%0d) want (%0.1f,%0.1f)", k, y[k].re, y[k].im, r[k], i[k]));
    end
  end

  initial begin
    for (int n = 0; n < M; n++) x[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      real r [M], i [M];
      @(negedge clk);
      in_valid = (t % 5) != 4;
      for (int n = 0; n < M; n++) begin
        x[n].re = DATA_W'($urandom_range(0, 1 << 21) - (1 << 20));
        x[n].im = DATA_W'($urandom_range(0, 1 << 21) - (1 << 20));
      end
      if (in_valid) begin
        for (int k = 0; k < M; k++) begin
          r[k] = 0; i[k] = 0;
          for (int n = 0; n < M; n++) begin
            r[k] += x[n].re * $cos(PI2 * n * k / M) + x[n].im * $sin(PI2 * n * k / M);
            i[k] += x[n].im * $cos(PI2 * n * k / M) - x[n].re * $sin(PI2 * n * k / M);
          end
        end
        for (int k = 0; k < M; k++) begin er.push_back(r[k]); ei.push_back(i[k]); end
        in_cyc.push_back(cyc + 1);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(negedge clk);
    check(er.size() == 0, "every input set produced an output set");
    finish_tb();
  end
endmodule
