// tb_fft_unpack: 16-point unpacking. Two random real sequences a and b are
// packed as z = a + j*b; the test computes Z = DFT(z) itself, rounds it and
// writes it in base-4 digit-reversed position order, as the FFT delivers it.
// Every output bin must equal DFT(a) on the A rail and DFT(b) on the B rail
// (to within the rounding of Z and the halving), every bin 0..N-1 must appear
// once per frame, and the frame's tag must come out with it. Three frames
// are sent, the last two back to back.
module tb_fft_unpack;
  import chan_pkg::*;
  localparam int N = 16, LANES = 8, NW = $clog2(N);
  localparam real PI2 = 6.283185307179586;
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [NW-1:0] in_addr [LANES];
  cplx_t in_data [LANES];
  tag_t  in_tag = '0;
  logic  out_valid, out_last;
  logic [NW-1:0] out_idx [8];
  cplx_t a_data [8], b_data [8];
  tag_t  out_tag;
  fft_unpack #(.N(N), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  real ea_re [3][N], ea_im [3][N], eb_re [3][N], eb_im [3][N];   // DFT(a), DFT(b)
  int  zr [3][N], zi [3][N];
  int  seen [N];
  int  fo = 0;

  function automatic int digrev(input int p);
    int r;
    r = 0;
    for (int d = 0; d < NW / 2; d++) r = r * 4 + ((p >> (2 * d)) & 3);
    return r;
  endfunction

  always @(posedge clk)
    if (rst_n && out_valid) begin
      for (int i = 0; i < 8; i++) begin
        int k;
        k = int'(out_idx[i]);
        seen[k]++;
        check($sqrt((a_data[i].re - ea_re[fo][k]) ** 2 + (a_data[i].im - ea_im[fo][k]) ** 2) <= 1.5,
              $sformatf("frame %0d A[%0d] = (%0d,%0d) want (%0.1f,%0.1f)", fo, k,
                        a_data[i].re, a_data[i].im, ea_re[fo][k], ea_im[fo][k]));
        check($sqrt((b_data[i].re - eb_re[fo][k]) ** 2 + (b_data[i].im - eb_im[fo][k]) ** 2) <= 1.5,
              $sformatf("frame %0d B[%0d] = (%0d,%0d) want (%0.1f,%0.1f)", fo, k,
                        b_data[i].re, b_data[i].im, eb_re[fo][k], eb_im[fo][k]));
      end
      check(out_tag == tag_t'(8'(fo + 10)), "tag travels with the frame");
      if (out_last) begin
        for (int k = 0; k < N; k++) check(seen[k] == 1, $sformatf("bin %0d seen %0d times", k, seen[k]));
        for (int k = 0; k < N; k++) seen[k] = 0;
        fo++;
      end
    end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    int a [N], b [N];
    for (int k = 0; k < N; k++) seen[k] = 0;
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < N; n++) begin
        a[n] = $urandom_range(0, 20000) - 10000;
        b[n] = $urandom_range(0, 20000) - 10000;
      end
      for (int k = 0; k < N; k++) begin
        real sr, si;
        ea_re[f][k] = 0; ea_im[f][k] = 0; eb_re[f][k] = 0; eb_im[f][k] = 0;
        for (int n = 0; n < N; n++) begin
          ea_re[f][k] += a[n] * $cos(PI2 * k * n / N);  ea_im[f][k] -= a[n] * $sin(PI2 * k * n / N);
          eb_re[f][k] += b[n] * $cos(PI2 * k * n / N);  eb_im[f][k] -= b[n] * $sin(PI2 * k * n / N);
        end
        // Z = A + jB
        sr = ea_re[f][k] - eb_im[f][k];
        si = ea_im[f][k] + eb_re[f][k];
        zr[f][k] = $rtoi(sr >= 0 ? sr + 0.5 : sr - 0.5);
        zi[f][k] = $rtoi(si >= 0 ? si + 0.5 : si - 0.5);
      end
    end
    for (int i = 0; i < LANES; i++) begin in_addr[i] = '0; in_data[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int c = 0; c < N / LANES; c++) begin
        @(negedge clk);
        in_valid = 1;
        in_tag   = tag_t'(8'(f + 10));
        for (int i = 0; i < LANES; i++) begin
          int pos;
          pos = c * LANES + i;
          in_addr[i]    = NW'(pos);
          in_data[i].re = DATA_W'(zr[f][digrev(pos)]);
          in_data[i].im = DATA_W'(zi[f][digrev(pos)]);
        end
      end
      if (f == 0) begin
        @(negedge clk);
        in_valid = 0;
        repeat (4) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    check(fo == 3, $sformatf("frames unpacked: %0d", fo));
    finish_tb();
  end
endmodule
