// tb_polyphase_filter: a 16-branch, 4-tap polyphase filter fed from a
// sample_buffer. After random coefficients are loaded and a random stream has
// filled the buffer, frames are started every N/4 samples; every output word
// is compared with u[n] = round(sum_l h[j+l*N] x[t-j-l*N] / 2^15),
// j = (t - n) mod N, computed here. The output must start 4 clocks after the
// start pulse and last N/8 clocks (N/8 + log2 L in all).
module tb_polyphase_filter;
  import chan_pkg::*;
  localparam int N = 16, L = 4, LANES = 8, DEPTH = N * L + N / 2;
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, start = 0, coef_we = 0, wr_en = 0;
  logic [$clog2(N)-1:0] phase = '0;
  logic [$clog2(N*L)-1:0] coef_addr = '0;
  coef_t coef_data = '0;
  sample_t wr_data = '0;
  logic [$clog2(DEPTH)-1:0] rd_delay [LANES*L];
  sample_t rd_data [LANES*L];
  logic out_valid;
  logic [$clog2(N)-1:0] out_idx;
  logic signed [DATA_W-1:0] out_data [LANES];

  sample_buffer #(.DEPTH(DEPTH), .RD(LANES*L)) buf_i (
    .clk, .rst_n, .wr_en, .wr_data, .mark(start_mark), .rd_delay, .rd_data);
  logic start_mark;
  polyphase_filter #(.N(N), .L(L), .LANES(LANES), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .start, .phase, .coef_we, .coef_addr, .coef_data,
    .rd_delay, .rd_data, .out_valid, .out_idx, .out_data);
  always #5 clk = ~clk;

  int h [N*L];
  int xs [400];
  int t_cur = -1;         // newest sample of the frame being filtered
  int start_cyc = 0, cyc = 0, nout = 0, frames = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      if (nout == 0) check(cyc - start_cyc == 5, $sformatf("first output %0d clocks after start", cyc - start_cyc));
      for (int i = 0; i < LANES; i++) begin
        int n, j;
        longint acc;
        n = int'(out_idx) + i;
        j = ((t_cur - n) % N + N) % N;
        acc = 0;
        for (int l = 0; l < L; l++) acc += longint'(h[j + l * N]) * xs[t_cur - j - l * N];
        acc = (acc + 16384) >>> 15;
        check(out_data[i] == DATA_W'(acc), $sformatf("u[%0d] = %0d want %0d", n, out_data[i], acc));
      end
      nout++;
      if (nout == N / LANES) frames++;
    end
  end

  initial begin
    for (int i = 0; i < 400; i++) xs[i] = $urandom_range(0, 65535) - 32768;
    start_mark = 0;
    for (int i = 0; i < N * L; i++) begin
      @(negedge clk);
      h[i] = $urandom_range(0, 65535) - 32768;
      coef_we = 1; coef_addr = ($clog2(N*L))'(i); coef_data = coef_t'(h[i]);
    end
    @(negedge clk);
    coef_we = 0;
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      start = 0;
      if ((t % (3 * N / 4)) == 0 && t >= N * L && frames < 8) begin
        check(nout == 0 || nout == N / LANES, "previous frame complete");
        start = 1; phase = ($clog2(N))'(t - 1); t_cur = t - 1; start_cyc = cyc + 1; nout = 0;
      end
      wr_en = 1; wr_data = sample_t'(xs[t]);
      start_mark = ((t + 1) % (N / 4)) == 0;
    end
    @(negedge clk);
    wr_en = 0; start = 0;
    repeat (10) @(negedge clk);
    check(frames >= 6, $sformatf("frames filtered: %0d", frames));
    finish_tb();
  end
endmodule
