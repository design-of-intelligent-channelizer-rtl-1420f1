// tb_window_path: Path B windowing with N = 16 and M = 3 (a 48-sample
// high-resolution frame) fed from a sample_buffer. Random window
// coefficients and samples; after a frame boundary the M rows are started one
// after another and each output word is compared with
// round(x_f[n] * w[n] / 2^15), n = (N*m + M*n2) mod M*N, computed here.
module tb_window_path;
  import chan_pkg::*;
  localparam int N = 16, M = 3, LANES = 8, PN = M * N, DEPTH = 2 * PN;
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, start = 0, coef_we = 0, wr_en = 0, mark = 0;
  logic [5:0] row = '0;
  logic [$clog2(PN)-1:0] coef_addr = '0;
  coef_t coef_data = '0;
  sample_t wr_data = '0;
  logic [$clog2(DEPTH)-1:0] rd_delay [LANES];
  sample_t rd_data [LANES];
  logic out_valid;
  logic [$clog2(N)-1:0] out_idx;
  logic signed [DATA_W-1:0] out_data [LANES];

  sample_buffer #(.DEPTH(DEPTH), .RD(LANES)) buf_i (.clk, .rst_n, .wr_en, .wr_data, .mark,
                                                    .rd_delay, .rd_data);
  window_path #(.N(N), .M(M), .LANES(LANES), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int w [PN];
  int xs [400];
  int tend = 0, nrow = 0, nout = 0, nin = 0;
  int q_row [$], q_end [$];     // rows started, oldest first

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  always @(posedge clk)
    if (rst_n && out_valid) begin
      int cur_row, fend;
      cur_row = q_row[0];
      fend    = q_end[0];
      for (int i = 0; i < LANES; i++) begin
        int n2, n;
        longint v;
        n2 = int'(out_idx) + i;
        n  = (N * cur_row + M * n2) % PN;
        v  = (longint'(xs[fend - (PN - 1) + n]) * w[n] + 16384) >>> 15;
        check(out_data[i] == DATA_W'(v),
              $sformatf("row %0d word %0d = %0d want %0d", cur_row, n2, out_data[i], v));
      end
      nout++;
      nin++;
      if (nin == N / LANES) begin
        nin = 0;
        void'(q_row.pop_front());
        void'(q_end.pop_front());
      end
    end

  initial begin
    for (int i = 0; i < 400; i++) xs[i] = $urandom_range(0, 65535) - 32768;
    for (int i = 0; i < PN; i++) begin
      @(negedge clk);
      w[i] = $urandom_range(0, 32767);
      coef_we = 1; coef_addr = ($clog2(PN))'(i); coef_data = coef_t'(w[i]);
    end
    @(negedge clk);
    coef_we = 0;
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      start = 0;
      // frame boundary every M*N/4 samples; rows every N/4 samples after it
      if (t >= PN && (t % (N / 4)) == 0 && nrow < 3 * M) begin
        int r;
        r = ((t / (N / 4)) % M);
        if (r == 0) tend = t - 1;
        if (tend > 0) begin
          start = 1; row = 6'(r); nrow++;
          q_row.push_back(r);
          q_end.push_back(tend);
        end
      end
      wr_en = 1; wr_data = sample_t'(xs[t]);
      mark = ((t + 1) % (PN / 4)) == 0;
    end
    @(negedge clk);
    wr_en = 0;
    repeat (10) @(negedge clk);
    check(nout == nrow * N / LANES, $sformatf("output words %0d for %0d rows", nout, nrow));
    finish_tb();
  end
endmodule
