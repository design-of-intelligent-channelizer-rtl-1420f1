// tb_ddc_unit: one DDC unit fed with 64-channel PDFT frames (eight channel
// samples per clock, one frame every N/4 = 16 clocks) of random data. A
// reference model in the test picks the configured channel, mixes it with
// the cosine/sine of the top 10 phase bits, runs the 8-tap FIR with the
// random taps loaded through coef_*, and keeps one output in 2^dec_log.
// Four configurations are applied with cfg_load between frames: a first
// channel without decimation, the same configuration again (state must be
// kept), a new channel and offset with decimation by 4 (state must restart),
// and a disabled unit (no output). Outputs are compared in order.
module tb_ddc_unit;
  import chan_pkg::*;
  localparam int N = 64, TAPS = 8, LUT_W = 10, NW = $clog2(N), FR = 40;
  localparam real PI2 = 6.283185307179586;
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, cfg_load = 0, a_valid = 0, coef_we = 0;
  ddc_cfg_t cfg_in = '0, cfg;
  logic [NW-1:0] a_idx [8];
  cplx_t a_data [8];
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  coef_t coef_data = '0;
  logic out_valid;
  cplx_t out_data;
  ddc_unit #(.N(N), .TAPS(TAPS), .LUT_W(LUT_W)) dut (.*);
  always #5 clk = ~clk;

  int  h [TAPS];
  real lr [TAPS], li [TAPS];      // model delay line
  longint unsigned ph;
  int  dc;
  ddc_cfg_t mc;
  real er [$], ei [$];
  int  outs = 0;

  always @(posedge clk)
    if (rst_n && out_valid) begin
      check(er.size() > 0, "output expected");
      if (er.size() > 0) begin
        real r, i;
        r = er.pop_front();
        i = ei.pop_front();
        check($sqrt((out_data.re - r) ** 2 + (out_data.im - i) ** 2) <= 8.0,
              $sformatf("output %0d = (%0d,%0d) want (%0.1f,%0.1f)", outs, out_data.re, out_data.im, r, i));
      end
      outs++;
    end

  task automatic load(input ddc_cfg_t c);
    @(negedge clk);
    cfg_in   = c;
    cfg_load = 1;
    if (c.ch != mc.ch || c.inc != mc.inc || !mc.en) begin
      ph = 0; dc = 0;
      for (int t = 0; t < TAPS; t++) begin lr[t] = 0; li[t] = 0; end
    end
    mc = c;
    @(negedge clk);
    cfg_load = 0;
  endtask

  task automatic frame();
    int xr [N], xi [N];
    for (int k = 0; k < N; k++) begin
      xr[k] = $urandom_range(0, 40000) - 20000;
      xi[k] = $urandom_range(0, 40000) - 20000;
    end
    if (mc.en) begin
      real c, s, yr, yi;
      int idx;
      idx = int'(ph >> (32 - LUT_W));
      c = $cos(PI2 * idx / (1 << LUT_W));
      s = $sin(PI2 * idx / (1 << LUT_W));
      for (int t = TAPS - 1; t > 0; t--) begin lr[t] = lr[t-1]; li[t] = li[t-1]; end
      lr[0] = xr[mc.ch] * c + xi[mc.ch] * s;
      li[0] = xi[mc.ch] * c - xr[mc.ch] * s;
      ph = (ph + longint'(unsigned'(mc.inc))) & 64'hFFFF_FFFF;
      if (dc == 0) begin
        yr = 0; yi = 0;
        for (int t = 0; t < TAPS; t++) begin
          yr += lr[t] * h[t] / 32768.0;
          yi += li[t] * h[t] / 32768.0;
        end
        er.push_back(yr);
        ei.push_back(yi);
      end
      dc = (dc + 1) % (1 << mc.dec_log);
    end
    for (int c = 0; c < N / 8; c++) begin
      @(negedge clk);
      a_valid = 1;
      for (int i = 0; i < 8; i++) begin
        a_idx[i]     = NW'(c * 8 + i);
        a_data[i].re = DATA_W'(xr[c * 8 + i]);
        a_data[i].im = DATA_W'(xi[c * 8 + i]);
      end
    end
    @(negedge clk);
    a_valid = 0;
    repeat (N / 4 - N / 8 - 3) @(negedge clk);
  endtask

  initial begin
    repeat (FR * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    ddc_cfg_t c;
    mc = '0;
    for (int i = 0; i < 8; i++) begin a_idx[i] = '0; a_data[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < TAPS; t++) begin
      @(negedge clk);
      h[t] = $urandom_range(0, 16000) - 8000;
      coef_we = 1; coef_addr = 3'(t); coef_data = coef_t'(h[t]);
    end
    @(negedge clk);
    coef_we = 0;
    c = '0; c.en = 1; c.ch = 16'd13; c.inc = 32'h1234_5678; c.dec_log = 3'd0;
    load(c);
    repeat (8) frame();
    load(c);                                  // unchanged: no restart
    repeat (6) frame();
    c.ch = 16'd50; c.inc = -32'sd300000000; c.dec_log = 3'd2;
    load(c);
    repeat (12) frame();
    c.en = 0;
    load(c);
    repeat (4) frame();
    repeat (20) @(negedge clk);
    check(er.size() == 0, $sformatf("%0d expected outputs missing", er.size()));
    check(outs == 8 + 6 + 3, $sformatf("outputs: %0d", outs));
    finish_tb();
  end
endmodule
