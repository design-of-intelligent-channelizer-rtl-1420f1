// tb_channelizer_full: end-to-end test of channelizer_top at its default
// size: N = 1024 branches (512 channels), L = 4 taps per branch, M = 7, so a
// 7168-point high-resolution FFT, four DDC units. The stimulus and checks are
// those of tb_chan_env; high-resolution spectra are checked on 64 bins each.
module tb_channelizer_full;
  import chan_pkg::*;
  localparam int N = 1024, L = 4, M = 7, NUM_DDC = 4, TAPS = 8;
`include "tb_chan_wiring.svh"
  channelizer_top dut (.*);
  tb_chan_env #(.N(N), .L(L), .M(M), .NUM_DDC(NUM_DDC), .DDC_TAPS(TAPS),
                .CYCLES(26000), .HR_BINS(64)) env (.*);
endmodule
