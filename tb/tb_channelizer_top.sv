// tb_channelizer_top: end-to-end test of the channelizer at a reduced size
// (N = 64 branches, L = 4 taps per branch, M = 7, a 448-point
// high-resolution FFT). The stimulus and all checks are in tb_chan_env.
module tb_channelizer_top;
  import chan_pkg::*;
  localparam int N = 64, L = 4, M = 7, NUM_DDC = 4, TAPS = 8;
`include "tb_chan_wiring.svh"
  channelizer_top #(.N(N), .L(L), .M(M), .NUM_DDC(NUM_DDC), .DDC_TAPS(TAPS)) dut (.*);
  tb_chan_env #(.N(N), .L(L), .M(M), .NUM_DDC(NUM_DDC), .DDC_TAPS(TAPS),
                .CYCLES(3000), .HR_BINS(0)) env (.*);
endmodule
