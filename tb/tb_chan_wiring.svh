// Signals that connect channelizer_top to tb_chan_env (N, L, M, NUM_DDC and
// TAPS must be declared before this is included).
  logic                    clk, rst_n, x_valid;
  sample_t                 x_data;
  logic                    pf_coef_we, win_coef_we, ddc_coef_we;
  logic [$clog2(N*L)-1:0]  pf_coef_addr;
  logic [$clog2(M*N)-1:0]  win_coef_addr;
  logic [$clog2(TAPS)-1:0] ddc_coef_addr;
  coef_t                   pf_coef_data, win_coef_data, ddc_coef_data;
  logic [47:0]             threshold;
  logic                    chan_valid;
  logic [$clog2(N)-1:0]    chan_idx [8];
  cplx_t                   chan_data [8];
  logic                    hr_valid, hr_first, hr_last;
  logic [$clog2(M*N)-1:0]  hr_addr [M];
  cplx_t                   hr_data [M];
  logic                    det_valid;
  logic [$clog2(M*N):0]    det_centre2;
  logic [$clog2(M*N)-1:0]  det_bw;
  logic                    scan_done, cfg_load;
  ddc_cfg_t                ddc_cfg [NUM_DDC];
  logic                    ddc_valid [NUM_DDC];
  cplx_t                   ddc_data [NUM_DDC];
  logic [31:0]             pdft_frames, hr_frames;
  logic [15:0]             spe_used, spe_skipped, cs_assigned, cs_dropped, cs_too_wide;
  logic                    overrun;
