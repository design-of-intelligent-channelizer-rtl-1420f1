// channelizer_top: hybrid wideband channelizer for real-valued input.
//
// A polyphase DFT (PDFT) splits the input into N/2+1 overlapping channels
// (spacing Fs/N, pass band 2*Fs/N, 4x oversampled), so every signal no wider
// than Fs/N lies wholly inside at least one channel. The complex FFT that
// the PDFT needs is shared: its real rail carries the polyphase-filtered
// data (Path A) and its imaginary rail a windowed slice of the input
// (Path B). Path B rows are assembled, M at a time, into an M*N-point
// high-resolution spectrum by the prime factor algorithm (M and N relatively
// prime). Signal parameter estimation finds the occupied bands in that
// spectrum, channel selection gives each a PDFT channel and an NCO offset,
// and a bank of low-rate DDC units extracts the signals from those channels.
//
// Pacing: one input sample per clock at most (x_valid). Every N/4 samples
// (the update time) a new PDFT frame starts, and the polyphase filter and
// window path each deliver eight words per clock into the FFT input buffer.
// Every M updates a new high-resolution frame of M*N samples starts, 75%
// overlapped with the previous one, so the high-resolution spectrum is
// refreshed every M*N/4 samples. Outputs are valid only once enough input
// has arrived to fill the filters (N*L samples) and a high-resolution frame
// (M*N samples).
//
// Coefficients are loaded through the *_coef_* ports: polyphase prototype
// h[0..N*L-1], high-resolution window w[0..M*N-1] and DDC taps. Outputs are
// the channel stream (all bins of each PDFT update, eight per clock), the
// high-resolution spectrum, the detections, the DDC programming and the DDC
// output samples, plus counters of the events the tests observe.
module channelizer_top
  import chan_pkg::*;
#(
  parameter int N        = 1024,
  parameter int L        = 4,
  parameter int M        = 7,
  parameter int NUM_DDC  = 4,
  parameter int DDC_TAPS = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       x_valid,
  input  sample_t                    x_data,
  // coefficient look-up tables
  input  logic                       pf_coef_we,
  input  logic [$clog2(N*L)-1:0]     pf_coef_addr,
  input  coef_t                      pf_coef_data,
  input  logic                       win_coef_we,
  input  logic [$clog2(M*N)-1:0]     win_coef_addr,
  input  coef_t                      win_coef_data,
  input  logic                       ddc_coef_we,
  input  logic [$clog2(DDC_TAPS)-1:0] ddc_coef_addr,
  input  coef_t                      ddc_coef_data,
  input  logic [47:0]                threshold,
  // PDFT channel outputs (Path A)
  output logic                       chan_valid,
  output logic [$clog2(N)-1:0]       chan_idx  [8],
  output cplx_t                      chan_data [8],
  // high-resolution spectrum (Path B)
  output logic                       hr_valid,
  output logic                       hr_first,
  output logic                       hr_last,
  output logic [$clog2(M*N)-1:0]     hr_addr [M],
  output cplx_t                      hr_data [M],
  // signal parameter estimation and channel selection
  output logic                       det_valid,
  output logic [$clog2(M*N):0]       det_centre2,
  output logic [$clog2(M*N)-1:0]     det_bw,
  output logic                       scan_done,
  output ddc_cfg_t                   ddc_cfg   [NUM_DDC],
  output logic                       cfg_load,
  // DDC outputs
  output logic                       ddc_valid [NUM_DDC],
  output cplx_t                      ddc_data  [NUM_DDC],
  // status
  output logic [31:0]                pdft_frames,
  output logic [31:0]                hr_frames,
  output logic [15:0]                spe_used,
  output logic [15:0]                spe_skipped,
  output logic [15:0]                cs_assigned,
  output logic [15:0]                cs_dropped,
  output logic [15:0]                cs_too_wide,
  output logic                       overrun
);
  localparam int D      = N / 4;          // update time, samples
  localparam int NW     = $clog2(N);
  localparam int PF_DEP = N * L + N / 2;
  localparam int HR_DEP = 2 * M * N;

  // ---- update timing -------------------------------------------------------
  logic [31:0]           nsamp;
  logic [$clog2(D)-1:0]  dcnt;
  logic [NW-1:0]         tmod;
  logic [5:0]            rcnt;
  logic                  hr_ok_q;
  wire frame_evt = x_valid && (dcnt == ($clog2(D))'(D - 1));
  wire hr_evt    = frame_evt && (rcnt == 6'(M - 1));

  logic    start;
  logic [NW-1:0] phase;
  tag_t    tag;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nsamp <= '0; dcnt <= '0; tmod <= '0; rcnt <= '0; hr_ok_q <= 1'b0;
      start <= 1'b0; phase <= '0; tag <= '0; pdft_frames <= '0; hr_frames <= '0;
    end else begin
      start <= frame_evt;
      if (x_valid) begin
        nsamp <= nsamp + 1'b1;
        dcnt  <= dcnt + 1'b1;
        tmod  <= tmod + 1'b1;
      end
      if (frame_evt) begin
        rcnt        <= (rcnt == 6'(M - 1)) ? '0 : rcnt + 1'b1;
        phase       <= tmod;
        pdft_frames <= pdft_frames + 1'b1;
        tag.pdft_ok <= (nsamp + 1 >= 32'(N * L));
        if (hr_evt) begin
          tag.row   <= '0;
          tag.hr_ok <= (nsamp + 1 >= 32'(M * N));
          hr_ok_q   <= (nsamp + 1 >= 32'(M * N));
          if (nsamp + 1 >= 32'(M * N)) hr_frames <= hr_frames + 1'b1;
        end else begin
          tag.row   <= tag.row + 1'b1;
          tag.hr_ok <= hr_ok_q;
        end
      end
    end
  end

  // ---- Path A: PDFT data buffer and polyphase filter bank (CPE1) ----------
  logic [$clog2(PF_DEP)-1:0] pf_rd_delay [8*L];
  sample_t                   pf_rd_data  [8*L];
  sample_buffer #(.DEPTH(PF_DEP), .RD(8*L)) u_pf_buf (
    .clk, .rst_n, .wr_en(x_valid), .wr_data(x_data), .mark(frame_evt),
    .rd_delay(pf_rd_delay), .rd_data(pf_rd_data));

  logic                     pf_valid;
  logic [NW-1:0]            pf_idx;
  logic signed [DATA_W-1:0] pf_out [8];
  polyphase_filter #(.N(N), .L(L), .LANES(8), .DEPTH(PF_DEP)) u_pf (
    .clk, .rst_n, .start, .phase,
    .coef_we(pf_coef_we), .coef_addr(pf_coef_addr), .coef_data(pf_coef_data),
    .rd_delay(pf_rd_delay), .rd_data(pf_rd_data),
    .out_valid(pf_valid), .out_idx(pf_idx), .out_data(pf_out));

  // ---- Path B: high-resolution data buffer and windowing ------------------
  logic [$clog2(HR_DEP)-1:0] hb_rd_delay [8];
  sample_t                   hb_rd_data  [8];
  sample_buffer #(.DEPTH(HR_DEP), .RD(8)) u_hr_buf (
    .clk, .rst_n, .wr_en(x_valid), .wr_data(x_data), .mark(hr_evt),
    .rd_delay(hb_rd_delay), .rd_data(hb_rd_data));

  logic                     win_valid;
  logic [NW-1:0]            win_idx;
  logic signed [DATA_W-1:0] win_out [8];
  window_path #(.N(N), .M(M), .LANES(8), .DEPTH(HR_DEP)) u_win (
    .clk, .rst_n, .start, .row(tag.row),
    .coef_we(win_coef_we), .coef_addr(win_coef_addr), .coef_data(win_coef_data),
    .rd_delay(hb_rd_delay), .rd_data(hb_rd_data),
    .out_valid(win_valid), .out_idx(win_idx), .out_data(win_out));

  a_paths_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    win_valid == pf_valid && (!pf_valid || win_idx == pf_idx));

  // ---- packing and complex-data FFT (CPE2) ---------------------------------
  logic [NW-1:0] fi_addr [8];
  cplx_t         fi_data [8];
  for (genvar i = 0; i < 8; i++) begin : g_pack
    assign fi_addr[i]    = pf_idx + NW'(i);
    assign fi_data[i].re = pf_out[i];
    assign fi_data[i].im = win_out[i];
  end

  logic          fo_valid, fft_ovr;
  logic [NW-1:0] fo_addr [8];
  cplx_t         fo_data [8];
  tag_t          fo_tag;
  fft_r4_pipeline #(.N(N), .LANES(8)) u_fft (
    .clk, .rst_n, .in_valid(pf_valid), .in_addr(fi_addr), .in_data(fi_data), .in_tag(tag),
    .out_valid(fo_valid), .out_addr(fo_addr), .out_data(fo_data), .out_tag(fo_tag),
    .overrun(fft_ovr));

  // ---- re-ordering and unpacking -------------------------------------------
  logic          up_valid, up_last;
  logic [NW-1:0] up_idx [8];
  cplx_t         up_a [8], up_b [8];
  tag_t          up_tag;
  fft_unpack #(.N(N), .LANES(8)) u_unpack (
    .clk, .rst_n, .in_valid(fo_valid), .in_addr(fo_addr), .in_data(fo_data), .in_tag(fo_tag),
    .out_valid(up_valid), .out_last(up_last), .out_idx(up_idx), .a_data(up_a), .b_data(up_b),
    .out_tag(up_tag));

  assign chan_valid = up_valid & up_tag.pdft_ok;
  assign chan_idx   = up_idx;
  assign chan_data  = up_a;

  // ---- high-resolution FFT column stage (CPE4) -----------------------------
  logic hr_ovr;
  hr_column_stage #(.N(N), .M(M)) u_hr (
    .clk, .rst_n, .in_valid(up_valid & up_tag.hr_ok), .in_row(up_tag.row),
    .in_idx(up_idx), .in_data(up_b),
    .out_valid(hr_valid), .out_first(hr_first), .out_last(hr_last),
    .out_addr(hr_addr), .out_data(hr_data), .overrun(hr_ovr));

  // ---- signal parameter estimation (CPE5) and channel selection -----------
  logic scan_start;
  spe_detector #(.N(N), .M(M)) u_spe (
    .clk, .rst_n, .in_valid(hr_valid), .in_first(hr_first), .in_last(hr_last),
    .in_addr(hr_addr), .in_data(hr_data), .threshold,
    .scan_start, .scan_done, .det_valid, .det_centre2, .det_bw,
    .used(spe_used), .skipped(spe_skipped));

  channel_select #(.N(N), .M(M), .NUM_DDC(NUM_DDC)) u_cs (
    .clk, .rst_n, .scan_start, .scan_done, .det_valid, .det_centre2, .det_bw,
    .cfg(ddc_cfg), .cfg_load, .assigned(cs_assigned), .dropped(cs_dropped),
    .too_wide(cs_too_wide));

  // ---- DDC bank (CPE3) ------------------------------------------------------
  for (genvar u = 0; u < NUM_DDC; u++) begin : g_ddc
    ddc_unit #(.N(N), .TAPS(DDC_TAPS)) u_ddc (
      .clk, .rst_n, .cfg_in(ddc_cfg[u]), .cfg_load,
      .a_valid(chan_valid), .a_idx(up_idx), .a_data(up_a),
      .coef_we(ddc_coef_we), .coef_addr(ddc_coef_addr), .coef_data(ddc_coef_data),
      .out_valid(ddc_valid[u]), .out_data(ddc_data[u]), .cfg());
  end

  assign overrun = fft_ovr | hr_ovr;

endmodule
