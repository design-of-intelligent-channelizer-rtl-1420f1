// tb_chan_env: stimulus and checking environment for channelizer_top, shared
// by the reduced-size and the full-size end-to-end testbenches. It drives the
// design's inputs and checks its outputs; the testbench that uses it
// instantiates the design and connects the two.
//
// Stimulus: polyphase prototype = Hann-windowed sinc with cutoff Fs/N,
// high-resolution window = periodic Hann, DDC taps = 8-tap boxcar (unity DC
// gain). The input is a sum of real tones on integer high-resolution bins:
// five isolated tones (at 50, 100, 150, 180 and 200 * N/64) and a cluster of
// five tones 3 bins apart (15 bins) that no single channel can contain.
//
// Checks, all against values computed here from the stimulus:
//   * PDFT channel bins k = 0..N/2 of selected updates against the direct
//     DDC formula  y_k(t) = sum_i h[i] x[t-i] exp(-j 2 pi k (t-i)/N), using
//     the same rounding of the filter outputs as the datapath;
//   * high-resolution spectra against the direct M*N-point DFT of the
//     windowed frame (all bins, or HR_BINS bins at full size), and that every
//     bin appears once per spectrum;
//   * update periods: N/4 clocks between PDFT updates, M*N/4 between
//     high-resolution spectra;
//   * the detections (centre and bandwidth), the channel, NCO step and rate
//     reduction given to each DDC unit, and the counts of dropped and too-wide
//     signals;
//   * that each DDC output is a steady phasor (the tone moved to 0 Hz).
// Every mechanism (PDFT update, high-resolution update, skipped spectrum,
// detection, dropped detection, too-wide signal, rate reduction, DDC output)
// must occur at least once.
module tb_chan_env
  import chan_pkg::*;
#(
  parameter int N        = 64,
  parameter int L        = 4,
  parameter int M        = 7,
  parameter int NUM_DDC  = 4,
  parameter int DDC_TAPS = 8,
  parameter int CYCLES   = 3000,
  parameter int HR_BINS  = 0      // 0: check every bin of a spectrum
) (
  output logic                        clk,
  output logic                        rst_n,
  output logic                        x_valid,
  output sample_t                     x_data,
  output logic                        pf_coef_we,
  output logic [$clog2(N*L)-1:0]      pf_coef_addr,
  output coef_t                       pf_coef_data,
  output logic                        win_coef_we,
  output logic [$clog2(M*N)-1:0]      win_coef_addr,
  output coef_t                       win_coef_data,
  output logic                        ddc_coef_we,
  output logic [$clog2(DDC_TAPS)-1:0] ddc_coef_addr,
  output coef_t                       ddc_coef_data,
  output logic [47:0]                 threshold,
  input  logic                        chan_valid,
  input  logic [$clog2(N)-1:0]        chan_idx  [8],
  input  cplx_t                       chan_data [8],
  input  logic                        hr_valid,
  input  logic                        hr_first,
  input  logic                        hr_last,
  input  logic [$clog2(M*N)-1:0]      hr_addr [M],
  input  cplx_t                       hr_data [M],
  input  logic                        det_valid,
  input  logic [$clog2(M*N):0]        det_centre2,
  input  logic [$clog2(M*N)-1:0]      det_bw,
  input  logic                        scan_done,
  input  ddc_cfg_t                    ddc_cfg   [NUM_DDC],
  input  logic                        cfg_load,
  input  logic                        ddc_valid [NUM_DDC],
  input  cplx_t                       ddc_data  [NUM_DDC],
  input  logic [31:0]                 pdft_frames,
  input  logic [31:0]                 hr_frames,
  input  logic [15:0]                 spe_used,
  input  logic [15:0]                 spe_skipped,
  input  logic [15:0]                 cs_assigned,
  input  logic [15:0]                 cs_dropped,
  input  logic [15:0]                 cs_too_wide,
  input  logic                        overrun
);
  localparam int  PN   = M * N;
  localparam int  D    = N / 4;
  localparam int  NT   = 10;
  localparam int  AMP  = 2000;
  localparam real PI2  = 6.283185307179586;

  int  checks = 0, failures = 0;
  int  cyc = 0;
  int  hcoef [N*L];
  int  wcoef [PN];
  int  xs    [CYCLES];
  int  tone_bin [NT];
  real cs_tab [PN], sn_tab [PN];     // cos/sin(2 pi i / PN)

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endfunction

  function automatic int rnd(input real v);
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  function automatic longint rsr(input longint v, input int sh);
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  initial begin : stim
    real g, t0, sum;
    for (int i = 0; i < PN; i++) begin
      cs_tab[i] = $cos(PI2 * i / PN);
      sn_tab[i] = $sin(PI2 * i / PN);
    end
    // prototype filter, peak about 0.5
    for (int i = 0; i < N * L; i++) begin
      t0 = (i - (N * L - 1) / 2.0) * 2.0 / N;
      g  = (t0 == 0.0) ? 1.0 : $sin(3.141592653589793 * t0) / (3.141592653589793 * t0);
      g  = g * (0.5 - 0.5 * $cos(PI2 * (i + 0.5) / (N * L)));
      hcoef[i] = rnd(16384.0 * g);
    end
    for (int i = 0; i < PN; i++) wcoef[i] = rnd(32767.0 * (0.5 - 0.5 * cs_tab[i]));
    tone_bin[0] = 50 * N / 64;   tone_bin[1] = 100 * N / 64;  tone_bin[2] = 150 * N / 64;
    tone_bin[3] = 180 * N / 64;  tone_bin[4] = 200 * N / 64;
    for (int k = 5; k < NT; k++) tone_bin[k] = 20 * N / 64 + 3 * (k - 5);
    for (int t = 0; t < CYCLES; t++) begin
      sum = 0.0;
      for (int k = 0; k < NT; k++)
        sum += AMP * cs_tab[(longint'(tone_bin[k]) * t + k * 97) % PN];
      xs[t] = rnd(sum);
    end
  end

  // ---- clock, reset, coefficient load, input stream ------------------------
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    rst_n = 1'b0; x_valid = 1'b0; x_data = '0;
    pf_coef_we = 1'b0; win_coef_we = 1'b0; ddc_coef_we = 1'b0;
    pf_coef_addr = '0; win_coef_addr = '0; ddc_coef_addr = '0;
    pf_coef_data = '0; win_coef_data = '0; ddc_coef_data = '0;
    threshold = 48'd20000;
    #1;
    for (int i = 0; i < ((PN > N * L) ? PN : N * L); i++) begin
      @(negedge clk);
      pf_coef_we    = (i < N * L);
      pf_coef_addr  = ($clog2(N*L))'(i);
      pf_coef_data  = coef_t'(hcoef[i % (N * L)]);
      win_coef_we   = 1'b1;
      win_coef_addr = ($clog2(PN))'(i % PN);
      win_coef_data = coef_t'(wcoef[i % PN]);
      ddc_coef_we   = (i < DDC_TAPS);
      ddc_coef_addr = ($clog2(DDC_TAPS))'(i);
      ddc_coef_data = 16'sd4096;
    end
    @(negedge clk);
    pf_coef_we = 1'b0; win_coef_we = 1'b0; ddc_coef_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      x_valid = 1'b1;
      x_data  = sample_t'(xs[t]);
    end
    @(negedge clk);
    x_valid = 1'b0;
    repeat (20) @(negedge clk);
    finish_test();
  end

  // ---- PDFT channel check ---------------------------------------------------
  cplx_t afr [N];
  int    cfr = 0, c_in = 0, last_start = -1;
  bit    prev_cv = 0;
  int    n_chan_frames = 0;

  function automatic void check_chan_frame(input int j);
    int  t;
    int  u [N];
    real rr, ri, err, peak;
    t = N * L - 1 + j * D;
    for (int jb = 0; jb < N; jb++) begin
      longint acc = 0;
      for (int l = 0; l < L; l++) acc += longint'(hcoef[jb + l * N]) * xs[t - jb - l * N];
      u[((t - jb) % N + N) % N] = int'(rsr(acc, 15));
    end
    peak = 1.0;
    for (int k = 0; k <= N / 2; k++) begin
      rr = 0.0; ri = 0.0;
      for (int n = 0; n < N; n++) begin
        rr += u[n] * cs_tab[((k * n) % N) * M];
        ri -= u[n] * sn_tab[((k * n) % N) * M];
      end
      if ($sqrt(rr * rr + ri * ri) > peak) peak = $sqrt(rr * rr + ri * ri);
    end
    for (int k = 0; k <= N / 2; k++) begin
      rr = 0.0; ri = 0.0;
      for (int n = 0; n < N; n++) begin
        rr += u[n] * cs_tab[((k * n) % N) * M];
        ri -= u[n] * sn_tab[((k * n) % N) * M];
      end
      err = $sqrt((rr - afr[k].re) ** 2 + (ri - afr[k].im) ** 2);
      check(err <= 1e-4 * peak + 16.0,
            $sformatf("PDFT update %0d bin %0d: got (%0d,%0d) want (%0.1f,%0.1f)",
                      j, k, afr[k].re, afr[k].im, rr, ri));
    end
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (chan_valid && rst_n) begin
      if (!prev_cv) begin
        if (last_start >= 0) check(cyc - last_start == D,
                                   $sformatf("PDFT update period is N/4 clocks (%0d)", cyc - last_start));
        last_start = cyc;
        c_in = 0;
      end
      for (int i = 0; i < 8; i++) afr[chan_idx[i]] = chan_data[i];
      c_in++;
      if (c_in == N / 8) begin
        if (cfr < 3 || cfr == 12) check_chan_frame(cfr);
        cfr++;
        n_chan_frames++;
      end
    end
    prev_cv = chan_valid && rst_n;
  end

  // ---- high-resolution spectrum check ---------------------------------------
  cplx_t hfr [PN];
  int    hseen [PN];
  int    hsp = 0, hr_last_start = -1;

  function automatic void check_hr(input int j);
    int  t0;
    int  xw [PN];
    real rr, ri, err, peak;
    int  kk, nb;
    t0 = PN - 1 + j * M * D - (PN - 1);
    for (int n = 0; n < PN; n++) xw[n] = int'(rsr(longint'(xs[t0 + n]) * wcoef[n], 15));
    peak = AMP / 2.0 * PN / 2.0;
    nb = (HR_BINS == 0) ? PN : HR_BINS;
    for (int b = 0; b < nb; b++) begin
      kk = (HR_BINS == 0) ? b : (b < NT ? tone_bin[b] : (b * 7919) % PN);
      rr = 0.0; ri = 0.0;
      for (int n = 0; n < PN; n++) begin
        rr += xw[n] * cs_tab[(longint'(kk) * n) % PN];
        ri -= xw[n] * sn_tab[(longint'(kk) * n) % PN];
      end
      err = $sqrt((rr - hfr[kk].re) ** 2 + (ri - hfr[kk].im) ** 2);
      check(err <= 1e-4 * peak + 16.0,
            $sformatf("HR spectrum %0d bin %0d: got (%0d,%0d) want (%0.1f,%0.1f)",
                      j, kk, hfr[kk].re, hfr[kk].im, rr, ri));
    end
  endfunction

  always @(posedge clk) begin
    if (hr_valid && rst_n) begin
      if (hr_first) begin
        if (hr_last_start >= 0) check(cyc - hr_last_start == M * D,
                                      "high-resolution update period is M*N/4 clocks");
        hr_last_start = cyc;
        for (int k = 0; k < PN; k++) hseen[k] = 0;
      end
      for (int i = 0; i < M; i++) begin
        hfr[hr_addr[i]] = hr_data[i];
        hseen[hr_addr[i]]++;
      end
      if (hr_last) begin
        int bad;
        bad = 0;
        for (int k = 0; k < PN; k++) if (hseen[k] != 1) bad++;
        check(bad == 0, "every high-resolution bin produced exactly once");
        if ((hsp < 2 || hsp == 4) && !$test$plusargs("nohr")) check_hr(hsp);
        hsp++;
      end
    end
  end

  // ---- detections, channel selection, DDC ----------------------------------
  int    n_det = 0, n_scans = 0, n_dec = 0, n_load = 0, n_ddc_out = 0;
  int    det_c2 [$];
  int    det_bw_q [$];
  int    ddc_cnt [NUM_DDC];
  cplx_t ddc_prev [NUM_DDC];
  real   gdc;

  initial begin
    for (int u = 0; u < NUM_DDC; u++) ddc_cnt[u] = 0;
    #2;
    gdc = 0.0;
    for (int i = 0; i < N * L; i++) gdc += hcoef[i] / 32768.0;
  end

  // expected detections of one scan, in frequency order
  function automatic void check_scan();
    int ec2 [6], ebw [6];
    ec2[0] = 2 * (tone_bin[5] + 6);  ebw[0] = 15;
    for (int i = 0; i < 5; i++) begin
      ec2[i+1] = 2 * tone_bin[i];
      ebw[i+1] = 3;
    end
    check(det_c2.size() == 6, $sformatf("scan found %0d signals, want 6", det_c2.size()));
    for (int i = 0; i < 6 && i < det_c2.size(); i++)
      check(det_c2[i] == ec2[i] && det_bw_q[i] == ebw[i],
            $sformatf("detection %0d: centre2 %0d bw %0d, want %0d %0d",
                      i, det_c2[i], det_bw_q[i], ec2[i], ebw[i]));
  endfunction

  always @(posedge clk) begin
    if (det_valid && rst_n) begin
      det_c2.push_back(int'(det_centre2));
      det_bw_q.push_back(int'(det_bw));
      n_det++;
    end
    if (scan_done && rst_n) begin
      n_scans++;
      check_scan();
      det_c2.delete();
      det_bw_q.delete();
    end
    if (cfg_load && rst_n) begin
      n_load++;
      for (int u = 0; u < NUM_DDC; u++) begin
        longint ch, off2, inc;
        int     d;
        ch   = (2 * tone_bin[u] + M) / (2 * M);
        off2 = 2 * tone_bin[u] - 2 * M * ch;
        inc  = (off2 * (longint'(1) << 32)) / (8 * M);
        d    = 0;
        while (d < 3 && 3 * (1 << (d + 2)) <= 4 * M) d++;
        if (u < 5) begin
          check(ddc_cfg[u].en && ddc_cfg[u].ch == 16'(ch) && ddc_cfg[u].inc == 32'(inc) &&
                ddc_cfg[u].dec_log == 3'(d),
                $sformatf("DDC %0d programmed ch %0d inc %0d dec %0d, want %0d %0d %0d", u,
                          ddc_cfg[u].ch, ddc_cfg[u].inc, ddc_cfg[u].dec_log, ch, inc, d));
        end
        if (ddc_cfg[u].dec_log != 0) n_dec++;
      end
    end
    for (int u = 0; u < NUM_DDC; u++)
      if (ddc_valid[u] && rst_n) begin
        real mag, dif;
        ddc_cnt[u]++;
        n_ddc_out++;
        mag = $sqrt(real'(ddc_data[u].re) ** 2 + real'(ddc_data[u].im) ** 2);
        dif = $sqrt(real'(ddc_data[u].re - ddc_prev[u].re) ** 2 +
                    real'(ddc_data[u].im - ddc_prev[u].im) ** 2);
        if (ddc_cnt[u] >= 4) begin
          check(mag >= 0.3 * (AMP / 2.0) * gdc,
                $sformatf("DDC %0d output level %0.1f too low", u, mag));
          check(dif <= 0.05 * mag,
                $sformatf("DDC %0d output not a steady phasor (%0.1f vs %0.1f)", u, dif, mag));
        end
        ddc_prev[u] = ddc_data[u];
      end
  end

  task automatic finish_test();
    check(overrun == 1'b0, "no buffer overrun");
    check(n_chan_frames >= 2, $sformatf("PDFT updates seen: %0d", n_chan_frames));
    check(hsp >= 2, $sformatf("high-resolution spectra seen: %0d", hsp));
    check(n_scans >= 1, $sformatf("SPE scans: %0d", n_scans));
    check(n_det >= 6, $sformatf("detections: %0d", n_det));
    check(spe_skipped >= 1, $sformatf("spectra skipped while scanning: %0d", spe_skipped));
    check(cs_dropped == 16'(n_scans), $sformatf("dropped detections: %0d", cs_dropped));
    check(cs_too_wide == 16'(n_scans), $sformatf("too-wide signals: %0d", cs_too_wide));
    check(cs_assigned == 16'(NUM_DDC * n_scans), $sformatf("assignments: %0d", cs_assigned));
    check(n_dec >= 1, "rate reduction used");
    for (int u = 0; u < NUM_DDC; u++)
      check(ddc_cnt[u] >= 5, $sformatf("DDC %0d outputs: %0d", u, ddc_cnt[u]));
    $display("mechanisms: pdft_updates=%0d (core %0d) hr_spectra=%0d (core %0d) scans=%0d used=%0d skipped=%0d detections=%0d assigned=%0d dropped=%0d too_wide=%0d rate_reduced_units=%0d ddc_outputs=%0d",
             n_chan_frames, pdft_frames, hsp, hr_frames, n_scans, spe_used, spe_skipped, n_det,
             cs_assigned, cs_dropped, cs_too_wide, n_dec, n_ddc_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat (CYCLES + ((PN > N * L) ? PN : N * L) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
