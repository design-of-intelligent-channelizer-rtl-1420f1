// chan_pkg: widths, the complex sample type and constant helpers shared by
// the channelizer blocks.
//
// Number formats (this design's choice; the channelizer architecture fixes
// no word lengths):
//   * input samples are SAMPLE_W-bit signed integers, one per clock;
//   * filter, window and DDC coefficients are COEF_W-bit signed Q1.15;
//   * twiddle factors and DFT constants are TW_W-bit signed with TW_FRAC
//     fraction bits (1.0 = 65536);
//   * all complex data inside the FFTs is DATA_W bits per rail, wide
//     enough that a full-scale 16-bit input grows through a 1024-point FFT
//     and a 7-point column DFT without any scaling.
package chan_pkg;

  localparam int SAMPLE_W = 16;
  localparam int COEF_W   = 16;
  localparam int COEF_FRAC = 15;
  localparam int TW_W     = 18;
  localparam int TW_FRAC  = 16;
  localparam int DATA_W   = 32;
  localparam int TAG_W    = 8;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [TW_W-1:0]     tw_t;

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  // Frame tag carried alongside every FFT frame:
  //   [7] the Path A (polyphase) half holds a fully primed filter output
  //   [6] the Path B half belongs to a complete high-resolution frame
  //   [5:0] row index m of the high-resolution frame (0..M-1)
  typedef struct packed {
    logic       pdft_ok;
    logic       hr_ok;
    logic [5:0] row;
  } tag_t;

  // Programming of one DDC unit, produced by channel selection.
  //   ch      PDFT channel (0..N/2) that wholly contains the signal
  //   inc     NCO phase step per channel sample, 2^32 = one cycle; the unit
  //           mixes with exp(-j*phase) to move the signal centre to 0 Hz
  //   dec_log the DDC output keeps one sample in 2^dec_log (rate reduction)
  typedef struct packed {
    logic              en;
    logic [15:0]       ch;
    logic signed [31:0] inc;
    logic [2:0]        dec_log;
  } ddc_cfg_t;

  localparam real TWO_PI = 6.283185307179586;

  // Q(TW_FRAC) rounding of a real in [-1, 1].
  function automatic tw_t to_tw(input real v);
    real s;
    s = v * real'(1 << TW_FRAC);
    return tw_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  // Round-to-nearest arithmetic right shift of a product.
  function automatic logic signed [DATA_W-1:0] rshift_round(
      input logic signed [63:0] v, input int sh);
    logic signed [63:0] r;
    r = (v + (64'sd1 <<< (sh - 1))) >>> sh;
    return r[DATA_W-1:0];
  endfunction

  // Complex product of a DATA_W sample with a TW_W factor, rescaled.
  function automatic cplx_t cmul_tw(input cplx_t a, input tw_t wr, input tw_t wi);
    logic signed [63:0] pr, pi;
    cplx_t r;
    pr = 64'(a.re) * 64'(wr) - 64'(a.im) * 64'(wi);
    pi = 64'(a.re) * 64'(wi) + 64'(a.im) * 64'(wr);
    r.re = rshift_round(pr, TW_FRAC);
    r.im = rshift_round(pi, TW_FRAC);
    return r;
  endfunction

  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t csub(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // Multiplicative inverse of a modulo m (a and m relatively prime).
  function automatic int mod_inv(input int a, input int m);
    for (int t = 1; t < m; t++)
      if (((a % m) * t) % m == 1) return t;
    return 1;
  endfunction

  // log base 4 of a power of four.
  function automatic int log4(input int n);
    int r;
    r = 0;
    while (n > 1) begin
      n = n / 4;
      r++;
    end
    return r;
  endfunction

endpackage
