// ddc_unit: one low-rate digital down-converter with rate reduction
// (a branch of coarse-grain element CPE3), working on one PDFT channel.
//
// Each PDFT update delivers one sample of every channel; the unit picks the
// sample of channel cfg.ch from the unpacked Path A stream and then runs
//   1. frequency shift  y = x * exp(-j*phase), phase += cfg.inc
//                      (numerically controlled oscillator, 2^LUT_W-entry
//                       cosine/sine table indexed by the top phase bits);
//   2. filtering        one tap product y[n-t]*h[t] per clock, t = 0..TAPS-1;
//   3. summing          accumulation of the products, rounded by 15 bits;
// and keeps one filtered sample in 2^cfg.dec_log (sample rate conversion by
// an integer factor). All of this takes TAPS + 3 clocks, far inside the
// N/4-clock update period, so one multiplier pair per unit is enough.
// Real-valued FIR taps h[0..TAPS-1] (Q1.15) are written through coef_*.
// cfg_load applies a new cfg; if the channel or the offset changes, the
// oscillator phase, the delay line and the decimation count restart.
module ddc_unit
  import chan_pkg::*;
#(
  parameter int N     = 1024,
  parameter int TAPS  = 8,
  parameter int LUT_W = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ddc_cfg_t             cfg_in,
  input  logic                 cfg_load,
  input  logic                 a_valid,
  input  logic [$clog2(N)-1:0] a_idx  [8],
  input  cplx_t                a_data [8],
  input  logic                 coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_addr,
  input  coef_t                coef_data,
  output logic                 out_valid,
  output cplx_t                out_data,
  output ddc_cfg_t             cfg
);
  localparam int TW = $clog2(TAPS);

  typedef tw_t lut_t [1 << LUT_W];
  function automatic lut_t gen(input bit use_sin);
    lut_t r;
    for (int i = 0; i < (1 << LUT_W); i++)
      r[i] = use_sin ? to_tw($sin(TWO_PI * i / (1 << LUT_W)))
                     : to_tw($cos(TWO_PI * i / (1 << LUT_W)));
    return r;
  endfunction
  localparam lut_t COS = gen(1'b0);
  localparam lut_t SIN = gen(1'b1);

  coef_t h [TAPS];
  always_ff @(posedge clk)
    if (coef_we) h[coef_addr] <= coef_data;

  typedef enum logic [1:0] {IDLE, MIX, FILT, SUM} state_t;
  state_t state;

  cplx_t              xin;
  cplx_t              line [TAPS];
  logic [31:0]        phase;
  logic [TW:0]        t;
  logic               pv;
  logic signed [63:0] pr, pi, accr, acci;
  logic [2:0]         dcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE; cfg <= '0; phase <= '0; dcnt <= '0; t <= '0; pv <= 1'b0;
      accr <= '0; acci <= '0; out_valid <= 1'b0; out_data <= '0; xin <= '0;
      for (int i = 0; i < TAPS; i++) line[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      pv        <= 1'b0;
      if (cfg_load) begin
        cfg <= cfg_in;
        if (cfg_in.ch != cfg.ch || cfg_in.inc != cfg.inc || !cfg.en) begin
          phase <= '0;
          dcnt  <= '0;
          for (int i = 0; i < TAPS; i++) line[i] <= '0;
        end
      end
      case (state)
        IDLE: if (a_valid && cfg.en)
          for (int i = 0; i < 8; i++)
            if (16'(a_idx[i]) == cfg.ch) begin
              xin   <= a_data[i];
              state <= MIX;
            end
        MIX: begin            // stage 1: frequency shift by exp(-j*phase)
          cplx_t y;
          y.re = rshift_round(64'(xin.re) * 64'(COS[phase[31 -: LUT_W]]) +
                              64'(xin.im) * 64'(SIN[phase[31 -: LUT_W]]), TW_FRAC);
          y.im = rshift_round(64'(xin.im) * 64'(COS[phase[31 -: LUT_W]]) -
                              64'(xin.re) * 64'(SIN[phase[31 -: LUT_W]]), TW_FRAC);
          line[0] <= y;
          for (int i = 1; i < TAPS; i++) line[i] <= line[i-1];
          phase <= phase + cfg.inc;
          t     <= '0;
          accr  <= '0;
          acci  <= '0;
          state <= FILT;
        end
        FILT: begin           // stage 2: one tap product per clock
          pr <= 64'(line[t[TW-1:0]].re) * 64'(h[t[TW-1:0]]);
          pi <= 64'(line[t[TW-1:0]].im) * 64'(h[t[TW-1:0]]);
          pv <= 1'b1;
          t  <= t + 1'b1;
          if (32'(t) == TAPS - 1) state <= SUM;
        end
        SUM: if (!pv) begin   // stage 3 finishes: round and decimate
          if (dcnt == '0) begin
            out_valid   <= 1'b1;
            out_data.re <= rshift_round(accr, COEF_FRAC);
            out_data.im <= rshift_round(acci, COEF_FRAC);
          end
          dcnt  <= (dcnt + 1'b1) & ((3'd1 << cfg.dec_log) - 1'b1);
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
      if (pv) begin           // stage 3: summing
        accr <= accr + pr;
        acci <= acci + pi;
      end
    end
  end

endmodule
