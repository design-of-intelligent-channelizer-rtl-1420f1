// fft_r4_stage: one stage of the pipelined radix-4 decimation-in-frequency
// FFT (one fine-grain element of CPE2), with its double-buffered input memory.
//
// Frames arrive as N/LANES write cycles of LANES complex words each, at any
// addresses. When the last write cycle of a frame lands, the two banks swap:
// the full bank is processed while the other one fills with the next frame.
// Processing runs LANES/4 radix-4 butterflies per clock (two for LANES = 8),
// so a frame leaves the stage N/8 clocks after it starts, well within the
// N/4-clock update period. Frames may arrive no faster than that; a frame
// completing while the previous one is still being processed sets `overrun`.
//
// Stage s (STAGE) uses span S = N/4^(s+1). Butterfly b reads
// x[base + q*S], q = 0..3, with base = (b/S)*4S + b%S, forms
//   X0 = (x0+x2) + (x1+x3)       X2 = (x0+x2) - (x1+x3)
//   X1 = (x0-x2) - j(x1-x3)      X3 = (x0-x2) + j(x1-x3)
// and multiplies Xp by W_N^(p * (b%S) * 4^s), writing it to base + p*S (in
// place). After the last stage word position pos holds frequency bin
// digit-reverse-4(pos). Twiddles come from a ROM of N entries computed when
// the design is elaborated. No scaling is applied; DATA_W leaves headroom.
//
// Pipeline: memory read (1 clock), butterfly (1), twiddle multiply (1); the
// first output cycle comes 3 clocks after the swap. A tag is latched at the
// swap and presented with the frame's outputs from its first output cycle
// until the next frame's first output cycle. Frames may follow each other
// back to back (one every N/8 clocks).
module fft_r4_stage
  import chan_pkg::*;
#(
  parameter int N     = 1024,
  parameter int STAGE = 0,
  parameter int LANES = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_addr [LANES],
  input  cplx_t                in_data [LANES],
  input  tag_t                 in_tag,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_addr [LANES],
  output cplx_t                out_data [LANES],
  output tag_t                 out_tag,
  output logic                 out_first,
  output logic                 overrun
);
  localparam int NW   = $clog2(N);
  localparam int BF   = LANES / 4;                 // butterflies per clock
  localparam int CYC  = N / LANES;
  localparam int SPAN = N >> (2 * (STAGE + 1));
  localparam int TSTEP = 1 << (2 * STAGE);

  typedef tw_t rom_t [N];
  function automatic rom_t gen_cos();
    rom_t r;
    for (int i = 0; i < N; i++) r[i] = to_tw($cos(TWO_PI * i / N));
    return r;
  endfunction
  function automatic rom_t gen_msin();
    rom_t r;
    for (int i = 0; i < N; i++) r[i] = to_tw(-$sin(TWO_PI * i / N));
    return r;
  endfunction
  localparam rom_t TW_RE = gen_cos();
  localparam rom_t TW_IM = gen_msin();

  cplx_t mem [2][N];
  logic                wb;          // bank being written
  logic [$clog2(CYC+1)-1:0] wcnt;
  logic                run;
  logic [$clog2(CYC+1)-1:0] pcnt;
  logic                rb;
  tag_t                cur_tag;
  logic                f1, f2;      // first output clock of a frame, delayed
  tag_t                tag1, tag2;  // frame tag, delayed to line up with the outputs

  wire frame_done = in_valid && (wcnt == ($clog2(CYC+1))'(CYC - 1));

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int i = 0; i < LANES; i++) mem[wb][in_addr[i]] <= in_data[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb      <= 1'b0;
      wcnt    <= '0;
      run     <= 1'b0;
      pcnt    <= '0;
      rb      <= 1'b0;
      overrun <= 1'b0;
      out_tag <= '0;
      cur_tag <= '0;
    end else begin
      if (f2) out_tag <= tag2;
      if (in_valid) wcnt <= frame_done ? '0 : wcnt + 1'b1;
      if (frame_done) begin
        wb      <= ~wb;
        rb      <= wb;
        run     <= 1'b1;
        pcnt    <= '0;
        cur_tag <= in_tag;
        if (run && pcnt != ($clog2(CYC+1))'(CYC - 1)) overrun <= 1'b1;
      end else if (run) begin
        pcnt <= pcnt + 1'b1;
        if (pcnt == ($clog2(CYC+1))'(CYC - 1)) run <= 1'b0;
      end
    end
  end

  // ---- read -----------------------------------------------------------------
  cplx_t         x   [BF][4];
  logic [NW-1:0] bas [BF];
  logic [NW-1:0] jj  [BF];
  logic          v1, v2;
  always_ff @(posedge clk) begin
    v1 <= rst_n & run;
    f1 <= run && (pcnt == '0);
    tag1 <= cur_tag;
    tag2 <= tag1;
    v2 <= rst_n & v1;
    f2 <= f1;
    out_valid <= rst_n & v2;
    out_first <= f2;
  end
  for (genvar u = 0; u < BF; u++) begin : g_bf
    logic [NW-1:0] b, j, base;
    assign b    = NW'(pcnt) * NW'(BF) + NW'(u);
    assign j    = NW'(b % NW'(SPAN));
    assign base = NW'((b / NW'(SPAN)) * NW'(4 * SPAN)) + j;
    always_ff @(posedge clk) begin
      for (int q = 0; q < 4; q++) x[u][q] <= mem[rb][base + NW'(q * SPAN)];
      bas[u] <= base;
      jj[u]  <= j;
    end

    // ---- butterfly ---------------------------------------------------------
    cplx_t         y  [4];
    logic [NW-1:0] b2, j2;
    always_ff @(posedge clk) begin
      cplx_t t0, t1, t2, t3;
      t0 = cadd(x[u][0], x[u][2]);
      t1 = csub(x[u][0], x[u][2]);
      t2 = cadd(x[u][1], x[u][3]);
      t3 = csub(x[u][1], x[u][3]);
      y[0] <= cadd(t0, t2);
      y[2] <= csub(t0, t2);
      y[1].re <= t1.re + t3.im;       // t1 - j*t3
      y[1].im <= t1.im - t3.re;
      y[3].re <= t1.re - t3.im;       // t1 + j*t3
      y[3].im <= t1.im + t3.re;
      b2 <= bas[u];
      j2 <= jj[u];
    end

    // ---- twiddle multiply --------------------------------------------------
    for (genvar p = 0; p < 4; p++) begin : g_tw
      logic [NW-1:0] e;
      assign e = NW'(j2 * NW'(p * TSTEP));
      always_ff @(posedge clk) begin
        out_data[4*u+p] <= (p == 0) ? y[p] : cmul_tw(y[p], TW_RE[e], TW_IM[e]);
        out_addr[4*u+p] <= b2 + NW'(p * SPAN);
      end
    end
  end

endmodule
