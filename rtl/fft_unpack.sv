// fft_unpack: output memory of the complex FFT, re-ordering and separation of
// the two real-data spectra it carries.
//
// The FFT output words arrive in digit-reversed position order; each is
// written at its natural frequency bin (base-4 digit reversal of its
// position) into one bank of a double buffer. When a full frame is in, the
// banks swap and the full one is read in pairs (k, N-k): with Z the packed
// transform of a + j*b (a, b real),
//   A[k] = (Z[k] + conj Z[N-k]) / 2         (Path A, the PDFT channels)
//   B[k] = (Z[k] - conj Z[N-k]) / (2j)      (Path B, the row spectrum)
// Four pairs are handled per clock (k = 4c+i for k < N/2, the partner of
// k = 0 being the self-paired bin N/2), so each clock delivers eight bins of
// both spectra and a frame takes N/8 clocks. Lane 2i is bin k, lane 2i+1 its
// partner; every bin 0..N-1 appears once per frame. The halving is an
// arithmetic shift. Outputs come 2 clocks after a read is issued, with the
// frame's tag (frames may arrive back to back); `out_last` marks the final output cycle of a frame.
module fft_unpack
  import chan_pkg::*;
#(
  parameter int N     = 1024,
  parameter int LANES = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_addr [LANES],
  input  cplx_t                in_data [LANES],
  input  tag_t                 in_tag,
  output logic                 out_valid,
  output logic                 out_last,
  output logic [$clog2(N)-1:0] out_idx [8],
  output cplx_t                a_data  [8],
  output cplx_t                b_data  [8],
  output tag_t                 out_tag
);
  localparam int NW  = $clog2(N);
  localparam int CYC = N / 8;
  localparam int WC  = N / LANES;
  localparam int CB  = $clog2(N + 1);

  function automatic logic [NW-1:0] digrev4(input logic [NW-1:0] p);
    logic [NW-1:0] r;
    for (int d = 0; d < NW / 2; d++) r[2*d +: 2] = p[NW-2-2*d +: 2];
    return r;
  endfunction

  function automatic cplx_t sep_a(input cplx_t z, input cplx_t w);   // w = Z[N-k]
    cplx_t r;
    r.re = (z.re + w.re) >>> 1;
    r.im = (z.im - w.im) >>> 1;
    return r;
  endfunction
  function automatic cplx_t sep_b(input cplx_t z, input cplx_t w);
    cplx_t r;
    r.re = (z.im + w.im) >>> 1;
    r.im = (w.re - z.re) >>> 1;
    return r;
  endfunction

  cplx_t mem [2][N];
  logic  wb, rb, run;
  logic [CB-1:0] wcnt, pcnt;
  logic          f1;             // first output clock of a frame, delayed
  tag_t          cur_tag, tag1;  // frame tag, delayed to line up with the outputs
  wire frame_done = in_valid && (wcnt == CB'(WC - 1));

  always_ff @(posedge clk)
    if (in_valid)
      for (int i = 0; i < LANES; i++) mem[wb][digrev4(in_addr[i])] <= in_data[i];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb <= 1'b0; rb <= 1'b0; run <= 1'b0;
      wcnt <= '0; pcnt <= '0; out_tag <= '0; cur_tag <= '0;
    end else begin
      if (f1) out_tag <= tag1;
      if (in_valid) wcnt <= frame_done ? '0 : wcnt + 1'b1;
      if (frame_done) begin
        wb <= ~wb; rb <= wb; run <= 1'b1; pcnt <= '0;
        cur_tag <= in_tag;
      end else if (run) begin
        pcnt <= pcnt + 1'b1;
        if (pcnt == CB'(CYC - 1)) run <= 1'b0;
      end
    end
  end

  cplx_t         zp [4], zq [4];
  logic [NW-1:0] kp [4], kq [4];
  logic          self0;
  logic          v1, l1;
  always_ff @(posedge clk) begin
    v1 <= rst_n & run;
    f1 <= run && (pcnt == '0);
    tag1 <= cur_tag;
    l1 <= run && (pcnt == CB'(CYC - 1));
    out_valid <= rst_n & v1;
    out_last  <= l1;
    self0     <= run && (pcnt == '0);
  end
  for (genvar i = 0; i < 4; i++) begin : g_pair
    logic [NW-1:0] k, q;
    assign k = NW'(pcnt) * NW'(4) + NW'(i);
    assign q = (k == '0) ? NW'(N / 2) : NW'(N) - k;
    always_ff @(posedge clk) begin
      zp[i] <= mem[rb][k];
      zq[i] <= mem[rb][q];
      kp[i] <= k;
      kq[i] <= q;
    end
    // bins 0 and N/2 are their own partners
    wire selfp = (i == 0) && self0;
    always_ff @(posedge clk) begin
      a_data[2*i]    <= sep_a(zp[i], selfp ? zp[i] : zq[i]);
      b_data[2*i]    <= sep_b(zp[i], selfp ? zp[i] : zq[i]);
      a_data[2*i+1]  <= sep_a(zq[i], selfp ? zq[i] : zp[i]);
      b_data[2*i+1]  <= sep_b(zq[i], selfp ? zq[i] : zp[i]);
      out_idx[2*i]   <= kp[i];
      out_idx[2*i+1] <= kq[i];
    end
  end

endmodule
