// dft_m: maximally parallel M-point DFT for odd M, all M outputs every clock
// (the short transform of the column stage, CPE4).
//
// X[k] = sum_n x[n] W_M^(nk) is computed in three registered steps:
//   pre-weave additions   s_n = x_n + x_(M-n),  d_n = x_n - x_(M-n),
//                         X[0] = x_0 + sum s_n         (n = 1..(M-1)/2)
//   multiplications       P_kn = s_n cos(2*pi*n*k/M), Q_kn = d_n sin(2*pi*n*k/M)
//   post-weave additions  R_k = x_0 + sum_n P_kn, I_k = sum_n Q_kn,
//                         X[k] = R_k - j I_k,  X[M-k] = R_k + j I_k.
// This folded form needs 4*((M-1)/2)^2 real multiplications (36 for M = 7);
// a Winograd short-DFT would need fewer (16 for M = 7) with more additions.
// Constants are TW_FRAC-bit fractions computed at elaboration. Latency 3.
module dft_m
  import chan_pkg::*;
#(
  parameter int M = 7
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x [M],
  output logic  out_valid,
  output cplx_t y [M]
);
  localparam int H = (M - 1) / 2;

  // entry k*(H+1)+n holds the constant for output k, input pair n
  typedef tw_t tab_t [(H+1)*(H+1)];
  function automatic tab_t gen(input bit use_sin);
    tab_t r;
    for (int k = 0; k <= H; k++)
      for (int n = 0; n <= H; n++)
        r[k*(H+1)+n] = use_sin ? to_tw($sin(TWO_PI * n * k / M))
                          : to_tw($cos(TWO_PI * n * k / M));
    return r;
  endfunction
  localparam tab_t CT = gen(1'b0);
  localparam tab_t ST = gen(1'b1);

  // pre-weave
  cplx_t s [H+1], d [H+1];
  cplx_t x0_1, sum_1;
  logic  v1, v2;
  always_ff @(posedge clk) begin
    cplx_t acc;
    acc = x[0];
    for (int n = 1; n <= H; n++) begin
      s[n] <= cadd(x[n], x[M-n]);
      d[n] <= csub(x[n], x[M-n]);
      acc = cadd(acc, cadd(x[n], x[M-n]));
    end
    s[0]  <= '0;
    d[0]  <= '0;
    x0_1  <= x[0];
    sum_1 <= acc;
    v1    <= rst_n & in_valid;
  end

  // multiplications
  logic signed [63:0] pr [H+1][H+1], pim [H+1][H+1], qr [H+1][H+1], qi [H+1][H+1];
  cplx_t x0_2, sum_2;
  always_ff @(posedge clk) begin
    for (int k = 0; k <= H; k++)
      for (int n = 0; n <= H; n++) begin
        pr[k][n]  <= 64'(s[n].re) * 64'(CT[k*(H+1)+n]);
        pim[k][n] <= 64'(s[n].im) * 64'(CT[k*(H+1)+n]);
        qr[k][n]  <= 64'(d[n].re) * 64'(ST[k*(H+1)+n]);
        qi[k][n]  <= 64'(d[n].im) * 64'(ST[k*(H+1)+n]);
      end
    x0_2  <= x0_1;
    sum_2 <= sum_1;
    v2    <= rst_n & v1;
  end

  // post-weave
  always_ff @(posedge clk) begin
    logic signed [63:0] rr, ri, ir, ii;
    logic signed [DATA_W-1:0] Rr, Ri, Ir, Ii;
    y[0] <= sum_2;
    for (int k = 1; k <= H; k++) begin
      rr = '0; ri = '0; ir = '0; ii = '0;
      for (int n = 1; n <= H; n++) begin
        rr = rr + pr[k][n];
        ri = ri + pim[k][n];
        ir = ir + qr[k][n];
        ii = ii + qi[k][n];
      end
      Rr = x0_2.re + rshift_round(rr, TW_FRAC);
      Ri = x0_2.im + rshift_round(ri, TW_FRAC);
      Ir = rshift_round(ir, TW_FRAC);
      Ii = rshift_round(ii, TW_FRAC);
      y[k].re   <= Rr + Ii;
      y[k].im   <= Ri - Ir;
      y[M-k].re <= Rr - Ii;
      y[M-k].im <= Ri + Ir;
    end
    out_valid <= rst_n & v2;
  end

endmodule
