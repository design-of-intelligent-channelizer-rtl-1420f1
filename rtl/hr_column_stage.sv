// hr_column_stage: column-DFT stage of the high-resolution FFT (coarse-grain
// element CPE4), built by the prime factor algorithm from M row spectra.
//
// Row m of a high-resolution frame arrives as the N-bin spectrum B_m[k2]
// (eight bins per clock, any order, row number with each word). Rows are
// stored in an M-bank double buffer, one bank per row. When row M-1 has been
// completely written the buffers swap and the column transforms run: for
// k2 = 0..N-1, one per clock, the M words B_0..B_(M-1)[k2] go through the
// M-point DFT (dft_m), giving X[k1,k2] for k1 = 0..M-1. Because M and N are
// relatively prime no twiddle factors are needed; each output is the
// M*N-point spectrum at bin
//   k = (N*tN*k1 + M*tM*k2) mod M*N,  N*tN = 1 (mod M),  M*tM = 1 (mod N)
// (the Chinese-remainder output map), generated on the fly by modular
// additions. A whole spectrum takes N clocks plus 4 of pipeline, inside the
// M*N/4-clock period at which high-resolution frames are produced.
// out_first/out_last bracket one spectrum.
module hr_column_stage
  import chan_pkg::*;
#(
  parameter int N = 1024,
  parameter int M = 7
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [5:0]             in_row,
  input  logic [$clog2(N)-1:0]   in_idx  [8],
  input  cplx_t                  in_data [8],
  output logic                   out_valid,
  output logic                   out_first,
  output logic                   out_last,
  output logic [$clog2(M*N)-1:0] out_addr [M],
  output cplx_t                  out_data [M],
  output logic                   overrun
);
  localparam int NW  = $clog2(N);
  localparam int PN  = M * N;
  localparam int XW  = $clog2(PN);
  localparam int RW  = $clog2(M);
  localparam int RC  = N / 8;                         // input clocks per row
  localparam int C1  = (N * mod_inv(N % M, M)) % PN;  // N*tN
  localparam int C2  = (M * mod_inv(M % N, N)) % PN;  // M*tM

  typedef logic [XW-1:0] k1tab_t [M];
  function automatic k1tab_t gen_k1();
    k1tab_t r;
    for (int k = 0; k < M; k++) r[k] = XW'((longint'(C1) * k) % PN);
    return r;
  endfunction
  localparam k1tab_t K1 = gen_k1();

  cplx_t mem [2][M][N];
  logic  wb, rb, run;
  logic [$clog2(RC+1)-1:0] wcnt;
  logic [NW:0]   kc;
  logic [XW-1:0] t2;        // (C2*kc) mod M*N

  wire row_done   = in_valid && (wcnt == ($clog2(RC+1))'(RC - 1));
  wire frame_done = row_done && (in_row == 6'(M - 1));

  always_ff @(posedge clk)
    if (in_valid)
      for (int i = 0; i < 8; i++) mem[wb][in_row[RW-1:0]][in_idx[i]] <= in_data[i];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb <= 1'b0; rb <= 1'b0; run <= 1'b0; wcnt <= '0;
      kc <= '0; t2 <= '0; overrun <= 1'b0;
    end else begin
      if (in_valid) wcnt <= row_done ? '0 : wcnt + 1'b1;
      if (frame_done) begin
        wb <= ~wb; rb <= wb; run <= 1'b1; kc <= '0; t2 <= '0;
        if (run && kc != (NW+1)'(N - 1)) overrun <= 1'b1;
      end else if (run) begin
        kc <= kc + 1'b1;
        t2 <= (32'(t2) + C2 >= PN) ? XW'(32'(t2) + C2 - PN) : XW'(32'(t2) + C2);
        if (kc == (NW+1)'(N - 1)) run <= 1'b0;
      end
    end
  end

  // read the column
  cplx_t         col [M];
  logic          v1, f1, l1;
  logic [XW-1:0] t2_p [5];
  logic          f_p [5], l_p [5];
  always_ff @(posedge clk) begin
    for (int m = 0; m < M; m++) col[m] <= mem[rb][m][NW'(kc)];
    v1 <= rst_n & run;
    f1 <= run && (kc == '0);
    l1 <= run && (kc == (NW+1)'(N - 1));
    t2_p[0] <= t2;
    f_p[0]  <= f1;
    l_p[0]  <= l1;
    for (int i = 1; i < 5; i++) begin
      t2_p[i] <= t2_p[i-1];
      f_p[i]  <= f_p[i-1];
      l_p[i]  <= l_p[i-1];
    end
  end

  logic  dv;
  cplx_t dy [M];
  dft_m #(.M(M)) u_dft (.clk, .rst_n, .in_valid(v1), .x(col), .out_valid(dv), .y(dy));

  // dft_m latency 3: t2_p[3] lines up with its outputs
  always_ff @(posedge clk) begin
    out_valid <= rst_n & dv;
    out_first <= dv & f_p[2];
    out_last  <= dv & l_p[2];
    for (int k = 0; k < M; k++) begin
      out_data[k] <= dy[k];
      out_addr[k] <= (32'(t2_p[3]) + 32'(K1[k]) >= PN) ? XW'(32'(t2_p[3]) + 32'(K1[k]) - PN)
                                                       : XW'(32'(t2_p[3]) + 32'(K1[k]));
    end
  end

endmodule
