// window_path: Path B of the channelizer. Windows one row of a
// high-resolution frame and hands it to the complex FFT as its imaginary
// half.
//
// A high-resolution frame is the M*N samples ending at the sample_buffer
// anchor, x_f[n] = x[anchor - (M*N-1) + n]. Row m (0..M-1) is the N-point
// sequence y_m[n2] = w[n] * x_f[n], n = (N*m + M*n2) mod M*N, the relatively
// prime input index map of the prime factor algorithm; its N-point DFT is the
// row DFT of the M*N-point transform. w[] holds the M coefficient sets
// w^(m)[n2] = w[(N*m + M*n2) mod M*N] of one M*N-point window, written through
// the coef_* port.
//
// LANES rows samples are produced per clock, so a row takes N/LANES clocks.
// The index map is generated on the fly by adding LANES*M per clock modulo
// M*N. Timing matches polyphase_filter exactly: lane i of the output in the
// c-th output cycle is y_m[LANES*c+i], the first output 4 clocks after start.
module window_path
  import chan_pkg::*;
#(
  parameter int N     = 1024,
  parameter int M     = 7,
  parameter int LANES = 8,
  parameter int DEPTH = 2 * M * N
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [5:0]                 row,
  input  logic                       coef_we,
  input  logic [$clog2(M*N)-1:0]     coef_addr,
  input  coef_t                      coef_data,
  output logic [$clog2(DEPTH)-1:0]   rd_delay [LANES],
  input  sample_t                    rd_data  [LANES],
  output logic                       out_valid,
  output logic [$clog2(N)-1:0]       out_idx,
  output logic signed [DATA_W-1:0]   out_data [LANES]
);
  localparam int NW = $clog2(N);
  localparam int PN = M * N;
  localparam int XW = $clog2(PN);

  coef_t w [PN];
  always_ff @(posedge clk)
    if (coef_we) w[coef_addr] <= coef_data;

  logic          run;
  logic [NW-1:0] cnt;
  logic [XW-1:0] base;     // (N*m + M*cnt) mod M*N
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      cnt  <= '0;
      base <= '0;
    end else if (start) begin
      run  <= 1'b1;
      cnt  <= '0;
      base <= XW'(N * 32'(row));
    end else if (run) begin
      cnt <= cnt + NW'(LANES);
      if (cnt == NW'(N - LANES)) run <= 1'b0;
      if (32'(base) + LANES * M >= PN) base <= XW'(32'(base) + LANES * M - PN);
      else                             base <= XW'(32'(base) + LANES * M);
    end
  end

  coef_t wq [LANES];
  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic [XW-1:0] n;
    assign n = (32'(base) + i * M >= PN) ? XW'(32'(base) + i * M - PN)
                                         : XW'(32'(base) + i * M);
    assign rd_delay[i] = ($clog2(DEPTH))'(PN - 1 - 32'(n));
    always_ff @(posedge clk) wq[i] <= w[n];
  end

  logic                              v1, v2, v3;
  logic [NW-1:0]                     i1, i2, i3;
  logic signed [SAMPLE_W+COEF_W-1:0] prod [LANES];
  logic signed [DATA_W-1:0]          scl  [LANES];
  always_ff @(posedge clk) begin
    v1 <= rst_n & run;
    i1 <= cnt;
    v2 <= rst_n & v1;
    i2 <= i1;
    v3 <= rst_n & v2;
    i3 <= i2;
    out_valid <= rst_n & v3;
    out_idx   <= i3;
  end
  for (genvar i = 0; i < LANES; i++) begin : g_mul
    always_ff @(posedge clk) begin
      prod[i]     <= rd_data[i] * wq[i];
      scl[i]      <= rshift_round(64'(prod[i]), COEF_FRAC);
      out_data[i] <= scl[i];
    end
  end

endmodule
