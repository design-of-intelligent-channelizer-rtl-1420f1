// polyphase_filter: the N-branch polyphase FIR of the PDFT (coarse-grain
// element CPE1), with the output re-ordering that precedes the FFT.
//
// For a frame whose newest sample x[t] is the sample_buffer anchor, branch j
// computes v[j] = sum_{l<L} h[j + l*N] * x[t - j - l*N]. The FFT input u[n]
// is v[(t - n) mod N]: this circular reversal/shift removes the phase rotation
// that the 75% overlap (N/4-sample hop) would otherwise leave on the channel
// outputs, so FFT bin k equals the output of a DDC tuned to k*Fs/N and
// filtered by h. PHASE (t mod N) comes with the start pulse.
//
// Eight branch filters work in parallel, each L multipliers wide, so one
// frame takes N/8 clocks plus the pipeline: issue (sample and coefficient
// reads), multiply, pairwise additions, final addition with rounding.
// Outputs start 4 clocks after `start`; lane i of output cycle c carries
// u[8c+i]. Products are rounded back by COEF_FRAC bits.
//
// Coefficients h[0..N*L-1] are written through the coef_* port (a RAM look-up
// table); the design does not fix their values.
// Read port i*L+l asks for delay branch + l*N, so its bits above log2(N)
// hold the constant tap number l and never change.
module polyphase_filter
  import chan_pkg::*;
#(
  parameter int N     = 1024,
  parameter int L     = 4,
  parameter int LANES = 8,
  parameter int DEPTH = N * L + N / 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [$clog2(N)-1:0]       phase,
  input  logic                       coef_we,
  input  logic [$clog2(N*L)-1:0]     coef_addr,
  input  coef_t                      coef_data,
  output logic [$clog2(DEPTH)-1:0]   rd_delay [LANES*L],
  input  sample_t                    rd_data  [LANES*L],
  output logic                       out_valid,
  output logic [$clog2(N)-1:0]       out_idx,
  output logic signed [DATA_W-1:0]   out_data [LANES]
);
  localparam int NW   = $clog2(N);
  localparam int CW   = $clog2(N * L);
  localparam int PW   = SAMPLE_W + COEF_W;

  coef_t h [N*L];
  always_ff @(posedge clk)
    if (coef_we) h[coef_addr] <= coef_data;

  // ---- issue stage ---------------------------------------------------------
  logic               run;
  logic [NW-1:0]      cnt;      // output index of lane 0
  logic [NW-1:0]      ph;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0;
      cnt <= '0;
      ph  <= '0;
    end else if (start) begin
      run <= 1'b1;
      cnt <= '0;
      ph  <= phase;
    end else if (run) begin
      cnt <= cnt + NW'(LANES);
      if (cnt == NW'(N - LANES)) run <= 1'b0;
    end
  end

  logic [NW-1:0] branch [LANES];
  coef_t         hq     [LANES*L];
  for (genvar i = 0; i < LANES; i++) begin : g_issue
    assign branch[i] = ph - (cnt + NW'(i));            // (t - n) mod N
    for (genvar l = 0; l < L; l++) begin : g_tap
      logic [CW-1:0] ci;
      assign ci = CW'(branch[i]) + CW'(l * N);
      assign rd_delay[i*L+l] = ($clog2(DEPTH))'(ci);
      always_ff @(posedge clk) hq[i*L+l] <= h[ci];
    end
  end

  // ---- multiply stage (FPE1) -----------------------------------------------
  logic                    v1, v2, v3;
  logic [NW-1:0]           i1, i2, i3;
  logic signed [PW-1:0]    prod [LANES*L];
  always_ff @(posedge clk) begin
    v1 <= rst_n & run;
    i1 <= cnt;
    v2 <= rst_n & v1;
    i2 <= i1;
  end
  for (genvar p = 0; p < LANES * L; p++) begin : g_mul
    always_ff @(posedge clk) prod[p] <= rd_data[p] * hq[p];
  end

  // ---- addition stages (FPE2, FPE3) ----------------------------------------
  logic signed [PW+$clog2(L):0] half [LANES][2];
  for (genvar i = 0; i < LANES; i++) begin : g_add
    always_ff @(posedge clk) begin
      logic signed [PW+$clog2(L):0] a, b;
      a = '0;
      b = '0;
      for (int l = 0; l < L; l++) begin
        if (l < L / 2) a = a + (PW+$clog2(L)+1)'(prod[i*L+l]);
        else           b = b + (PW+$clog2(L)+1)'(prod[i*L+l]);
      end
      half[i][0] <= a;
      half[i][1] <= b;
    end
    always_ff @(posedge clk)
      out_data[i] <= rshift_round(64'(half[i][0] + half[i][1]), COEF_FRAC);
  end

  always_ff @(posedge clk) begin
    v3        <= rst_n & v2;
    i3        <= i2;
    out_valid <= rst_n & v3;
    out_idx   <= i3;
  end

endmodule
