// fft_r4_pipeline: the N-point complex-data FFT shared by both paths
// (coarse-grain element CPE2): log4(N) fft_r4_stage instances in a chain,
// each behind its own double-buffered memory.
//
// The first stage's input memory is also the packing buffer: the caller
// writes the polyphase-filtered Path A samples as the real rail and the
// windowed Path B samples as the imaginary rail of the same words, so one
// complex transform carries two real-data transforms. A new frame may enter
// every N/8 clocks or slower; each stage delays it by N/8 + 3 clocks. Outputs
// are in base-4 digit-reversed position order (out_addr = position).
module fft_r4_pipeline
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
  output logic [$clog2(N)-1:0] out_addr [LANES],
  output cplx_t                out_data [LANES],
  output tag_t                 out_tag,
  output logic                 overrun
);
  localparam int STAGES = log4(N);

  logic                 v [STAGES+1];
  logic [$clog2(N)-1:0] a [STAGES+1][LANES];
  cplx_t                d [STAGES+1][LANES];
  tag_t                 t [STAGES+1];
  logic [STAGES-1:0]    ovr;

  assign v[0] = in_valid;
  assign a[0] = in_addr;
  assign d[0] = in_data;
  assign t[0] = in_tag;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    fft_r4_stage #(.N(N), .STAGE(s), .LANES(LANES)) u_stage (
      .clk, .rst_n,
      .in_valid (v[s]),   .in_addr (a[s]),   .in_data (d[s]),   .in_tag (t[s]),
      .out_valid(v[s+1]), .out_addr(a[s+1]), .out_data(d[s+1]), .out_tag(t[s+1]),
      .out_first(),       .overrun (ovr[s])
    );
  end

  assign out_valid = v[STAGES];
  assign out_addr  = a[STAGES];
  assign out_data  = d[STAGES];
  assign out_tag   = t[STAGES];
  assign overrun   = |ovr;

endmodule
