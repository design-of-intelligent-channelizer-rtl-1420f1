// spe_detector: signal parameter estimation (coarse-grain element CPE5).
// Finds the occupied bands of the high-resolution spectrum and estimates
// the centre frequency and bandwidth of each.
//
// Collect: for one spectrum (out_first .. out_last of hr_column_stage, M bins
// per clock in any order) it forms the squared magnitude of each
// non-negative-frequency bin k <= M*N/2, after an arithmetic pre-shift of
// PSH bits, and updates a per-bin running average
//   avg[k] += (p - avg[k]) >> AVG_SH   (the first spectrum loads avg = p).
// Scan: it then walks k = 0..M*N/2, one bin per clock, comparing avg[k] with
// `threshold`. Each maximal run of bins above the threshold is one signal:
// lowest bin lo, highest bin hi, reported as
//   centre2 = lo + hi  (centre frequency in half-bin units)
//   bw      = hi - lo + 1  (bandwidth in bins).
// A scan takes M*N/2 clocks, about two high-resolution periods; spectra
// that begin while a scan is still running are not averaged and are counted
// in `skipped`. scan_start/scan_done bracket the detections of one scan.
// The estimator is this design's own: thresholding of an averaged power
// spectrum with run-length grouping, without interpolation between bins.
module spe_detector
  import chan_pkg::*;
#(
  parameter int N      = 1024,
  parameter int M      = 7,
  parameter int AVG_SH = 2,
  parameter int PSH    = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_first,
  input  logic                   in_last,
  input  logic [$clog2(M*N)-1:0] in_addr [M],
  input  cplx_t                  in_data [M],
  input  logic [47:0]            threshold,
  output logic                   scan_start,
  output logic                   scan_done,
  output logic                   det_valid,
  output logic [$clog2(M*N):0]   det_centre2,
  output logic [$clog2(M*N)-1:0] det_bw,
  output logic [15:0]            used,
  output logic [15:0]            skipped
);
  localparam int PN   = M * N;
  localparam int XW   = $clog2(PN);
  localparam int HALF = PN / 2;

  typedef enum logic [1:0] {IDLE, COLLECT, SETTLE, SCAN} state_t;
  state_t state;

  logic [47:0] avg [HALF+1];
  logic        first_spec;
  logic [1:0]  settle;
  logic [XW-1:0] k, kd, lo;
  logic          rdv, in_run, scan_end_d;
  logic [47:0]   rdat;

  wire accept = in_valid && ((state == IDLE && in_first) || state == COLLECT);

  // power, one pipeline stage
  logic          pv;
  logic [XW-1:0] pa [M];
  logic [47:0]   pp [M];
  for (genvar i = 0; i < M; i++) begin : g_pow
    logic signed [DATA_W-1:0] r, q;
    assign r = in_data[i].re >>> PSH;
    assign q = in_data[i].im >>> PSH;
    always_ff @(posedge clk) begin
      pp[i] <= 48'(64'(r) * 64'(r) + 64'(q) * 64'(q));
      pa[i] <= in_addr[i];
    end
  end
  always_ff @(posedge clk) pv <= rst_n & accept;

  // running average (read-modify-write of M distinct bins per clock)
  always_ff @(posedge clk) begin
    if (pv)
      for (int i = 0; i < M; i++)
        if (32'(pa[i]) <= HALF) begin
          if (first_spec) avg[pa[i]] <= pp[i];
          else avg[pa[i]] <= 48'($signed({1'b0, avg[pa[i]]}) +
                                 (($signed({1'b0, pp[i]}) - $signed({1'b0, avg[pa[i]]})) >>> AVG_SH));
        end
  end

  always_ff @(posedge clk) rdat <= avg[k];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE; first_spec <= 1'b1; settle <= '0; k <= '0; kd <= '0; lo <= '0;
      rdv <= 1'b0; in_run <= 1'b0; scan_end_d <= 1'b0;
      scan_start <= 1'b0; scan_done <= 1'b0; det_valid <= 1'b0;
      det_centre2 <= '0; det_bw <= '0; used <= '0; skipped <= '0;
    end else begin
      scan_start <= 1'b0;
      scan_done  <= 1'b0;
      det_valid  <= 1'b0;
      if (in_valid && in_first && state != IDLE) skipped <= skipped + 1'b1;
      case (state)
        IDLE:    if (accept) begin state <= in_last ? SETTLE : COLLECT; settle <= '0; end
        COLLECT: if (in_valid && in_last) begin state <= SETTLE; settle <= '0; end
        SETTLE: begin
          settle <= settle + 1'b1;
          if (settle == 2'd2) begin
            state <= SCAN; k <= '0; in_run <= 1'b0;
            first_spec <= 1'b0; used <= used + 1'b1; scan_start <= 1'b1;
          end
        end
        SCAN: if (32'(k) != HALF) k <= k + 1'b1;
        default: state <= IDLE;
      endcase
      // compare stage: rdat holds avg[kd]
      rdv        <= (state == SCAN);
      kd         <= k;
      scan_end_d <= (state == SCAN) && (32'(k) == HALF);
      if (state == SCAN && 32'(k) == HALF) state <= IDLE;
      if (rdv) begin
        if (rdat > threshold) begin
          if (!in_run) begin in_run <= 1'b1; lo <= kd; end
          if (scan_end_d) begin
            in_run      <= 1'b0;
            det_valid   <= 1'b1;
            det_centre2 <= (in_run ? (XW+1)'(lo) : (XW+1)'(kd)) + (XW+1)'(kd);
            det_bw      <= kd - (in_run ? lo : kd) + 1'b1;
          end
        end else if (in_run) begin
          in_run      <= 1'b0;
          det_valid   <= 1'b1;
          det_centre2 <= (XW+1)'(lo) + (XW+1)'(kd - 1'b1);
          det_bw      <= kd - lo;
        end
        if (scan_end_d) scan_done <= 1'b1;
      end
    end
  end

endmodule
