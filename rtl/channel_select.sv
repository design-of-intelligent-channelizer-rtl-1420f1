// channel_select: assigns a DDC unit and a PDFT channel to each signal found
// by the signal parameter estimation.
//
// PDFT channels are spaced Fs/N apart and pass 2*Fs/N; in high-resolution
// bins (Fs/(M*N)) channel c is centred on bin c*M and spans c*M +- M. A
// signal with centre (lo+hi)/2 is given the channel whose centre is nearest,
//   c = round(centre / M) = floor((centre2 + M) / (2M)),
// and is wholly inside it when lo >= (c-1)*M and hi <= (c+1)*M, which holds
// for every signal no wider than M bins (the design's maximum signal
// bandwidth). Wider signals are counted in `too_wide` and not assigned.
// The residual offset centre - c*M bins is turned into the NCO step of the
// DDC: the channel sample rate is 4*Fs/N = 4*M bins, so
//   inc = (centre2 - 2*M*c) * 2^32 / (8*M)   (wrapping 32-bit phase).
// The rate reduction keeps the output at least twice the signal bandwidth:
//   dec_log = largest d <= DEC_MAX with bw * 2^(d+1) <= 4*M.
// Signals are handed to units 0, 1, ... in the order the scan reports them;
// detections beyond NUM_DDC are counted in `dropped`. The new table is
// applied to all units at once at scan_done, with a one-clock cfg_load.
module channel_select
  import chan_pkg::*;
#(
  parameter int N       = 1024,
  parameter int M       = 7,
  parameter int NUM_DDC = 4,
  parameter int DEC_MAX = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   scan_start,
  input  logic                   scan_done,
  input  logic                   det_valid,
  input  logic [$clog2(M*N):0]   det_centre2,
  input  logic [$clog2(M*N)-1:0] det_bw,
  output ddc_cfg_t               cfg [NUM_DDC],
  output logic                   cfg_load,
  output logic [15:0]            assigned,
  output logic [15:0]            dropped,
  output logic [15:0]            too_wide
);
  localparam int XW = $clog2(M * N);

  ddc_cfg_t pend [NUM_DDC];
  logic [$clog2(NUM_DDC+1)-1:0] slot;

  // per-detection arithmetic
  ddc_cfg_t nc;
  logic     fits;
  always_comb begin
    longint c2, bw, ch, off2;
    int     d;
    c2   = longint'(det_centre2);
    bw   = longint'(det_bw);
    ch   = (c2 + M) / (2 * M);
    off2 = c2 - 2 * M * ch;
    fits = (c2 - (bw - 1) >= 2 * M * (ch - 1)) && (c2 + (bw - 1) <= 2 * M * (ch + 1));
    d = 0;
    for (int t = 1; t <= DEC_MAX; t++)
      if ((bw << (t + 1)) <= 4 * M) d = t;
    nc.en      = 1'b1;
    nc.ch      = 16'(ch);
    nc.inc     = 32'((off2 * (longint'(1) << 32)) / (8 * M));
    nc.dec_log = 3'(d);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot <= '0; cfg_load <= 1'b0;
      assigned <= '0; dropped <= '0; too_wide <= '0;
      for (int u = 0; u < NUM_DDC; u++) begin
        pend[u] <= '0;
        cfg[u]  <= '0;
      end
    end else begin
      cfg_load <= 1'b0;
      if (scan_start) begin
        slot <= '0;
        for (int u = 0; u < NUM_DDC; u++) pend[u] <= '0;
      end else if (det_valid) begin
        if (!fits) too_wide <= too_wide + 1'b1;
        else if (32'(slot) < NUM_DDC) begin
          pend[slot] <= nc;
          slot       <= slot + 1'b1;
          assigned   <= assigned + 1'b1;
        end else dropped <= dropped + 1'b1;
      end
      if (scan_done) begin
        cfg      <= pend;
        cfg_load <= 1'b1;
      end
    end
  end

endmodule
