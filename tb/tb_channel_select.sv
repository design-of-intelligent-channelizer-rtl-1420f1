// tb_channel_select: channel and DDC assignment at the default sizes
// (N = 1024, M = 7, four DDC units). Twenty scans with 0..6 random
// detections each (bandwidths 1..20 bins, so some do not fit a channel) are
// driven. The expected table is computed here from the band edges in real
// arithmetic: nearest channel round(centre/M), fit test on the edges, NCO
// step offset/(4M) of a full turn, and the largest decimation keeping the
// output rate at least twice the bandwidth. After each cfg_load every
// unit's configuration and the three counters are compared.
module tb_channel_select;
  import chan_pkg::*;
  localparam int N = 1024, M = 7, NUM_DDC = 4, DEC_MAX = 3, XW = $clog2(M * N);
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, scan_start = 0, scan_done = 0, det_valid = 0;
  logic [XW:0] det_centre2 = '0;
  logic [XW-1:0] det_bw = '0;
  ddc_cfg_t cfg [NUM_DDC];
  logic cfg_load;
  logic [15:0] assigned, dropped, too_wide;
  channel_select #(.N(N), .M(M), .NUM_DDC(NUM_DDC), .DEC_MAX(DEC_MAX)) dut (.*);
  always #5 clk = ~clk;

  ddc_cfg_t exp_cfg [NUM_DDC];
  int n_as = 0, n_dr = 0, n_tw = 0, loads = 0;

  always @(posedge clk)
    if (rst_n && cfg_load) begin
      loads++;
      for (int u = 0; u < NUM_DDC; u++) begin
        check(cfg[u].en == exp_cfg[u].en, $sformatf("unit %0d enable", u));
        check(cfg[u].ch == exp_cfg[u].ch, $sformatf("unit %0d channel %0d want %0d", u, cfg[u].ch, exp_cfg[u].ch));
        check(cfg[u].dec_log == exp_cfg[u].dec_log, $sformatf("unit %0d dec_log %0d want %0d", u,
                                                              cfg[u].dec_log, exp_cfg[u].dec_log));
        check(cfg[u].inc - exp_cfg[u].inc <= 1 && exp_cfg[u].inc - cfg[u].inc <= 1,
              $sformatf("unit %0d inc %0d want %0d", u, cfg[u].inc, exp_cfg[u].inc));
      end
      check(assigned == 16'(n_as), "assigned count");
      check(dropped == 16'(n_dr), "dropped count");
      check(too_wide == 16'(n_tw), "too_wide count");
    end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 20; s++) begin
      int nd, slot;
      nd = $urandom_range(0, 6);
      slot = 0;
      for (int u = 0; u < NUM_DDC; u++) exp_cfg[u] = '0;
      @(negedge clk);
      scan_start = 1;
      @(negedge clk);
      scan_start = 0;
      for (int d = 0; d < nd; d++) begin
        int lo, bw, c2, ch, dl;
        real off;
        bw = (s == 0 && d == 0) ? M : $urandom_range(1, 20);
        lo = $urandom_range(0, M * N / 2 - bw);
        if (s == 0 && d == 0) lo = 10 * M - 3;        // widest signal, exactly filling a channel
        c2 = 2 * lo + bw - 1;
        ch = $rtoi($floor(c2 / (2.0 * M) + 0.5));
        if (lo < (ch - 1) * M || lo + bw - 1 > (ch + 1) * M) n_tw++;
        else if (slot < NUM_DDC) begin
          off = c2 / 2.0 - ch * M;                    // bins from the channel centre
          dl = 0;
          for (int t = 1; t <= DEC_MAX; t++) if (bw * (2 ** (t + 1)) <= 4 * M) dl = t;
          exp_cfg[slot].en      = 1'b1;
          exp_cfg[slot].ch      = 16'(ch);
          exp_cfg[slot].inc     = 32'($rtoi(off / (4.0 * M) * 4294967296.0));
          exp_cfg[slot].dec_log = 3'(dl);
          slot++;
          n_as++;
        end else n_dr++;
        @(negedge clk);
        det_valid   = 1;
        det_centre2 = (XW+1)'(c2);
        det_bw      = XW'(bw);
        @(negedge clk);
        det_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      @(negedge clk);
      scan_done = 1;
      @(negedge clk);
      scan_done = 0;
      repeat (3) @(negedge clk);
    end
    check(loads == 20, $sformatf("cfg_load pulses: %0d", loads));
    check(n_tw > 0 && n_dr > 0, "test reached both rejection cases");
    finish_tb();
  end
endmodule
