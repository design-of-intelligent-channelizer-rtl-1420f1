// tb_spe_detector: signal parameter estimation on 48-bin spectra (N = 16,
// M = 3, bins 0..24 examined). Synthetic spectra are driven directly:
// occupied bins {3,4,5}, {10} and {22,23,24} (a run that reaches the end of
// the scan), a strong bin 30 above the examined half (must be ignored) and a
// low floor elsewhere. Bin 10 then disappears, so its running average decays
// 10000 -> 7500 -> 5625 -> 4219 and falls below the threshold (5000) in the
// fourth scan. One spectrum is sent while a scan is running and must be
// counted as skipped, not averaged. Each scan's list of (centre2, bw) is
// compared with the expected list.
module tb_spe_detector;
  import chan_pkg::*;
  localparam int N = 16, M = 3, PN = M * N, XW = $clog2(PN);
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, in_last = 0;
  logic [XW-1:0] in_addr [M];
  cplx_t in_data [M];
  logic [47:0] threshold = 48'd5000;
  logic scan_start, scan_done, det_valid;
  logic [XW:0] det_centre2;
  logic [XW-1:0] det_bw;
  logic [15:0] used, skipped;
  spe_detector #(.N(N), .M(M), .AVG_SH(2), .PSH(8)) dut (.*);
  always #5 clk = ~clk;

  int got [$];
  int scans = 0;
  int want [4][$];

  always @(posedge clk)
    if (rst_n) begin
      if (scan_start) got.delete();
      if (det_valid) begin
        got.push_back(int'(det_centre2));
        got.push_back(int'(det_bw));
      end
      if (scan_done) begin
        check(got.size() == want[scans].size(), $sformatf("scan %0d: %0d values, want %0d",
                                                          scans, got.size(), want[scans].size()));
        for (int i = 0; i < got.size() && i < want[scans].size(); i++)
          check(got[i] == want[scans][i], $sformatf("scan %0d value %0d: %0d want %0d",
                                                    scans, i, got[i], want[scans][i]));
        scans++;
      end
    end

  task automatic send(input bit with10);
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      in_valid = 1;
      in_first = (c == 0);
      in_last  = (c == N - 1);
      for (int i = 0; i < M; i++) begin
        int a, amp;
        a = i * N + c;
        amp = 2560;                                   // floor: power 100
        if ((a >= 3 && a <= 5) || (a >= 22 && a <= 24) || a == 30) amp = 25600;
        if (a == 10 && with10) amp = 25600;           // power 10000
        if (a == 10 && !with10) amp = 0;
        in_addr[i]    = XW'(a);
        in_data[i].re = DATA_W'(amp);
        in_data[i].im = '0;
      end
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    want[0] = '{8, 3, 20, 1, 46, 3};
    want[1] = '{8, 3, 20, 1, 46, 3};
    want[2] = '{8, 3, 20, 1, 46, 3};
    want[3] = '{8, 3, 46, 3};
    for (int i = 0; i < M; i++) begin in_addr[i] = '0; in_data[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(1'b1);
    repeat (60) @(negedge clk);
    send(1'b0);
    repeat (5) @(negedge clk);
    send(1'b1);                                       // arrives during the scan
    repeat (60) @(negedge clk);
    send(1'b0);
    repeat (60) @(negedge clk);
    send(1'b0);
    repeat (60) @(negedge clk);
    check(scans == 4, $sformatf("scans: %0d", scans));
    check(used == 16'd4, $sformatf("used %0d", used));
    check(skipped == 16'd1, $sformatf("skipped %0d", skipped));
    finish_tb();
  end
endmodule
