// tb_sample_buffer: writes a random stream into a 20-word sample_buffer,
// marks anchors at irregular points and reads three ports at random delays,
// comparing each registered read with a copy of the stream kept here.
module tb_sample_buffer;
  import chan_pkg::*;
  localparam int DEPTH = 20, RD = 3;
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, wr_en = 0, mark = 0;
  sample_t wr_data = '0;
  logic [$clog2(DEPTH)-1:0] rd_delay [RD];
  sample_t rd_data [RD];
  sample_buffer #(.DEPTH(DEPTH), .RD(RD)) dut (.*);
  always #5 clk = ~clk;

  int hist [$];          // every sample written
  int anchor = -1;
  int exp_v [RD];
  bit exp_ok = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    for (int p = 0; p < RD; p++) rd_delay[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      // check the reads issued in the previous cycle
      if (exp_ok)
        for (int p = 0; p < RD; p++)
          check(rd_data[p] == sample_t'(exp_v[p]),
                $sformatf("port %0d read %0d want %0d", p, rd_data[p], exp_v[p]));
      wr_en   = ($urandom % 4) != 0;
      wr_data = sample_t'($urandom);
      mark    = wr_en && (($urandom % 5) == 0);
      exp_ok  = 0;
      if (anchor >= 0) begin
        // delays limited so that the sample is still stored after this write
        int maxd;
        maxd = DEPTH - 1 - (hist.size() - 1 - anchor) - (wr_en ? 1 : 0);
        if (maxd >= 0) begin
          for (int p = 0; p < RD; p++) begin
            int d;
            d = (anchor + 1 > maxd + 1) ? $urandom % (maxd + 1) : $urandom % (anchor + 1);
            rd_delay[p] = ($clog2(DEPTH))'(d);
            exp_v[p]    = hist[anchor - d];
          end
          exp_ok = 1;
        end
      end
      if (wr_en) begin
        hist.push_back(int'(wr_data));
        if (mark) anchor = hist.size() - 1;
      end
    end
    check(anchor > 0, "anchor was moved");
    finish_tb();
  end
endmodule
