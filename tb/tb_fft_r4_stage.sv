// tb_fft_r4_stage: stages 0 and 1 of a 16-point radix-4 FFT, both fed the
// same random frames (written in a scrambled address order). Each output word
// is compared with the stage's defining sum, computed here in floating point:
// at address a = base + p*S (S = N/4^(s+1), j = base mod S)
//   y[a] = W_N^(p*j*4^s) * sum_q x[base + q*S] * (-j)^(p*q).
// Frames at the N/4 update spacing and frames written back to back (one
// every N/8 clocks, the stage's full rate) must all be transformed correctly
// without raising `overrun`, each with its own tag.
module tb_fft_r4_stage;
  import chan_pkg::*;
  localparam int N = 16, LANES = 8, NW = $clog2(N);
`include "tb_check.svh"
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [NW-1:0] in_addr [LANES];
  cplx_t in_data [LANES];
  tag_t  in_tag = '0;
  logic  ov [2], oval [2], ofirst [2];
  logic [NW-1:0] oaddr [2][LANES];
  cplx_t odata [2][LANES];
  tag_t  otag [2];

  for (genvar s = 0; s < 2; s++) begin : g_dut
    fft_r4_stage #(.N(N), .STAGE(s), .LANES(LANES)) dut (
      .clk, .rst_n, .in_valid, .in_addr, .in_data, .in_tag,
      .out_valid(oval[s]), .out_addr(oaddr[s]), .out_data(odata[s]), .out_tag(otag[s]),
      .out_first(ofirst[s]), .overrun(ov[s]));
  end
  always #5 clk = ~clk;

  real xr [$][N], xi [$][N];
  int  nseen [2];
  int  nframe [2];
  real fr [N], fi [N];

  function automatic void ref_word(input int s, input int a, input int f, output real rr, output real ri);
    int S, p, base, j, e;
    real sr, si, cr, ci;
    S = N >> (2 * (s + 1));
    p = (a / S) % 4;
    base = a - p * S;
    j = base % S;
    sr = 0; si = 0;
    for (int q = 0; q < 4; q++) begin
      // (-j)^(pq): 0 -> 1, 1 -> -j, 2 -> -1, 3 -> +j
      case ((p * q) % 4)
        0: begin sr += xr[f][base+q*S]; si += xi[f][base+q*S]; end
        1: begin sr += xi[f][base+q*S]; si -= xr[f][base+q*S]; end
        2: begin sr -= xr[f][base+q*S]; si -= xi[f][base+q*S]; end
        3: begin sr -= xi[f][base+q*S]; si += xr[f][base+q*S]; end
      endcase
    end
    e = (p * j * (1 << (2 * s))) % N;
    cr = $cos(6.283185307179586 * e / N);
    ci = -$sin(6.283185307179586 * e / N);
    rr = sr * cr - si * ci;
    ri = sr * ci + si * cr;
  endfunction

  for (genvar s = 0; s < 2; s++) begin : g_mon
    always @(posedge clk)
      if (rst_n && oval[s]) begin
        for (int i = 0; i < LANES; i++) begin
          real rr, ri;
          ref_word(s, int'(oaddr[s][i]), nframe[s], rr, ri);
          check($sqrt((rr - odata[s][i].re) ** 2 + (ri - odata[s][i].im) ** 2) <= 2.0 + 1e-5 * $sqrt(rr * rr + ri * ri),
                $sformatf("stage %0d frame %0d addr %0d: (%0d,%0d) want (%0.1f,%0.1f)", s,
                          nframe[s], oaddr[s][i], odata[s][i].re, odata[s][i].im, rr, ri));
        end
        check(otag[s] == tag_t'(8'(nframe[s] + 1)), $sformatf("tag %0d follows frame %0d", otag[s], nframe[s]));
        nseen[s]++;
        if (nseen[s] == N / LANES) begin
          nseen[s] = 0;
          nframe[s]++;
        end
      end
  end

  task automatic send_frame(input int f);
    int perm [N];
    for (int i = 0; i < N; i++) perm[i] = (i * 5 + 3) % N;   // scrambled order
    for (int c = 0; c < N / LANES; c++) begin
      @(negedge clk);
      in_valid = 1;
      in_tag   = tag_t'(8'(f + 1));
      for (int i = 0; i < LANES; i++) begin
        int a;
        a = perm[c * LANES + i];
        in_addr[i]    = NW'(a);
        in_data[i].re = DATA_W'($rtoi(xr[f][a]));
        in_data[i].im = DATA_W'($rtoi(xi[f][a]));
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    nseen = '{0, 0};
    nframe = '{0, 0};
    for (int f = 0; f < 6; f++) begin
      for (int i = 0; i < N; i++) begin
        fr[i] = real'($urandom_range(0, 200000)) - 100000.0;
        fi[i] = real'($urandom_range(0, 200000)) - 100000.0;
      end
      xr.push_back(fr);
      xi.push_back(fi);
    end
    for (int i = 0; i < LANES; i++) begin in_addr[i] = '0; in_data[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      send_frame(f);
      @(negedge clk);
      in_valid = 0;
      repeat (N / 4 - N / LANES - 1) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(!ov[0] && !ov[1], "no overrun at the update spacing");
    check(nframe[0] == 4 && nframe[1] == 4, "all frames processed");
    // two frames back to back at the full rate
    send_frame(4);
    send_frame(5);
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    check(!ov[0] && !ov[1] && nframe[0] == 6 && nframe[1] == 6,
          "back-to-back frames processed without overrun");
    finish_tb();
  end
endmodule
