// sample_buffer: circular store of real input samples with many read ports.
//
// One sample is written per clock (wr_en). Asserting `mark` together with a
// write records that sample as the anchor of a frame; every read port then
// addresses the store by delay relative to the anchor (0 = the anchor sample,
// d = the sample written d writes before it). Reads are registered: the data
// for rd_delay presented in cycle c appears on rd_data in cycle c+1.
//
// Because the anchor stays put while new samples keep arriving, a consumer may
// take a whole update period to read an old frame while the next one fills.
// This replaces the two quarter-partitioned buffers that copy three quarters
// of their contents into each other between updates (the 75%-overlap double
// buffer): the store is DEPTH words, the same size as that buffer pair, and
// the overlap comes from moving the anchor by a quarter frame instead of
// copying. DEPTH must cover the longest delay read plus the samples written
// while a frame is being read; the owner of the buffer guarantees that.
//
// Each read port is an independent read of the array; in a device the store
// would be split into banks (one per branch filter or lane) so that each bank
// sees only a few reads per clock.
module sample_buffer
  import chan_pkg::*;
#(
  parameter int DEPTH = 4608,
  parameter int RD    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  sample_t                  wr_data,
  input  logic                     mark,
  input  logic [$clog2(DEPTH)-1:0] rd_delay [RD],
  output sample_t                  rd_data  [RD]
);
  localparam int AW = $clog2(DEPTH);

  sample_t        mem [DEPTH];
  logic [AW-1:0]  wp;       // next write address
  logic [AW-1:0]  anchor;   // address of the marked sample

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp     <= '0;
      anchor <= '0;
    end else if (wr_en) begin
      wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (mark) anchor <= wp;
    end
  end

  always_ff @(posedge clk)
    if (wr_en) mem[wp] <= wr_data;

  for (genvar p = 0; p < RD; p++) begin : g_rd
    logic [AW-1:0] addr;
    always_comb begin
      if (rd_delay[p] > anchor) addr = AW'(DEPTH) - (rd_delay[p] - anchor);
      else                      addr = anchor - rd_delay[p];
    end
    always_ff @(posedge clk) rd_data[p] <= mem[addr];
  end

endmodule
