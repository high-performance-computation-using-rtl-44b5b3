// spm: scratchpad memory between main memory and the LSRDP.
// NBANK banks of 64-bit words, DEPTH words deep. A "row" is the word at one
// address in every bank, i.e. one full LSRDP input or output vector, so the
// LSRDP side reads one row and writes one row per clock (64 x 8 bytes per
// clock at the defaults, the SPM <-> LSRDP bandwidth the document states) with
// a read latency of one clock (the document's 1cc SPM <-> LSRDP latency).
// A third, word-wide port serves the DMA engine; its word address is
// row * NBANK + bank and its read latency is also one clock. If the LSRDP
// write port and the DMA port write the same word in one clock, the LSRDP
// write wins. Size and port structure are this design's; the document only
// names the scratchpad and its bandwidth and latency to the LSRDP.
module spm
  import lsrdp_pkg::*;
#(
  parameter int unsigned NBANK = 64,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned RAW  = $clog2(DEPTH),
  localparam int unsigned WAW  = $clog2(NBANK * DEPTH)
) (
  input  logic           clk,
  // LSRDP read port (one row per clock)
  input  logic           rd_en,
  input  logic [RAW-1:0] rd_row,
  output fp64_t          rd_data [NBANK],
  // LSRDP write port (one row per clock)
  input  logic           wr_en,
  input  logic [RAW-1:0] wr_row,
  input  fp64_t          wr_data [NBANK],
  // DMA port (one word per clock)
  input  logic           dma_en,
  input  logic           dma_we,
  input  logic [WAW-1:0] dma_addr,
  input  fp64_t          dma_wdata,
  output fp64_t          dma_rdata
);

  fp64_t dma_q [NBANK];

  for (genvar k = 0; k < NBANK; k++) begin : g_bank
    fp64_t mem [DEPTH];
    logic  dma_hit;
    assign dma_hit = dma_en && (32'(dma_addr) % NBANK == k);

    always_ff @(posedge clk) begin
      if (dma_hit && dma_we) mem[RAW'(dma_addr / NBANK)] <= dma_wdata;
      if (wr_en)             mem[wr_row]                 <= wr_data[k];
      if (rd_en)             rd_data[k]                  <= mem[rd_row];
    end

    always_ff @(posedge clk) begin
      if (dma_hit && !dma_we) dma_q[k] <= mem[RAW'(dma_addr / NBANK)];
    end
  end

  // DMA read data: the bank addressed in the previous clock
  logic [$clog2(NBANK > 1 ? NBANK : 2)-1:0] dma_bank_q;
  always_ff @(posedge clk) begin
    if (dma_en && !dma_we) dma_bank_q <= $bits(dma_bank_q)'(dma_addr % NBANK);
  end

  assign dma_rdata = dma_q[dma_bank_q];

endmodule
