// One CREMA local memory: LANES banks of DEPTH 32-bit words.
//
// The array reads and writes a memory one line at a time: a line is the word
// at the same address in every bank, so 16 operands leave or arrive in one
// clock. Reads are registered (data one clock after rd_en). A line write
// writes only the banks whose wr_en bit is set. A separate word-wide port,
// used by the system's DMA device, reads and writes single words while the
// array is idle; its write wins over a line write to the same bank in the
// same clock, and its read data arrive one clock after dma_re.
//
// The two local memories of CREMA form a ping-pong pair: one feeds the array
// while the other receives its results, and the roles swap between runs.
// The swap is done outside this module by the accelerator top.
//
// The 16 x 256 x 32-bit organisation and line-only access by the array follow
// the published description; the DMA port and its priority are this design's
// choice. Contents are not reset.
module crema_local_mem
  import crema_pkg::*;
#(
  parameter int B = LANES,
  parameter int D = DEPTH
) (
  input  logic                     clk,
  // line read port (array side)
  input  logic                     rd_en,
  input  logic [$clog2(D)-1:0]     rd_addr,
  output logic [B-1:0][DW-1:0]     rd_data,
  // line write port (array side)
  input  logic [B-1:0]             wr_en,
  input  logic [$clog2(D)-1:0]     wr_addr,
  input  logic [B-1:0][DW-1:0]     wr_data,
  // word port (DMA side)
  input  logic                     dma_we,
  input  logic                     dma_re,
  input  logic [$clog2(B)-1:0]     dma_bank,
  input  logic [$clog2(D)-1:0]     dma_addr,
  input  logic [DW-1:0]            dma_wdata,
  output logic [DW-1:0]            dma_rdata
);

  logic [B-1:0][DW-1:0] dma_words;
  logic [$clog2(B)-1:0] dma_bank_q;

  for (genvar b = 0; b < B; b++) begin : g_bank
    logic [DW-1:0] mem [D];
    logic          dma_hit;

    assign dma_hit = dma_we && (int'(dma_bank) == b);

    always_ff @(posedge clk) begin
      if (dma_hit)        mem[dma_addr] <= dma_wdata;
      else if (wr_en[b])  mem[wr_addr]  <= wr_data[b];
    end

    always_ff @(posedge clk) begin
      if (rd_en) rd_data[b] <= mem[rd_addr];
    end

    // DMA read: every bank reads its word at dma_addr; one is picked below.
    always_ff @(posedge clk) begin
      if (dma_re) dma_words[b] <= mem[dma_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (dma_re) dma_bank_q <= dma_bank;
  end

  assign dma_rdata = dma_words[dma_bank_q];

endmodule
