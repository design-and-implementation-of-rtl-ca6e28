// Reconfiguration memory of one PE.
//
// Holds NCTX context words, each giving the PE's operation and the sources of
// its two operands. A word is written when the configuration network delivers
// one addressed to this PE. The word of the active context is registered
// every cycle, so a new context takes effect one clock after ctx_sel changes:
// the whole array switches function in one cycle.
//
// Interface: wr_en/wr_slot/wr_ctx write one slot; ctx_sel picks the active
// slot; ctx_q is the registered active word. Reset clears every slot to a
// no-operation reading zero operands.
//
// That each PE keeps several contexts and switches between them in a cycle
// follows the published CREMA description; the context count of 8 (the most
// any of its accelerators uses) and the reset value are this design's choice.
module crema_context_mem
  import crema_pkg::*;
#(
  parameter int N = NCTX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_slot,
  input  pe_ctx_t              wr_ctx,
  input  logic [$clog2(N)-1:0] ctx_sel,
  output pe_ctx_t              ctx_q
);

  localparam pe_ctx_t CTX_IDLE = '{op: OP_NOP, src_a: SRC_ZERO, src_b: SRC_ZERO};

  pe_ctx_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= CTX_IDLE;
    end else if (wr_en) begin
      mem[wr_slot] <= wr_ctx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctx_q <= CTX_IDLE;
    else        ctx_q <= mem[ctx_sel];
  end

endmodule
