// One CREMA processing element: routing, reconfiguration and function.
//
// The PE has three parts. Routing: two input multiplexers (A and B) each pick
// one of the 15 candidate operands offered by the array (neighbour outputs,
// own outputs fed back, interleaved and global connections) or zero.
// Reconfiguration: a context memory whose active word sets both multiplexer
// selects and the operation. Function: the PE core.
//
// Configuration words travel through the array as a pipeline. A word enters
// on cfg_in; the PE stores it when its header names PE_ID, and passes it on
// registered to the right (cfg_right) and downwards (cfg_down). The array
// uses the right-hand path only along row 0, so a word reaches PE (r, c)
// r + c + 1 clocks after it enters at PE (0, 0).
//
// Timing: registered operations give out1/out2 one clock after the operands
// are offered; OP_URF passes the selected operands straight through. The
// feed-through multiplexers ignore the two loop-back sources, so no
// configuration can close a combinational loop.
//
// The three-part structure and the pipelined, header-addressed delivery of
// configuration words follow the published description; the cfg_in word
// format and the delivery path (right along row 0, then down each column) are
// this design's choices.
//
// FU_ADD .. FU_IMM are handed to the PE core: they remove function units at
// design time (see crema_pe_core).
module crema_pe
  import crema_pkg::*;
#(
  parameter int PE_ID    = 0,
  parameter bit FU_ADD   = 1'b1,
  parameter bit FU_MUL   = 1'b1,
  parameter bit FU_SHIFT = 1'b1,
  parameter bit FU_LUT   = 1'b1,
  parameter bit FU_IMM   = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     imm_we,
  input  logic [CTXW-1:0]          ctx_sel,
  input  logic                     cfg_valid_in,
  input  cfg_word_t                cfg_in,
  output logic                     cfg_valid_right,
  output cfg_word_t                cfg_right,
  output logic                     cfg_valid_down,
  output cfg_word_t                cfg_down,
  input  logic [NSRC-1:0][DW-1:0]  cand,     // SRC_LOOP_A/B entries unused
  output logic [DW-1:0]            out1,
  output logic [DW-1:0]            out2
);

  pe_ctx_t       ctx;
  logic [DW-1:0] mux_a, mux_b, urf_a, urf_b;
  logic          cfg_hit;

  assign cfg_hit = cfg_valid_in && (int'(cfg_in.pe) == PE_ID);

  crema_context_mem u_ctx (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (cfg_hit),
    .wr_slot (cfg_in.slot),
    .wr_ctx  (cfg_in.ctx),
    .ctx_sel (ctx_sel),
    .ctx_q   (ctx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_valid_right <= 1'b0;
      cfg_valid_down  <= 1'b0;
      cfg_right       <= '0;
      cfg_down        <= '0;
    end else begin
      cfg_valid_right <= cfg_valid_in && !cfg_hit;
      cfg_valid_down  <= cfg_valid_in && !cfg_hit;
      cfg_right       <= cfg_in;
      cfg_down        <= cfg_in;
    end
  end

  // Feed-through multiplexers: every source but the loop-back ones, which
  // the array leaves at zero in cand.
  always_comb begin
    urf_a = (ctx.src_a == SRC_ZERO) ? '0 : cand[ctx.src_a];
    urf_b = (ctx.src_b == SRC_ZERO) ? '0 : cand[ctx.src_b];
  end

  // Input multiplexers A and B: the loop-back sources are the PE's own outputs.
  always_comb begin
    unique case (ctx.src_a)
      SRC_LOOP_A: mux_a = out1;
      SRC_LOOP_B: mux_a = out2;
      default:    mux_a = urf_a;
    endcase
    unique case (ctx.src_b)
      SRC_LOOP_A: mux_b = out1;
      SRC_LOOP_B: mux_b = out2;
      default:    mux_b = urf_b;
    endcase
  end

  crema_pe_core #(
    .FU_ADD  (FU_ADD),
    .FU_MUL  (FU_MUL),
    .FU_SHIFT(FU_SHIFT),
    .FU_LUT  (FU_LUT),
    .FU_IMM  (FU_IMM)
  ) u_core (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr),
    .imm_we(imm_we),
    .op    (ctx.op),
    .in_a  (mux_a),
    .in_b  (mux_b),
    .urf_a (urf_a),
    .urf_b (urf_b),
    .out1  (out1),
    .out2  (out2)
  );

endmodule
