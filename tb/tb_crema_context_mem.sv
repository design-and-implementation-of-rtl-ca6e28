// Self-checking testbench of crema_context_mem.
//
// Checks the reset contents, then writes random context words into random
// slots while keeping a reference copy, and checks that selecting a slot
// presents its word exactly one clock later (one-cycle context switch).
module tb_crema_context_mem;
  import crema_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            wr_en = 1'b0;
  logic [CTXW-1:0] wr_slot = '0;
  pe_ctx_t         wr_ctx = '0;
  logic [CTXW-1:0] ctx_sel = '0;
  pe_ctx_t         ctx_q;
  int              checks = 0, failures = 0;
  pe_ctx_t         model [NCTX];

  crema_context_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, pe_ctx_t got, pe_ctx_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < NCTX; i++) model[i] = '{op: OP_NOP, src_a: SRC_ZERO, src_b: SRC_ZERO};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NCTX; i++) begin
      ctx_sel = CTXW'(i);
      @(posedge clk); #1;
      check("reset", ctx_q, model[i]);
    end

    for (int n = 0; n < 300; n++) begin
      // write one slot
      wr_en   = 1'b1;
      wr_slot = CTXW'($urandom_range(0, NCTX-1));
      wr_ctx  = pe_ctx_t'(12'($urandom));
      model[wr_slot] = wr_ctx;
      @(posedge clk); #1;
      wr_en = 1'b0;
      // switch context: the new word must show after exactly one clock
      ctx_sel = CTXW'($urandom_range(0, NCTX-1));
      #1;
      @(posedge clk); #1;
      check("switch", ctx_q, model[ctx_sel]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
