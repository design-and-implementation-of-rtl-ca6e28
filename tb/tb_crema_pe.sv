// Self-checking testbench of crema_pe.
//
// A single PE with identity 5. Configuration words addressed to other PEs
// must be passed on (right and down, one clock later) and not stored; words
// addressed to this PE must be stored and not passed on. With random
// candidate operands the testbench then checks, for random contexts, that
// both input multiplexers pick the named source, that the operation is
// applied, that a loop-back source accumulates, and that OP_URF passes the
// selected operands through in the same clock.
module tb_crema_pe;
  import crema_pkg::*;

  localparam int ID = 5;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    clr = 1'b0;
  logic                    imm_we = 1'b1;
  logic [CTXW-1:0]         ctx_sel = '0;
  logic                    cfg_valid_in = 1'b0;
  cfg_word_t               cfg_in = '0;
  logic                    cfg_valid_right, cfg_valid_down;
  cfg_word_t               cfg_right, cfg_down;
  logic [NSRC-1:0][DW-1:0] cand = '0;
  logic [DW-1:0]           out1, out2;
  int                      checks = 0, failures = 0;

  crema_pe #(.PE_ID(ID)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [DW-1:0] pick(pe_src_e s);
    if (s == SRC_ZERO) return '0;
    return cand[s];
  endfunction

  task automatic send(int pe, int slot, pe_op_e op, pe_src_e a, pe_src_e b);
    cfg_valid_in = 1'b1;
    cfg_in = '{pe: PEW'(pe), slot: CTXW'(slot), ctx: '{op: op, src_a: a, src_b: b}};
    @(posedge clk); #1;
    cfg_valid_in = 1'b0;
    check("forward right valid", 32'(cfg_valid_right), 32'(pe != ID));
    check("forward down valid", 32'(cfg_valid_down), 32'(pe != ID));
    if (pe != ID) check("forward word", 32'(cfg_right), 32'(cfg_in));
  endtask

  pe_src_e sa, sb;
  pe_op_e  ops [4] = '{OP_ADD, OP_SUB, OP_MUL, OP_XOR};
  logic [DW-1:0] exp_a, exp_b, acc;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Words for other PEs are forwarded, not stored.
    send(3, 0, OP_ADD, SRC_UP_A, SRC_UP_B);
    send(31, 0, OP_ADD, SRC_UP_A, SRC_UP_B);
    ctx_sel = 0;
    for (int i = 0; i < NSRC; i++) cand[i] = $urandom;
    @(posedge clk); @(posedge clk); #1;
    check("not stored", out1, '0);

    // Random contexts: mux selection and operation.
    for (int n = 0; n < 200; n++) begin
      do sa = pe_src_e'($urandom_range(0, 15)); while (sa == SRC_LOOP_A || sa == SRC_LOOP_B);
      do sb = pe_src_e'($urandom_range(0, 15)); while (sb == SRC_LOOP_A || sb == SRC_LOOP_B);
      send(ID, n % NCTX, ops[n % 4], sa, sb);
      ctx_sel = CTXW'(n % NCTX);
      @(posedge clk);               // context word registered
      for (int i = 0; i < NSRC; i++) cand[i] = $urandom;
      exp_a = pick(sa);
      exp_b = pick(sb);
      @(posedge clk); #1;           // operands registered
      case (ops[n % 4])
        OP_ADD:  check("ADD", out1, exp_a + exp_b);
        OP_SUB:  check("SUB", out1, exp_a - exp_b);
        OP_MUL:  check("MUL", out1, DW'(64'(exp_a) * 64'(exp_b)));
        default: check("XOR", out1, exp_a ^ exp_b);
      endcase
      check("OUT2", out2, exp_b);
    end

    // Feed-through: same clock, both operands.
    send(ID, 1, OP_URF, SRC_LEFT_A, SRC_HOR1);
    ctx_sel = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < NSRC; i++) cand[i] = $urandom;
      #1;
      check("URF out1", out1, cand[SRC_LEFT_A]);
      check("URF out2", out2, cand[SRC_HOR1]);
    end

    // Accumulation through the loop-back source.
    send(ID, 2, OP_ADD, SRC_UP_A, SRC_LOOP_A);
    ctx_sel = 2;
    @(posedge clk); #1;
    clr = 1'b1;
    @(posedge clk); #1;
    clr = 1'b0;
    acc = '0;
    for (int n = 0; n < 40; n++) begin
      cand[SRC_UP_A] = 32'($urandom_range(0, 5000));
      acc += cand[SRC_UP_A];
      @(posedge clk); #1;
      check("loop", out1, acc);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
