// Self-checking testbench of crema_pe_core.
//
// Drives random operands through every operation and compares OUT1/OUT2,
// one clock later, with a reference computed here. Also checks the
// immediate register as shift amount, the unregistered feed-through (same
// clock), the clear of the operand registers and an accumulation loop built
// by feeding OUT1 back to operand B.
module tb_crema_pe_core;
  import crema_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          clr = 1'b0;
  logic          imm_we = 1'b0;
  pe_op_e        op = OP_NOP;
  logic [DW-1:0] in_a = '0, in_b = '0, urf_a = '0, urf_b = '0;
  logic [DW-1:0] out1, out2;
  int            checks = 0, failures = 0;

  crema_pe_core dut (.*);

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

  function automatic logic [DW-1:0] ref_op(pe_op_e o, logic [DW-1:0] a, logic [DW-1:0] b,
                                           logic [DW-1:0] imm);
    logic signed [DW-1:0] sa;
    sa = a;
    case (o)
      OP_ADD:   return a + b;
      OP_SUB:   return a - b;
      OP_MUL:   return DW'(64'(a) * 64'(b));
      OP_SHR:   return sa >>> imm[4:0];
      OP_SHL:   return a << imm[4:0];
      OP_AND:   return a & b;
      OP_OR:    return a | b;
      OP_XOR:   return a ^ b;
      OP_DELAY: return a;
      default:  return '0;
    endcase
  endfunction

  // Apply operands for one clock, then check the registered result.
  task automatic step(pe_op_e o, logic [DW-1:0] a, logic [DW-1:0] b, logic [DW-1:0] imm);
    op   = o;
    in_a = a;
    in_b = b;
    @(posedge clk);
    #1;
    check($sformatf("%s out1", o.name()), out1, ref_op(o, a, b, imm));
    check($sformatf("%s out2", o.name()), out2, b);
  endtask

  logic [DW-1:0] imm, acc, a, b;
  pe_op_e        ops [9] = '{OP_ADD, OP_SUB, OP_MUL, OP_SHR, OP_SHL, OP_AND, OP_OR, OP_XOR, OP_DELAY};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;

    // Load immediate 12 (the shift used after every fixed-point multiply).
    imm = 32'd12;
    op = OP_LDIMM; in_b = imm; imm_we = 1'b1;
    @(posedge clk); #1;
    check("LDIMM out1", out1, '0);
    // Without imm_we the register keeps its value.
    imm_we = 1'b0; in_b = 32'd3;
    @(posedge clk); #1;
    check("LDIMM held", dut.imm_q, imm);

    for (int n = 0; n < 400; n++) begin
      a = $urandom;
      b = $urandom;
      if (n % 50 == 0) begin
        imm = 32'($urandom_range(0, 31));
        op = OP_LDIMM; in_b = imm; imm_we = 1'b1;
        @(posedge clk); #1;
        imm_we = 1'b0;
      end
      step(ops[n % 9], a, b, imm);
    end

    // Unregistered feed-through: visible in the same clock.
    for (int n = 0; n < 20; n++) begin
      op = OP_URF;
      urf_a = $urandom;
      urf_b = $urandom;
      #1;
      check("URF out1", out1, urf_a);
      check("URF out2", out2, urf_b);
    end

    // Accumulation loop: operand B is OUT1 fed back; clr starts it at zero.
    op = OP_ADD;
    clr = 1'b1;
    @(posedge clk); #1;
    clr = 1'b0;
    check("clr out1", out1, '0);
    acc = '0;
    for (int n = 0; n < 30; n++) begin
      a = 32'($urandom_range(0, 1000));
      in_a = a;
      in_b = out1;
      @(posedge clk); #1;
      acc += a;
      check("loop sum", out1, acc);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
