// PE core: the functional part of one CREMA processing element.
//
// Two operand registers, always present, capture the outputs of the PE's
// two input multiplexers on every clock. Behind them sit the functional
// units (adder/subtractor, multiplier, shifter, a LUT for bitwise logic and
// an immediate register) and a result multiplexer that picks OUT1 according
// to the current operation. OUT2 is the operand 2 register, so a PE can hand
// its second operand on to the PE below. The shifter takes its shift amount
// from the immediate register through the operand 2 multiplexer.
//
// Mapping adaptiveness: FU_ADD, FU_MUL, FU_SHIFT, FU_LUT and FU_IMM choose at
// design time which units exist. An operation whose unit is left out gives
// zero. The PE array instantiates every unit by default.
//
// Timing: one cycle from in_a/in_b to out1/out2 for every registered
// operation. OP_URF is the unregistered feed-through: out1 = urf_a and
// out2 = urf_b in the same cycle. OP_LDIMM loads the immediate register from
// in_b at a clock edge where imm_we is high (imm_we marks a valid line on the
// vertical inputs; between lines the register keeps its value). clr zeroes
// the operand registers (used to start accumulation loops from zero); it
// leaves the immediate register alone.
//
// The unit list, the two outputs and the feed-through follow the published
// PE description. The floating-point unit of that description is not built;
// the multiplier keeps the low 32 bits of the product; the LUT is read as
// bitwise AND/OR/XOR; these are choices of this implementation.
module crema_pe_core
  import crema_pkg::*;
#(
  parameter bit FU_ADD   = 1'b1,
  parameter bit FU_MUL   = 1'b1,
  parameter bit FU_SHIFT = 1'b1,
  parameter bit FU_LUT   = 1'b1,
  parameter bit FU_IMM   = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          imm_we,
  input  pe_op_e        op,
  input  logic [DW-1:0] in_a,
  input  logic [DW-1:0] in_b,
  input  logic [DW-1:0] urf_a,
  input  logic [DW-1:0] urf_b,
  output logic [DW-1:0] out1,
  output logic [DW-1:0] out2
);

  logic [DW-1:0] opa_q, opb_q, imm_q;
  logic [DW-1:0] op2;        // operand 2 multiplexer: register or immediate
  logic [DW-1:0] res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opa_q <= '0;
      opb_q <= '0;
    end else if (clr) begin
      opa_q <= '0;
      opb_q <= '0;
    end else begin
      opa_q <= in_a;
      opb_q <= in_b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         imm_q <= '0;
    else if (FU_IMM && imm_we && op == OP_LDIMM) imm_q <= in_b;
  end

  assign op2 = (op == OP_SHR || op == OP_SHL) ? imm_q : opb_q;

  always_comb begin
    res = '0;
    unique case (op)
      OP_ADD:   if (FU_ADD)   res = opa_q + op2;
      OP_SUB:   if (FU_ADD)   res = opa_q - op2;
      OP_MUL:   if (FU_MUL)   res = opa_q * op2;
      OP_SHR:   if (FU_SHIFT) res = DW'($signed(opa_q) >>> op2[4:0]);
      OP_SHL:   if (FU_SHIFT) res = opa_q << op2[4:0];
      OP_AND:   if (FU_LUT)   res = opa_q & op2;
      OP_OR:    if (FU_LUT)   res = opa_q | op2;
      OP_XOR:   if (FU_LUT)   res = opa_q ^ op2;
      OP_DELAY:               res = opa_q;
      default:                res = '0;
    endcase
  end

  always_comb begin
    if (op == OP_URF) begin
      out1 = urf_a;
      out2 = urf_b;
    end else begin
      out1 = res;
      out2 = opb_q;
    end
  end

endmodule
