// mips_alu: the execute-stage arithmetic/logic unit.
//
// Computes y = a OP b for the operations of the instruction set: add, sub,
// and, or, slt (signed compare), and the logical shifts sll/srl, which shift
// operand b by the low five bits of operand a (the core feeds the shift-amount
// field into a). Purely combinational. `zero` is set when y is zero and is
// what the core uses to decide beq/bne (the ALU subtracts the two registers).
// `ovf` flags two's-complement overflow of add and sub; whether it matters is
// decided by the control unit (add/addi/sub check it, addu/subu do not).
// The operation set follows the instruction table of the design; the
// encoding of the operation select is this design's own.
module mips_alu
  import mips_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   y,
  output logic    zero,
  output logic    ovf
);

  word_t sum, diff;

  always_comb begin
    sum  = a + b;
    diff = a - b;
    unique case (op)
      ALU_ADD: y = sum;
      ALU_SUB: y = diff;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_SLL: y = b << a[4:0];
      ALU_SRL: y = b >> a[4:0];
      ALU_SLT: y = {31'd0, $signed(a) < $signed(b)};
      default: y = '0;
    endcase
    zero = (y == '0);
    unique case (op)
      ALU_ADD: ovf = (a[31] == b[31]) && (sum[31] != a[31]);
      ALU_SUB: ovf = (a[31] != b[31]) && (diff[31] != a[31]);
      default: ovf = 1'b0;
    endcase
  end

endmodule
