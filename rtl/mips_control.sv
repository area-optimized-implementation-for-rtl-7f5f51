// mips_control: the hard-wired instruction decoder (control unit).
//
// Takes a 32-bit instruction, looks at the opcode (bits 31..26) and, for
// opcode SPECIAL, the function field (bits 5..0), and produces the control
// bundle `ctrl` that steers the rest of the pipeline: register write and its
// destination (rd for R-type, rt for addi/lw), the ALU operation and operand
// sources, overflow checking (add, addi, sub), memory read/write (lw/sw),
// branch (beq/bne) and jump (j), and which source registers the instruction
// reads (for the hazard detector). Purely combinational. An encoding outside
// the implemented set decodes as a no-operation and drops `legal`.
// The instruction set and which instructions detect overflow follow the
// design's instruction table; the standard MIPS-32 encodings are used.
module mips_control
  import mips_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl,
  output logic  legal
);

  logic [5:0] opc, fn;
  assign opc = instr[31:26];
  assign fn  = instr[5:0];

  always_comb begin
    ctrl  = CTRL_NOP;
    legal = 1'b1;
    unique case (opc)
      OP_SPECIAL: begin
        ctrl.reg_write  = 1'b1;
        ctrl.reg_dst_rd = 1'b1;
        ctrl.uses_rs    = 1'b1;
        ctrl.uses_rt    = 1'b1;
        unique case (fn)
          FN_ADD:  begin ctrl.alu_op = ALU_ADD; ctrl.ovf_check = 1'b1; end
          FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB:  begin ctrl.alu_op = ALU_SUB; ctrl.ovf_check = 1'b1; end
          FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; ctrl.shift = 1'b1; ctrl.uses_rs = 1'b0; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; ctrl.shift = 1'b1; ctrl.uses_rs = 1'b0; end
          default: begin ctrl = CTRL_NOP; legal = 1'b0; end
        endcase
      end
      OP_ADDI: begin
        ctrl.reg_write   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.alu_op      = ALU_ADD;
        ctrl.ovf_check   = 1'b1;
        ctrl.uses_rs     = 1'b1;
      end
      OP_LW: begin
        ctrl.reg_write   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.alu_op      = ALU_ADD;
        ctrl.mem_read    = 1'b1;
        ctrl.uses_rs     = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src_imm = 1'b1;
        ctrl.alu_op      = ALU_ADD;
        ctrl.mem_write   = 1'b1;
        ctrl.uses_rs     = 1'b1;
        ctrl.uses_rt     = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.alu_op    = ALU_SUB;
        ctrl.branch    = 1'b1;
        ctrl.branch_ne = (opc == OP_BNE);
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
      end
      OP_J: ctrl.jump = 1'b1;
      default: legal = 1'b0;
    endcase
  end

endmodule
