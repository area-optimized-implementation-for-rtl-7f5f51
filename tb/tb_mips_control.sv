// tb_mips_control: self-checking test of the control unit.
//
// For each of the fifteen instructions, builds encodings with random register,
// shift and immediate fields and compares every control signal with the value
// the instruction's meaning calls for, written out here per instruction.
// Random encodings outside the instruction set must decode as a no-operation
// with `legal` low.
module tb_mips_control;
  import mips_pkg::*;

  word_t instr;
  ctrl_t ctrl;
  logic legal;
  int checks = 0, failures = 0;

  mips_control dut (.instr(instr), .ctrl(ctrl), .legal(legal));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {reg_write, reg_dst_rd, alu_src_imm, shift, alu_op, ovf_check,
  //            mem_read, mem_write, branch, branch_ne, jump, uses_rs, uses_rt}
  function automatic ctrl_t exp_ctrl(string m);
    ctrl_t c = CTRL_NOP;
    case (m)
      "add":  c = '{1,1,0,0,ALU_ADD,1,0,0,0,0,0,1,1};
      "addu": c = '{1,1,0,0,ALU_ADD,0,0,0,0,0,0,1,1};
      "sub":  c = '{1,1,0,0,ALU_SUB,1,0,0,0,0,0,1,1};
      "subu": c = '{1,1,0,0,ALU_SUB,0,0,0,0,0,0,1,1};
      "and":  c = '{1,1,0,0,ALU_AND,0,0,0,0,0,0,1,1};
      "or":   c = '{1,1,0,0,ALU_OR ,0,0,0,0,0,0,1,1};
      "slt":  c = '{1,1,0,0,ALU_SLT,0,0,0,0,0,0,1,1};
      "sll":  c = '{1,1,0,1,ALU_SLL,0,0,0,0,0,0,0,1};
      "srl":  c = '{1,1,0,1,ALU_SRL,0,0,0,0,0,0,0,1};
      "addi": c = '{1,0,1,0,ALU_ADD,1,0,0,0,0,0,1,0};
      "lw":   c = '{1,0,1,0,ALU_ADD,0,1,0,0,0,0,1,0};
      "sw":   c = '{0,0,1,0,ALU_ADD,0,0,1,0,0,0,1,1};
      "beq":  c = '{0,0,0,0,ALU_SUB,0,0,0,1,0,0,1,1};
      "bne":  c = '{0,0,0,0,ALU_SUB,0,0,0,1,1,0,1,1};
      "j":    c = '{0,0,0,0,ALU_ADD,0,0,0,0,0,1,0,0};
      default: ;
    endcase
    return c;
  endfunction

  function automatic word_t enc(string m, word_t r);
    case (m)
      "add":  return {6'h00, r[25:6], 6'h20};
      "addu": return {6'h00, r[25:6], 6'h21};
      "sub":  return {6'h00, r[25:6], 6'h22};
      "subu": return {6'h00, r[25:6], 6'h23};
      "and":  return {6'h00, r[25:6], 6'h24};
      "or":   return {6'h00, r[25:6], 6'h25};
      "slt":  return {6'h00, r[25:6], 6'h2A};
      "sll":  return {6'h00, r[25:6], 6'h00};
      "srl":  return {6'h00, r[25:6], 6'h02};
      "addi": return {6'h08, r[25:0]};
      "lw":   return {6'h23, r[25:0]};
      "sw":   return {6'h2B, r[25:0]};
      "beq":  return {6'h04, r[25:0]};
      "bne":  return {6'h05, r[25:0]};
      "j":    return {6'h02, r[25:0]};
      default: return '0;
    endcase
  endfunction

  string mn [15] = '{"add","addu","sub","subu","and","or","slt","sll","srl",
                     "addi","lw","sw","beq","bne","j"};

  function automatic bit is_legal(word_t w);
    logic [5:0] o = w[31:26], f = w[5:0];
    if (o == 6'h00) return f inside {6'h00, 6'h02, 6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h2A};
    return o inside {6'h02, 6'h04, 6'h05, 6'h08, 6'h23, 6'h2B};
  endfunction

  initial begin
    foreach (mn[k]) begin
      for (int n = 0; n < 50; n++) begin
        instr = enc(mn[k], $urandom);
        #1;
        checks++;
        if (ctrl !== exp_ctrl(mn[k]) || legal !== 1'b1) begin
          failures++;
          $display("FAIL %s instr=%h ctrl=%h exp=%h legal=%b", mn[k], instr, ctrl, exp_ctrl(mn[k]), legal);
        end
      end
    end
    for (int n = 0; n < 3000; n++) begin
      instr = $urandom;
      if (n % 2 == 0) instr[31:26] = 6'h00;
      if (is_legal(instr)) continue;
      #1;
      checks++;
      if (ctrl !== CTRL_NOP || legal !== 1'b0) begin
        failures++;
        $display("FAIL illegal instr=%h ctrl=%h legal=%b", instr, ctrl, legal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
