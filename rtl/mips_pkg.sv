// mips_pkg: shared types and constants of the five-stage MIPS-32 core.
//
// Holds the instruction encodings of the reduced instruction set the core
// implements (add, addi, addu, sub, subu, and, or, sll, srl, slt, lw, sw, beq,
// bne, j), the ALU operation enum, the decoded control bundle and the four
// pipeline-register structs (IF/ID, ID/EX, EX/MEM, MEM/WB). The instruction
// subset and field layout follow the standard MIPS-32 definition; the binary
// opcode and function values are the standard MIPS-32 ones. The grouping of
// control signals into one struct is this design's own choice.
package mips_pkg;

  localparam int unsigned XLEN = 32;  // data path and register width
  localparam int unsigned NREG = 32;  // general purpose registers

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      regaddr_t;

  // Primary opcodes (instr[31:26])
  typedef enum logic [5:0] {
    OP_SPECIAL = 6'h00,
    OP_J       = 6'h02,
    OP_BEQ     = 6'h04,
    OP_BNE     = 6'h05,
    OP_ADDI    = 6'h08,
    OP_LW      = 6'h23,
    OP_SW      = 6'h2B
  } opcode_e;

  // Function codes of opcode SPECIAL (instr[5:0])
  typedef enum logic [5:0] {
    FN_SLL  = 6'h00,
    FN_SRL  = 6'h02,
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_SLT  = 6'h2A
  } funct_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLL = 3'd4,
    ALU_SRL = 3'd5,
    ALU_SLT = 3'd6
  } alu_op_e;

  // Decoded control signals of one instruction
  typedef struct packed {
    logic    reg_write;  // writes a register in WB
    logic    reg_dst_rd; // destination is rd (R-type), else rt
    logic    alu_src_imm;// ALU operand B is the sign-extended immediate
    logic    shift;      // ALU operand A is the shift amount field
    alu_op_e alu_op;
    logic    ovf_check;  // signed overflow suppresses the write (add, addi, sub)
    logic    mem_read;   // lw
    logic    mem_write;  // sw
    logic    branch;     // beq or bne
    logic    branch_ne;  // bne
    logic    jump;       // j
    logic    uses_rs;    // reads rs as a source
    logic    uses_rt;    // reads rt as a source
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{alu_op: ALU_ADD, default: 1'b0};

  typedef struct packed {
    logic  valid;
    word_t pc4;     // address of the instruction + 4
    word_t instr;
  } if_id_t;

  typedef struct packed {
    logic     valid;
    ctrl_t    ctrl;
    word_t    pc4;
    word_t    rs_val;
    word_t    rt_val;
    word_t    imm;   // sign-extended immediate
    logic [4:0] sa;
    regaddr_t dst;
  } id_ex_t;

  typedef struct packed {
    logic     valid;
    logic     reg_write;
    logic     mem_read;
    logic     mem_write;
    logic     ovf;   // instruction overflowed, write suppressed
    word_t    alu_y;
    word_t    store_val;
    regaddr_t dst;
  } ex_mem_t;

  typedef struct packed {
    logic     valid;
    logic     reg_write;
    word_t    wdata;
    regaddr_t dst;
  } mem_wb_t;

endpackage
