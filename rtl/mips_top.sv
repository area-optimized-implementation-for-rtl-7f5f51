// mips_top: five-stage pipelined MIPS-32 core with separate instruction and
// data memories and run-time program loading.
//
// Stages: IF (PC, instruction memory), ID (control unit, register file read,
// hazard detection), EX (ALU, branch decision), M (data memory) and WB
// (register write). The pipeline registers IF/ID, ID/EX, EX/MEM and MEM/WB are
// packed structs from mips_pkg; a bubble is a cleared valid bit.
//
// Hazards. There is no forwarding. The hazard detector stalls an instruction
// in ID while one of its source registers is the destination of an older
// instruction in EX or M: the PC and IF/ID hold and a bubble enters EX. A
// result in WB reaches ID through the register file's write-through, so a
// dependent instruction waits at most two cycles (also after a load).
// Control flow. `j` is resolved in ID: the PC takes the jump target and the
// instruction fetched behind the jump is dropped (one lost cycle). beq/bne
// are resolved in EX by the ALU's subtract and zero flag: when taken, the PC
// takes PC+4+(offset<<2) and the two younger instructions in IF/ID and ID/EX
// are dropped (two lost cycles); not-taken branches cost nothing. The core
// fetches past a branch on the assumption it is not taken.
// Overflow. When add, addi or sub overflow, the register write is suppressed
// and `overflow_o` pulses for one cycle while the instruction is in M. There
// is no exception handler; the program continues with the next instruction.
//
// Program loading. While `load_en` is high the core is held in reset (from
// the next clock edge on) and each cycle writes `load_data` to instruction
// word `load_addr`. One cycle after `load_en` falls the core leaves reset and
// starts fetching at address 0 with all registers cleared. The data memory
// keeps its contents across a load.
//
// Observation ports: the PC, every register write as it retires from WB,
// every data-memory store, and a retire strobe per instruction leaving WB.
// With no hazards and no taken branch the core completes one instruction per
// cycle; the first instruction retires in the fifth cycle after reset ends.
//
// The five stages, the separate memories, the hazard stall in ID and the
// instruction set follow the design description. The branch and jump
// resolution stages, the absence of forwarding, the overflow behaviour, the
// load port and the memory depths are this design's own choices.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // run-time program loading
  input  logic           load_en,
  input  logic [IAW-1:0] load_addr,
  input  word_t          load_data,
  // observation
  output word_t          pc_o,
  output logic           retire_o,
  output logic           wb_we_o,
  output regaddr_t       wb_addr_o,
  output word_t          wb_data_o,
  output logic           store_o,
  output word_t          store_addr_o,
  output word_t          store_data_o,
  output logic           overflow_o
);

  // ------------------------------------------------------------------
  // Core reset: asserted with rst_n, and from the edge after load_en rises
  // until the edge after it falls.
  logic run_q, core_rst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run_q <= 1'b0;
    else        run_q <= !load_en;
  end
  assign core_rst_n = rst_n && run_q;

  if_id_t  ifid_q;
  id_ex_t  idex_q;
  ex_mem_t exmem_q;
  mem_wb_t memwb_q;

  logic  stall, branch_taken, jump_id;
  word_t branch_target, jump_target;

  // ------------------------------------------------------------------
  // IF
  word_t pc, pc4, instr_if;

  mips_fetch u_fetch (
    .clk          (clk),
    .rst_n        (core_rst_n),
    .stall        (stall),
    .branch_taken (branch_taken),
    .branch_target(branch_target),
    .jump         (jump_id),
    .jump_target  (jump_target),
    .pc           (pc),
    .pc4          (pc4)
  );

  mips_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk      (clk),
    .addr     (pc),
    .instr    (instr_if),
    .load_we  (load_en),
    .load_addr(load_addr),
    .load_data(load_data)
  );

  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n)                 ifid_q <= '0;
    else if (branch_taken || jump_id) ifid_q <= '0;
    else if (!stall)                 ifid_q <= '{valid: 1'b1, pc4: pc4, instr: instr_if};
  end

  // ------------------------------------------------------------------
  // ID
  ctrl_t    ctrl_id;
  logic     legal_id;
  regaddr_t rs_id, rt_id, rd_id;
  word_t    rs_val, rt_val, imm_id;

  assign rs_id  = ifid_q.instr[25:21];
  assign rt_id  = ifid_q.instr[20:16];
  assign rd_id  = ifid_q.instr[15:11];
  assign imm_id = {{16{ifid_q.instr[15]}}, ifid_q.instr[15:0]};

  mips_control u_ctrl (
    .instr(ifid_q.instr),
    .ctrl (ctrl_id),
    .legal(legal_id)
  );

  mips_regfile u_rf (
    .clk   (clk),
    .rst_n (core_rst_n),
    .raddr1(rs_id),
    .rdata1(rs_val),
    .raddr2(rt_id),
    .rdata2(rt_val),
    .we    (memwb_q.valid && memwb_q.reg_write),
    .waddr (memwb_q.dst),
    .wdata (memwb_q.wdata)
  );

  mips_hazard u_hazard (
    .id_rs        (rs_id),
    .id_rt        (rt_id),
    .id_uses_rs   (ifid_q.valid && ctrl_id.uses_rs),
    .id_uses_rt   (ifid_q.valid && ctrl_id.uses_rt),
    .ex_reg_write (idex_q.valid && idex_q.ctrl.reg_write),
    .ex_dst       (idex_q.dst),
    .mem_reg_write(exmem_q.valid && exmem_q.reg_write),
    .mem_dst      (exmem_q.dst),
    .stall        (stall)
  );

  assign jump_id     = ifid_q.valid && ctrl_id.jump && !branch_taken;
  assign jump_target = {ifid_q.pc4[31:28], ifid_q.instr[25:0], 2'b00};

  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n) idex_q <= '0;
    else if (branch_taken || stall || !ifid_q.valid || !legal_id) idex_q <= '0;
    else idex_q <= '{valid:  1'b1,
                     ctrl:   ctrl_id,
                     pc4:    ifid_q.pc4,
                     rs_val: rs_val,
                     rt_val: rt_val,
                     imm:    imm_id,
                     sa:     ifid_q.instr[10:6],
                     dst:    ctrl_id.reg_dst_rd ? rd_id : rt_id};
  end

  // ------------------------------------------------------------------
  // EX
  word_t alu_a, alu_b, alu_y;
  logic  alu_zero, alu_ovf, ovf_ex;

  assign alu_a = idex_q.ctrl.shift ? {27'd0, idex_q.sa} : idex_q.rs_val;
  assign alu_b = idex_q.ctrl.alu_src_imm ? idex_q.imm : idex_q.rt_val;

  mips_alu u_alu (
    .a   (alu_a),
    .b   (alu_b),
    .op  (idex_q.ctrl.alu_op),
    .y   (alu_y),
    .zero(alu_zero),
    .ovf (alu_ovf)
  );

  assign ovf_ex        = idex_q.ctrl.ovf_check && alu_ovf;
  assign branch_taken  = idex_q.valid && idex_q.ctrl.branch &&
                         (alu_zero != idex_q.ctrl.branch_ne);
  assign branch_target = idex_q.pc4 + {idex_q.imm[29:0], 2'b00};

  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n) exmem_q <= '0;
    else exmem_q <= '{valid:     idex_q.valid,
                      reg_write: idex_q.valid && idex_q.ctrl.reg_write && !ovf_ex,
                      mem_read:  idex_q.valid && idex_q.ctrl.mem_read,
                      mem_write: idex_q.valid && idex_q.ctrl.mem_write,
                      ovf:       idex_q.valid && ovf_ex,
                      alu_y:     alu_y,
                      store_val: idex_q.rt_val,
                      dst:       idex_q.dst};
  end

  // ------------------------------------------------------------------
  // M
  word_t mem_rdata;

  mips_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk  (clk),
    .addr (exmem_q.alu_y),
    .we   (exmem_q.valid && exmem_q.mem_write),
    .wdata(exmem_q.store_val),
    .rdata(mem_rdata)
  );

  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n) memwb_q <= '0;
    else memwb_q <= '{valid:     exmem_q.valid,
                      reg_write: exmem_q.reg_write,
                      wdata:     exmem_q.mem_read ? mem_rdata : exmem_q.alu_y,
                      dst:       exmem_q.dst};
  end

  // ------------------------------------------------------------------
  // WB and observation
  assign pc_o         = pc;
  assign retire_o     = memwb_q.valid;
  assign wb_we_o      = memwb_q.valid && memwb_q.reg_write && (memwb_q.dst != '0);
  assign wb_addr_o    = memwb_q.dst;
  assign wb_data_o    = memwb_q.wdata;
  assign store_o      = exmem_q.valid && exmem_q.mem_write;
  assign store_addr_o = exmem_q.alu_y;
  assign store_data_o = exmem_q.store_val;
  assign overflow_o   = exmem_q.valid && exmem_q.ovf;

  // A stalled decode stage must hold the PC unless control flow redirects it.
  a_stall_holds_pc: assert property (@(posedge clk) disable iff (!rst_n || !run_q)
    (stall && !branch_taken && !jump_id) |=> $stable(pc));
  // A jump never waits on the hazard detector: it reads no register.
  a_jump_no_stall: assert property (@(posedge clk) disable iff (!rst_n || !run_q)
    jump_id |-> !stall);

endmodule
