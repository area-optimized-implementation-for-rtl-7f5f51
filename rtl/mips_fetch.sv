// mips_fetch: program counter and next-PC selection of the fetch stage.
//
// The PC addresses the instruction memory each cycle. On a rising edge it
// takes, in order of priority: the branch target when a branch resolved in
// the execute stage is taken; the jump target when a jump is decoded; its
// own value when the decode stage stalls; otherwise PC + 4. Reset (active
// low, asynchronous) sets it to RESET_PC. `pc4` is PC + 4, which travels with
// the instruction for the branch and jump target computations. The order of
// priority and reset value are this design's choices.
module mips_fetch
  import mips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  stall,
  input  logic  branch_taken,
  input  word_t branch_target,
  input  logic  jump,
  input  word_t jump_target,
  output word_t pc,
  output word_t pc4
);

  word_t pc_q;

  assign pc  = pc_q;
  assign pc4 = pc_q + 32'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            pc_q <= RESET_PC;
    else if (branch_taken) pc_q <= branch_target;
    else if (jump)         pc_q <= jump_target;
    else if (!stall)       pc_q <= pc4;
  end

endmodule
