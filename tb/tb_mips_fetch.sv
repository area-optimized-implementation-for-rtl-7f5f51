// tb_mips_fetch: self-checking test of the program counter.
//
// Random cycles of stall, taken branch and jump requests with random
// targets; after each rising edge the PC is compared with a reference that
// applies the priority branch > jump > stall > PC+4. Also checks the reset
// value and that pc4 is always PC + 4.
module tb_mips_fetch;
  import mips_pkg::*;

  logic clk = 0, rst_n = 0;
  logic stall, br, jmp;
  word_t bt, jt, pc, pc4, model;
  int checks = 0, failures = 0;

  mips_fetch dut (.clk(clk), .rst_n(rst_n), .stall(stall), .branch_taken(br),
                  .branch_target(bt), .jump(jmp), .jump_target(jt), .pc(pc), .pc4(pc4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    stall = 0; br = 0; jmp = 0; bt = 0; jt = 0;
    repeat (2) @(posedge clk);
    #1 chk("reset", pc, 32'h0);
    @(negedge clk) rst_n = 1;
    @(posedge clk);
    model = 4;
    #1 chk("first step", pc, model);
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      stall = ($urandom_range(0, 3) == 0);
      br    = ($urandom_range(0, 7) == 0);
      jmp   = ($urandom_range(0, 7) == 0);
      bt    = {$urandom} & ~32'h3;
      jt    = {$urandom} & ~32'h3;
      #1 chk("pc4", pc4, pc + 4);
      @(posedge clk);
      if (br)          model = bt;
      else if (jmp)    model = jt;
      else if (!stall) model = model + 4;
      #1 chk("pc", pc, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
