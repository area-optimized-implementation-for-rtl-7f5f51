// tb_mips_regfile: self-checking test of the register file.
//
// Checks that reset clears every register, then runs random cycles of one
// write and two reads against a reference array, checking that register 0
// always reads 0, that writes land on the clock edge, and that a read of the
// register being written in the same cycle returns the new value.
module tb_mips_regfile;
  import mips_pkg::*;

  logic clk = 0, rst_n = 0;
  regaddr_t ra1, ra2, wa;
  word_t rd1, rd2, wd;
  logic we;
  word_t model [32];
  int checks = 0, failures = 0;

  mips_regfile dut (.clk(clk), .rst_n(rst_n), .raddr1(ra1), .rdata1(rd1), .raddr2(ra2),
                    .rdata2(rd2), .we(we), .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_rd(regaddr_t ra);
    if (ra == 0) return '0;
    if (we && wa == ra) return wd;
    return model[ra];
  endfunction

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin
      ra1 = regaddr_t'(i); #1; chk("reset", rd1, '0);
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 3) != 0);
      wa  = regaddr_t'($urandom);
      wd  = $urandom;
      ra1 = ($urandom_range(0, 3) == 0) ? wa : regaddr_t'($urandom);
      ra2 = ($urandom_range(0, 7) == 0) ? 5'd0 : regaddr_t'($urandom);
      #1;
      chk("rd1", rd1, expect_rd(ra1));
      chk("rd2", rd2, expect_rd(ra2));
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
