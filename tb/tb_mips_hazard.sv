// tb_mips_hazard: self-checking test of the hazard detector.
//
// Random register numbers (drawn from a small range so that matches are
// frequent) and enables, checked against an independent reference: stall
// when a used, non-zero source equals the destination of a register-writing
// instruction in EX or M. Directed cases cover register 0 and each source
// and stage alone.
module tb_mips_hazard;
  import mips_pkg::*;

  regaddr_t rs, rt, exd, memd;
  logic urs, urt, exw, memw, stall;
  int checks = 0, failures = 0;
  int stalls = 0;

  mips_hazard dut (.id_rs(rs), .id_rt(rt), .id_uses_rs(urs), .id_uses_rt(urt),
                   .ex_reg_write(exw), .ex_dst(exd), .mem_reg_write(memw), .mem_dst(memd),
                   .stall(stall));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(regaddr_t a, regaddr_t b, logic ua, logic ub,
                       logic ew, regaddr_t ed, logic mw, regaddr_t md);
    logic exp;
    rs = a; rt = b; urs = ua; urt = ub; exw = ew; exd = ed; memw = mw; memd = md;
    #1;
    exp = 1'b0;
    if (ua && a != 0 && ((ew && ed == a) || (mw && md == a))) exp = 1'b1;
    if (ub && b != 0 && ((ew && ed == b) || (mw && md == b))) exp = 1'b1;
    checks++;
    if (exp) stalls++;
    if (stall !== exp) begin
      failures++;
      $display("FAIL rs=%0d rt=%0d urs=%b urt=%b ex=%b/%0d mem=%b/%0d stall=%b exp=%b",
               a, b, ua, ub, ew, ed, mw, md, stall, exp);
    end
  endtask

  initial begin
    apply(0, 0, 1, 1, 1, 0, 1, 0);   // r0 never stalls
    apply(3, 0, 1, 0, 1, 3, 0, 0);   // rs vs EX
    apply(3, 0, 1, 0, 0, 0, 1, 3);   // rs vs M
    apply(0, 4, 0, 1, 1, 4, 0, 0);   // rt vs EX
    apply(0, 4, 0, 1, 0, 0, 1, 4);   // rt vs M
    apply(5, 5, 0, 0, 1, 5, 1, 5);   // sources not used
    apply(6, 7, 1, 1, 0, 6, 0, 7);   // producers do not write
    for (int n = 0; n < 5000; n++)
      apply(regaddr_t'($urandom_range(0, 3)), regaddr_t'($urandom_range(0, 3)),
            1'($urandom), 1'($urandom), 1'($urandom), regaddr_t'($urandom_range(0, 3)),
            1'($urandom), regaddr_t'($urandom_range(0, 3)));
    if (stalls == 0) begin failures++; $display("FAIL no stall was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
