// tb_mips_alu: self-checking test of the ALU.
//
// Drives every operation with directed corner operands (0, 1, -1, the most
// positive and most negative numbers) and with random operands, and compares
// y, zero and ovf with a reference computed in 64-bit arithmetic: overflow is
// taken as the 64-bit signed result not fitting in 32 bits.
module tb_mips_alu;
  import mips_pkg::*;

  word_t a, b, y;
  alu_op_e op;
  logic zero, ovf;
  int checks = 0, failures = 0;

  mips_alu dut (.a(a), .b(b), .op(op), .y(y), .zero(zero), .ovf(ovf));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(word_t ta, word_t tb_, alu_op_e top);
    longint sa, sb, wide;
    word_t  ey;
    logic   eovf;
    a = ta; b = tb_; op = top;
    #1;
    sa = longint'($signed(ta)); sb = longint'($signed(tb_));
    eovf = 1'b0;
    case (top)
      ALU_ADD: begin wide = sa + sb; ey = wide[31:0]; eovf = (wide > 64'sd2147483647) || (wide < -64'sd2147483648); end
      ALU_SUB: begin wide = sa - sb; ey = wide[31:0]; eovf = (wide > 64'sd2147483647) || (wide < -64'sd2147483648); end
      ALU_AND: ey = ta & tb_;
      ALU_OR:  ey = ta | tb_;
      ALU_SLL: begin ey = tb_; repeat (int'(ta[4:0])) ey = {ey[30:0], 1'b0}; end
      ALU_SRL: begin ey = tb_; repeat (int'(ta[4:0])) ey = {1'b0, ey[31:1]}; end
      ALU_SLT: ey = (sa < sb) ? 32'd1 : 32'd0;
      default: ey = '0;
    endcase
    checks++;
    if (y !== ey || zero !== (ey == 0) || ovf !== eovf) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h/%h zero=%b ovf=%b/%b", top.name(), ta, tb_, y, ey, zero, ovf, eovf);
    end
  endtask

  word_t corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h0000_0010};

  initial begin
    for (int o = 0; o <= 6; o++)
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          check_one(corners[i], corners[j], alu_op_e'(o));
    for (int n = 0; n < 5000; n++)
      check_one($urandom, $urandom, alu_op_e'($urandom_range(0, 6)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
