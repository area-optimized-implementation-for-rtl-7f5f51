// tb_mips_dmem: self-checking test of the data memory.
//
// Fills the memory through stores, then runs random mixed cycles of stores
// and loads against a reference array. A load is checked in the same cycle
// it is addressed (asynchronous read); a store must not be visible before
// the clock edge that writes it. DEPTH here must match the memory's default
// depth.
module tb_mips_dmem;
  import mips_pkg::*;
  localparam int DEPTH = 256;

  logic clk = 0;
  word_t addr, wd, rd;
  logic we;
  word_t model [DEPTH];
  int checks = 0, failures = 0;

  mips_dmem dut (.clk(clk), .addr(addr), .we(we), .wdata(wd), .rdata(rd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wd = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; addr = word_t'(i * 4); wd = $urandom; model[i] = wd;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we   = $urandom_range(0, 1);
      addr = {22'd0, 8'($urandom), 2'($urandom)};
      wd   = $urandom;
      #1;
      checks++;
      if (rd !== model[addr[9:2]]) begin
        failures++;
        $display("FAIL addr=%h got=%h exp=%h", addr, rd, model[addr[9:2]]);
      end
      @(posedge clk);
      if (we) model[addr[9:2]] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
