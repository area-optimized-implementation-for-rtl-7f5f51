// tb_mips_imem: self-checking test of the instruction memory.
//
// Loads every word through the load port with a pattern derived from its
// index, reads all of them back through the fetch port by byte address
// (with and without the ignored low address bits set), then reloads a
// random subset and checks that only those words changed. DEPTH here must
// match the memory's default depth.
module tb_mips_imem;
  import mips_pkg::*;
  localparam int DEPTH = 256;

  logic clk = 0;
  word_t addr, instr, ld;
  logic we;
  logic [7:0] la;
  word_t model [DEPTH];
  int checks = 0, failures = 0;

  mips_imem dut (.clk(clk), .addr(addr), .instr(instr),
                                  .load_we(we), .load_addr(la), .load_data(ld));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < DEPTH; i++) begin
      addr = word_t'(i * 4) | word_t'($urandom_range(0, 3));
      #1;
      checks++;
      if (instr !== model[i]) begin
        failures++;
        $display("FAIL word %0d got=%h exp=%h", i, instr, model[i]);
      end
    end
  endtask

  initial begin
    we = 0; la = 0; ld = 0; addr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; la = 8'(i); ld = word_t'(i) * 32'h0101_0101 ^ 32'hA5A5_0000;
      model[i] = ld;
    end
    @(negedge clk); we = 0;
    read_all();
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      we = 1; la = 8'($urandom); ld = $urandom;
      model[la] = ld;
    end
    @(negedge clk); we = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
