// mips_regfile: the 32 x 32-bit general purpose register file.
//
// Two asynchronous read ports (rs, rt) and one write port written on the
// rising clock edge. Register 0 is hard-wired to zero: writes to it are
// dropped and it always reads as 0. A read of the register being written in
// the same cycle returns the new value (write-through), so an instruction in
// decode sees the result of the instruction in write-back without a stall;
// this stands in for the usual "write in the first half cycle, read in the
// second" of a five-stage pipeline and is this design's choice. Registers
// are cleared by the active-low reset.
module mips_regfile
  import mips_pkg::*;
#(
  parameter int unsigned NUM_REGS = NREG
) (
  input  logic     clk,
  input  logic     rst_n,
  input  regaddr_t raddr1,
  output word_t    rdata1,
  input  regaddr_t raddr2,
  output word_t    rdata2,
  input  logic     we,
  input  regaddr_t waddr,
  input  word_t    wdata
);

  word_t regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic word_t rd(regaddr_t ra);
    if (ra == '0)                return '0;
    else if (we && ra == waddr)  return wdata;
    else                         return regs[ra];
  endfunction

  assign rdata1 = rd(raddr1);
  assign rdata2 = rd(raddr2);

endmodule
