// mips_dmem: the data memory used by lw and sw.
//
// DEPTH 32-bit words addressed by a byte address whose low two bits are
// ignored (word accesses only; the address wraps modulo DEPTH words). The
// read is asynchronous, so a load's data is available in the memory stage it
// is addressed in; a store writes `wdata` on the rising edge when `we` is
// high. The array is not reset. Separation from the instruction memory
// follows the design; depth and timing are this design's choices.
module mips_dmem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic  clk,
  input  word_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
