// mips_imem: instruction memory with a run-time program-load port.
//
// DEPTH 32-bit words, kept apart from the data memory so that fetch and a
// load/store never compete for one memory. The fetch port reads
// asynchronously: the word at byte address `addr` (bits [1:0] ignored, the
// address wraps modulo DEPTH words) appears on `instr` in the same cycle.
// Machine code is written at run time through the load port: when `load_we`
// is high, `load_data` is stored at word index `load_addr` on the rising
// edge. The core is held in reset while a program is being loaded (see
// mips_top). That programs are loaded at run time follows the design; the
// shape of the load port, the depth and the asynchronous read are this
// design's choices. The array is not reset; it holds whatever was loaded.
module mips_imem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  word_t         addr,
  output word_t         instr,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  word_t         load_data
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign instr = mem[addr[AW+1:2]];

endmodule
