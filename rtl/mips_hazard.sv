// mips_hazard: read-after-write hazard detector of the decode stage.
//
// The core has no forwarding paths. An instruction in decode that reads a
// register which an older instruction still in the execute or memory stage
// will write must wait: `stall` is raised while rs (if read) or rt (if read)
// equals the destination of a register-writing instruction in either stage.
// Register 0 never causes a stall. A writer in write-back needs no stall,
// because the register file passes a same-cycle write through to its reads.
// Purely combinational. Stalling on hazards in decode follows the design;
// the absence of forwarding and the exact comparison set are this design's.
module mips_hazard
  import mips_pkg::*;
(
  input  regaddr_t id_rs,
  input  regaddr_t id_rt,
  input  logic     id_uses_rs,
  input  logic     id_uses_rt,
  input  logic     ex_reg_write,
  input  regaddr_t ex_dst,
  input  logic     mem_reg_write,
  input  regaddr_t mem_dst,
  output logic     stall
);

  function automatic logic hit(regaddr_t src, logic used);
    return used && (src != '0) &&
           ((ex_reg_write && src == ex_dst) || (mem_reg_write && src == mem_dst));
  endfunction

  assign stall = hit(id_rs, id_uses_rs) || hit(id_rt, id_uses_rt);

endmodule
