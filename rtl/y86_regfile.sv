// y86_regfile: the Y86-64 program register file.
//
// Fifteen 64-bit registers, numbered 0..14; number 15 (REG_NONE) means
// "no register": it reads as zero and a write to it is dropped.  Two
// combinational read ports (srcA -> valA, srcB -> valB) and two write ports
// (dstE <- valE, dstM <- valM) that take effect on the rising clock edge,
// as drawn in the forwarding-logic datapath.  A read in the same cycle as a
// write to the same register returns the old value: the pipelines resolve
// that case by forwarding, not inside the register file.  If both write
// ports name the same register the dstM port wins (popq %rsp keeps the
// value loaded from memory); that priority, the synchronous active-high
// reset to zero and the extra loader write port (ld_we/ld_reg/ld_val,
// ignored during reset, lowest priority) and debug read port are choices
// of this design.
module y86_regfile
  import y86_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  reg_id_t srcA,
  input  reg_id_t srcB,
  output word_t   valA,
  output word_t   valB,
  input  reg_id_t dstE,
  input  word_t   valE,
  input  reg_id_t dstM,
  input  word_t   valM,
  input  logic    ld_we,
  input  reg_id_t ld_reg,
  input  word_t   ld_val,
  input  reg_id_t dbg_reg,
  output word_t   dbg_val
);

  word_t regs [15];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 15; i++) regs[i] <= '0;
    end else begin
      if (ld_we && ld_reg != REG_NONE) regs[ld_reg] <= ld_val;
      if (dstE != REG_NONE) regs[dstE] <= valE;
      if (dstM != REG_NONE) regs[dstM] <= valM;
    end
  end

  assign valA    = (srcA == REG_NONE) ? '0 : regs[srcA];
  assign valB    = (srcB == REG_NONE) ? '0 : regs[srcB];
  assign dbg_val = (dbg_reg == REG_NONE) ? '0 : regs[dbg_reg];

endmodule
