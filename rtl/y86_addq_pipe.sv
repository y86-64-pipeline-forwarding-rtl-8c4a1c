// y86_addq_pipe: four-stage pipelined processor that runs only addq, with
// forwarding.
//
// Stages: fetch + PC update, decode, execute, writeback, separated by the
// pipeline registers xF (pc), fD (icode, rA, rB), dE (icode, valA, valB,
// dstE) and eW (icode, valE, dstE).  Every instruction is taken to be a
// two-byte "addq rA, rB": fetch reads rA from instruction bits [15:12] and
// rB from bits [11:8] and advances the PC by 2; decode reads R[rA] and
// R[rB] and sets dstE = rB; execute adds; writeback writes valE to R[dstE].
//
// Forwarding: an instruction in decode may need the result of the one
// just ahead of it (now in execute) or the one two ahead (now in
// writeback, whose register write only lands at the end of the cycle).
// Two multiplexers in front of the dE register replace the register-file
// output: first by e_valE when the source equals the execute stage's dstE,
// else by W_valE when it equals the writeback stage's dstE.  With both
// paths every back-to-back dependency runs without a stall.
//
// Only bytes 0 and 1 of the fetched window are used and the memory's
// address-error flag is left unread: every instruction is a two-byte addq.
//
// Because addq alone cannot create a non-zero value, initial register
// contents are written through the rf_ld_* port (ignored during reset).
//
// Timing: all state changes on the rising clock edge; rst (synchronous,
// active high) clears the PC and fills fD/dE/eW with bubbles (icode nop,
// registers REG_NONE).  The stage split, pipeline-register fields, reset
// values and the e_valE forwarding rule follow the pipeline as specified;
// the writeback forwarding path, the REG_NONE guard on the compares, the
// loader/debug ports and the memory size are this design's choices.
module y86_addq_pipe
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ld_we,
  input  word_t      ld_addr,
  input  logic [7:0] ld_data,
  input  logic       rf_ld_we,    // register-file loader port
  input  reg_id_t    rf_ld_reg,
  input  word_t      rf_ld_val,
  input  reg_id_t    dbg_reg,
  output word_t      dbg_regval,
  output word_t      pc,
  output logic       retire,      // an addq is in writeback this cycle
  output logic       ev_fwd_e,    // an operand was forwarded from execute
  output logic       ev_fwd_w     // an operand was forwarded from writeback
);

  word_t    F_pc;      // register xF
  addq_fd_t D;         // register fD
  addq_de_t E;         // register dE
  addq_ew_t W;         // register eW

  // fetch
  logic [79:0] i10bytes;
  logic        imem_error;
  word_t       x_pc, unused_rdata, unused_dbg;
  logic        unused_dmem_error;
  addq_fd_t    f_out;

  assign pc   = F_pc;
  assign x_pc = pc + 64'd2;
  always_comb begin
    f_out.icode = icode_t'(i10bytes[7:4]);
    f_out.rA    = i10bytes[15:12];
    f_out.rB    = i10bytes[11:8];
  end

  y86_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk,
    .ipc(pc), .ibytes(i10bytes), .imem_error,
    .daddr('0), .dread(1'b0), .dwrite(1'b0), .wdata('0),
    .rdata(unused_rdata), .dmem_error(unused_dmem_error),
    .ld_we, .ld_addr, .ld_data,
    .dbg_addr('0), .dbg_data(unused_dbg)
  );

  // decode
  reg_id_t reg_srcA, reg_srcB;
  word_t   reg_outputA, reg_outputB;
  addq_de_t d_out;
  logic     fwdA_e, fwdA_w, fwdB_e, fwdB_w;
  word_t    e_valE;

  assign reg_srcA = D.rA;
  assign reg_srcB = D.rB;

  always_comb begin
    fwdA_e = reg_srcA != REG_NONE && reg_srcA == E.dstE;
    fwdA_w = reg_srcA != REG_NONE && reg_srcA == W.dstE;
    fwdB_e = reg_srcB != REG_NONE && reg_srcB == E.dstE;
    fwdB_w = reg_srcB != REG_NONE && reg_srcB == W.dstE;
    d_out.icode = D.icode;
    d_out.dstE  = D.rB;
    d_out.valA  = fwdA_e ? e_valE : fwdA_w ? W.valE : reg_outputA;
    d_out.valB  = fwdB_e ? e_valE : fwdB_w ? W.valE : reg_outputB;
  end

  y86_regfile u_rf (
    .clk, .rst,
    .srcA(reg_srcA), .srcB(reg_srcB), .valA(reg_outputA), .valB(reg_outputB),
    .dstE(W.dstE), .valE(W.valE), .dstM(REG_NONE), .valM('0),
    .ld_we(rf_ld_we), .ld_reg(rf_ld_reg), .ld_val(rf_ld_val),
    .dbg_reg, .dbg_val(dbg_regval)
  );

  // execute
  assign e_valE = E.valA + E.valB;

  always_ff @(posedge clk) begin
    if (rst) begin
      F_pc <= '0;
      D    <= '{icode: I_NOP, rA: REG_NONE, rB: REG_NONE};
      E    <= '{icode: I_NOP, valA: '0, valB: '0, dstE: REG_NONE};
      W    <= '{icode: I_NOP, valE: '0, dstE: REG_NONE};
    end else begin
      F_pc <= x_pc;
      D    <= f_out;
      E    <= d_out;
      W    <= '{icode: E.icode, valE: e_valE, dstE: E.dstE};
    end
  end

  assign retire   = (W.icode == I_OPQ);
  assign ev_fwd_e = fwdA_e | fwdB_e;
  assign ev_fwd_w = (fwdA_w & ~fwdA_e) | (fwdB_w & ~fwdB_e);

endmodule
