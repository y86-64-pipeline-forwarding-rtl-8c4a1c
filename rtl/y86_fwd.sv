// y86_fwd: decode-stage forwarding for the 5-stage Y86-64 pipeline.
//
// A value read from the register file in decode may be stale because an
// older instruction further down the pipeline has already computed the
// register's new value but not yet written it back.  This unit replaces
// the register-file output with that newer value, choosing by priority
// (the youngest producer wins):
//   valA: D_valP for call/jXX, then e_valE, m_valM, M_valE, W_valM, W_valE,
//         else the register file;
//   valB: e_valE, m_valM, M_valE, W_valM, W_valE, else the register file.
// A source or destination of REG_NONE never matches.  The e_valE / M_valE
// compare chain follows the forwarding rules of the pipeline; the memory
// and writeback sources and the merging of valP into valA are the standard
// Y86-64 choices of this design.  Purely combinational; selA/selB report
// which source was taken.
module y86_fwd
  import y86_pkg::*;
(
  input  icode_t  D_icode,
  input  word_t   D_valP,
  input  reg_id_t srcA,
  input  reg_id_t srcB,
  input  word_t   rvalA,
  input  word_t   rvalB,
  input  reg_id_t e_dstE,
  input  word_t   e_valE,
  input  reg_id_t M_dstM,
  input  word_t   m_valM,
  input  reg_id_t M_dstE,
  input  word_t   M_valE,
  input  reg_id_t W_dstM,
  input  word_t   W_valM,
  input  reg_id_t W_dstE,
  input  word_t   W_valE,
  output word_t   valA,
  output word_t   valB,
  output fwd_src_t selA,
  output fwd_src_t selB
);

  function automatic fwd_src_t pick(reg_id_t src, reg_id_t e_d, reg_id_t mm, reg_id_t me,
                                    reg_id_t wm, reg_id_t we);
    if (src == REG_NONE) return FWD_REG;
    if (src == e_d)      return FWD_E_E;
    if (src == mm)       return FWD_M_M;
    if (src == me)       return FWD_M_E;
    if (src == wm)       return FWD_W_M;
    if (src == we)       return FWD_W_E;
    return FWD_REG;
  endfunction

  function automatic word_t value_of(fwd_src_t s, word_t rv);
    case (s)
      FWD_VALP: return D_valP;
      FWD_E_E:  return e_valE;
      FWD_M_M:  return m_valM;
      FWD_M_E:  return M_valE;
      FWD_W_M:  return W_valM;
      FWD_W_E:  return W_valE;
      default:  return rv;
    endcase
  endfunction

  always_comb begin
    if (D_icode == I_CALL || D_icode == I_JXX) selA = FWD_VALP;
    else selA = pick(srcA, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE);
    selB = pick(srcB, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE);
    valA = value_of(selA, rvalA);
    valB = value_of(selB, rvalB);
  end

endmodule
