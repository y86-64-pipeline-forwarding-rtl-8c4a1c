// y86_hazard: pipeline control (stall and bubble signals) for the 5-stage
// Y86-64 pipeline.
//
// Three hazards remain once forwarding is in place:
//   load/use: a mrmovq or popq in execute whose destination is a source of
//     the instruction in decode.  Fetch and decode hold for one cycle and a
//     bubble enters execute (1 cycle penalty).
//   mispredicted jXX: jumps are predicted taken; when the jXX in execute
//     finds its condition false, the two younger instructions in decode and
//     execute-input are squashed (bubbles), a 2 cycle penalty.
//   ret: the return address comes out of data memory, so fetch holds and
//     bubbles enter decode while a ret is in decode, execute or memory
//     (3 cycles).
// Also: once an exception status (halt, bad address, bad instruction)
// reaches memory or writeback, memory takes bubbles and writeback holds,
// so nothing after the faulting instruction changes state.  The penalties
// are those of the pipeline; the exact stall/bubble equations and the
// exception handling are the standard Y86-64 choices of this design.
// Purely combinational.
module y86_hazard
  import y86_pkg::*;
(
  input  icode_t  D_icode,
  input  icode_t  E_icode,
  input  icode_t  M_icode,
  input  reg_id_t E_dstM,
  input  reg_id_t d_srcA,
  input  reg_id_t d_srcB,
  input  logic    e_cnd,
  input  stat_t   m_stat,
  input  stat_t   W_stat,
  output logic    F_stall,
  output logic    D_stall,
  output logic    D_bubble,
  output logic    E_bubble,
  output logic    M_bubble,
  output logic    W_stall,
  output logic    load_use,
  output logic    mispredict,
  output logic    ret_hazard
);

  function automatic logic is_exc(stat_t s);
    return s == S_ADR || s == S_INS || s == S_HLT;
  endfunction

  always_comb begin
    load_use   = (E_icode == I_MRMOVQ || E_icode == I_POPQ) && E_dstM != REG_NONE &&
                 (E_dstM == d_srcA || E_dstM == d_srcB);
    mispredict = (E_icode == I_JXX) && !e_cnd;
    ret_hazard = (D_icode == I_RET) || (E_icode == I_RET) || (M_icode == I_RET);

    F_stall  = load_use || ret_hazard;
    D_stall  = load_use;
    D_bubble = mispredict || (!load_use && ret_hazard);
    E_bubble = mispredict || load_use;
    M_bubble = is_exc(m_stat) || is_exc(W_stat);
    W_stall  = is_exc(W_stat);
  end

endmodule
