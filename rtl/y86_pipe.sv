// y86_pipe: five-stage pipelined Y86-64 processor (fetch, decode, execute,
// memory, writeback) with forwarding, branch prediction and stalling.
//
// One instruction enters per cycle and one completes per cycle except at
// hazards.  Most data hazards are removed by forwarding into decode
// (y86_fwd): a register value already computed further down the pipeline
// replaces the stale register-file value.  What forwarding cannot fix is
// handled by y86_hazard: a load followed immediately by a use of the loaded
// register costs one stall cycle; jXX is predicted taken and a misprediction
// squashes two instructions (2 cycle penalty); ret stalls fetch for three
// cycles until the return address has been read from memory.
//
// Pipeline registers are F (predicted PC), D, E, M and W (structs from
// y86_pkg), updated on the rising clock edge; rst (synchronous, active
// high) fills them with bubbles and sets the PC to 0.  The instruction
// set, encodings, the choice of "predict taken", the call/ret/push/pop
// stack rules and the exception handling follow the Y86-64 architecture;
// the interface (loader, debug read ports, event outputs) is this
// design's own.
//
// Interface: program bytes are written through ld_* while rst is held;
// stat is the status of the last instruction to reach writeback (S_AOK
// while running, S_HLT after halt, S_ADR / S_INS on a fault).  The ev_*
// outputs pulse for one cycle when the named mechanism acts.
module y86_pipe
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ld_we,
  input  word_t      ld_addr,
  input  logic [7:0] ld_data,
  input  reg_id_t    dbg_reg,
  output word_t      dbg_regval,
  input  word_t      dbg_addr,
  output word_t      dbg_memval,
  output stat_t      stat,
  output logic       retire,        // a non-bubble instruction is in writeback
  output logic       ev_load_use,
  output logic       ev_mispredict,
  output logic       ev_ret_stall,
  output logic       ev_fwd
);

  word_t   F_predPC;
  pipe_d_t D;
  pipe_e_t E;
  pipe_m_t M;
  pipe_w_t W;

  // ---------------- control ----------------
  logic F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall;
  logic load_use, mispredict, ret_hazard;

  // ---------------- fetch ----------------
  word_t       f_pc, f_valC, f_valP, f_predPC;
  logic [79:0] ibytes;
  logic        imem_error, instr_valid, need_regids, need_valC;
  icode_t      f_icode;
  logic [3:0]  f_ifun;
  reg_id_t     f_rA, f_rB;
  stat_t       f_stat;
  logic [3:0]  raw_icode;

  // ---------------- memory-stage wires ----------------
  word_t mem_addr, m_valM, mem_rdata;
  logic  mem_read, mem_write, dmem_error;
  stat_t m_stat;

  always_comb begin
    // select PC: mispredicted branch, ret, or prediction
    if (M.icode == I_JXX && !M.cnd) f_pc = M.valA;
    else if (W.icode == I_RET)      f_pc = W.valM;
    else                            f_pc = F_predPC;

    raw_icode = imem_error ? 4'(I_NOP) : ibytes[7:4];
    f_ifun    = imem_error ? 4'h0 : ibytes[3:0];
    instr_valid = raw_icode <= 4'(I_POPQ);
    f_icode   = icode_t'(raw_icode);
    need_regids = f_icode inside {I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ, I_IRMOVQ,
                                  I_RMMOVQ, I_MRMOVQ};
    need_valC   = f_icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};
    f_rA  = need_regids ? ibytes[15:12] : REG_NONE;
    f_rB  = need_regids ? ibytes[11:8]  : REG_NONE;
    f_valC = need_regids ? ibytes[79:16] : ibytes[71:8];
    f_valP = f_pc + 64'(1) + (need_regids ? 64'(1) : 64'(0)) + (need_valC ? 64'(8) : 64'(0));
    if (imem_error)        f_stat = S_ADR;
    else if (!instr_valid) f_stat = S_INS;
    else if (f_icode == I_HALT) f_stat = S_HLT;
    else                   f_stat = S_AOK;
    f_predPC = (f_icode == I_JXX || f_icode == I_CALL) ? f_valC : f_valP;
  end

  // ---------------- decode ----------------
  reg_id_t  d_srcA, d_srcB, d_dstE, d_dstM;
  word_t    d_rvalA, d_rvalB, d_valA, d_valB;
  fwd_src_t selA, selB;
  word_t    e_valE;
  reg_id_t  e_dstE;

  always_comb begin
    case (D.icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ: d_srcA = D.rA;
      I_POPQ, I_RET:                      d_srcA = REG_RSP;
      default:                            d_srcA = REG_NONE;
    endcase
    case (D.icode)
      I_OPQ, I_RMMOVQ, I_MRMOVQ:            d_srcB = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:       d_srcB = REG_RSP;
      default:                              d_srcB = REG_NONE;
    endcase
    case (D.icode)
      I_RRMOVQ, I_IRMOVQ, I_OPQ:            d_dstE = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:       d_dstE = REG_RSP;
      default:                              d_dstE = REG_NONE;
    endcase
    d_dstM = (D.icode == I_MRMOVQ || D.icode == I_POPQ) ? D.rA : REG_NONE;
  end

  y86_regfile u_rf (
    .clk, .rst,
    .srcA(d_srcA), .srcB(d_srcB), .valA(d_rvalA), .valB(d_rvalB),
    .dstE(W.dstE), .valE(W.valE), .dstM(W.dstM), .valM(W.valM),
    .ld_we(1'b0), .ld_reg(REG_NONE), .ld_val('0),
    .dbg_reg, .dbg_val(dbg_regval)
  );

  y86_fwd u_fwd (
    .D_icode(D.icode), .D_valP(D.valP), .srcA(d_srcA), .srcB(d_srcB),
    .rvalA(d_rvalA), .rvalB(d_rvalB),
    .e_dstE, .e_valE, .M_dstM(M.dstM), .m_valM, .M_dstE(M.dstE), .M_valE(M.valE),
    .W_dstM(W.dstM), .W_valM(W.valM), .W_dstE(W.dstE), .W_valE(W.valE),
    .valA(d_valA), .valB(d_valB), .selA, .selB
  );

  // ---------------- execute ----------------
  cc_t   cc, alu_flags;
  word_t alu_a, alu_b;
  logic [3:0] alufun;
  logic  set_cc, e_cnd;

  always_comb begin
    case (E.icode)
      I_RRMOVQ, I_OPQ:             alu_a = E.valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: alu_a = E.valC;
      I_CALL, I_PUSHQ:             alu_a = -64'sd8;
      I_RET, I_POPQ:               alu_a = 64'd8;
      default:                     alu_a = '0;
    endcase
    alu_b  = (E.icode == I_RRMOVQ || E.icode == I_IRMOVQ) ? '0 : E.valB;
    alufun = (E.icode == I_OPQ) ? E.ifun : ALU_ADD;
    set_cc = (E.icode == I_OPQ) &&
             !(m_stat inside {S_ADR, S_INS, S_HLT}) &&
             !(W.stat inside {S_ADR, S_INS, S_HLT});
    e_cnd  = cond_holds(cc, E.ifun);
    e_dstE = (E.icode == I_RRMOVQ && !e_cnd) ? REG_NONE : E.dstE;
  end

  y86_alu u_alu (.a(alu_a), .b(alu_b), .alufun, .result(e_valE), .flags(alu_flags));

  always_ff @(posedge clk) begin
    if (rst)         cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc <= alu_flags;
  end

  // ---------------- memory ----------------
  always_comb begin
    mem_addr  = (M.icode == I_POPQ || M.icode == I_RET) ? M.valA : M.valE;
    mem_read  = M.icode inside {I_MRMOVQ, I_POPQ, I_RET};
    mem_write = M.icode inside {I_RMMOVQ, I_PUSHQ, I_CALL};
    m_valM    = mem_rdata;
    m_stat    = dmem_error ? S_ADR : M.stat;
  end

  y86_mem #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk,
    .ipc(f_pc), .ibytes, .imem_error,
    .daddr(mem_addr), .dread(mem_read), .dwrite(mem_write), .wdata(M.valA),
    .rdata(mem_rdata), .dmem_error,
    .ld_we, .ld_addr, .ld_data,
    .dbg_addr, .dbg_data(dbg_memval)
  );

  // ---------------- control ----------------
  y86_hazard u_hz (
    .D_icode(D.icode), .E_icode(E.icode), .M_icode(M.icode), .E_dstM(E.dstM),
    .d_srcA, .d_srcB, .e_cnd, .m_stat, .W_stat(W.stat),
    .F_stall, .D_stall, .D_bubble, .E_bubble, .M_bubble, .W_stall,
    .load_use, .mispredict, .ret_hazard
  );

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      F_predPC <= '0;
      D <= D_BUBBLE;
      E <= E_BUBBLE;
      M <= M_BUBBLE;
      W <= W_BUBBLE;
    end else begin
      if (!F_stall) F_predPC <= f_predPC;

      if (D_bubble)     D <= D_BUBBLE;
      else if (!D_stall)
        D <= '{stat: f_stat, icode: f_icode, ifun: f_ifun, rA: f_rA, rB: f_rB,
               valC: f_valC, valP: f_valP};

      if (E_bubble) E <= E_BUBBLE;
      else E <= '{stat: D.stat, icode: D.icode, ifun: D.ifun, valC: D.valC,
                  valA: d_valA, valB: d_valB, dstE: d_dstE, dstM: d_dstM};

      if (M_bubble) M <= M_BUBBLE;
      else M <= '{stat: E.stat, icode: E.icode, cnd: e_cnd, valE: e_valE,
                  valA: E.valA, dstE: e_dstE, dstM: E.dstM};

      if (!W_stall)
        W <= '{stat: m_stat, icode: M.icode, valE: M.valE, valM: m_valM,
               dstE: M.dstE, dstM: M.dstM};
    end
  end

  assign stat   = (W.stat == S_BUB) ? S_AOK : W.stat;
  assign retire = (W.stat != S_BUB) && !W_stall;

  assign ev_load_use   = load_use;
  assign ev_mispredict = mispredict;
  assign ev_ret_stall  = ret_hazard && !load_use;
  assign ev_fwd        = (selA != FWD_REG && selA != FWD_VALP) || (selB != FWD_REG);

endmodule
