// y86_pkg: shared types and constants for the two Y86-64 pipelines in this
// library (the 4-stage addq pipeline and the 5-stage Y86-64 pipeline).
//
// Instruction codes, function codes, register numbers and status codes are
// those of the standard Y86-64 instruction set; REG_NONE (0xF) is the
// "no register" number that the pipeline registers reset to.  The pipeline
// register structs hold exactly the fields each stage hands to the next.
// Instruction bytes are packed little-endian: byte 0 (icode:ifun) is
// bits [7:0], byte 1 (rA:rB) is bits [15:8], so rA is bits [15:12] and rB
// bits [11:8] of the fetched 10-byte window.
package y86_pkg;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  reg_id_t;

  // instruction codes (icode)
  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,  // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  // ALU function codes (ifun of OPq)
  localparam logic [3:0] ALU_ADD = 4'h0;
  localparam logic [3:0] ALU_SUB = 4'h1;
  localparam logic [3:0] ALU_AND = 4'h2;
  localparam logic [3:0] ALU_XOR = 4'h3;

  // condition function codes (ifun of jXX and cmovXX)
  localparam logic [3:0] C_YES = 4'h0;
  localparam logic [3:0] C_LE  = 4'h1;
  localparam logic [3:0] C_L   = 4'h2;
  localparam logic [3:0] C_E   = 4'h3;
  localparam logic [3:0] C_NE  = 4'h4;
  localparam logic [3:0] C_GE  = 4'h5;
  localparam logic [3:0] C_G   = 4'h6;

  localparam reg_id_t REG_RSP  = 4'h4;
  localparam reg_id_t REG_NONE = 4'hF;

  // processor status; S_BUB marks a bubble in a pipeline register
  typedef enum logic [2:0] {
    S_BUB = 3'd0,
    S_AOK = 3'd1,
    S_HLT = 3'd2,
    S_ADR = 3'd3,
    S_INS = 3'd4
  } stat_t;

  // condition codes
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // ---------------------------------------------------------------
  // 4-stage addq pipeline registers (xF, fD, dE, eW)
  // ---------------------------------------------------------------
  typedef struct packed {
    icode_t  icode;
    reg_id_t rA;
    reg_id_t rB;
  } addq_fd_t;

  typedef struct packed {
    icode_t  icode;
    word_t   valA;
    word_t   valB;
    reg_id_t dstE;
  } addq_de_t;

  typedef struct packed {
    icode_t  icode;
    word_t   valE;
    reg_id_t dstE;
  } addq_ew_t;

  // ---------------------------------------------------------------
  // 6-stage addq pipeline (execute split into E1 and E2)
  // ---------------------------------------------------------------
  typedef struct packed {
    icode_t      icode;
    logic [31:0] sum_lo;   // low half of valA + valB
    logic        carry;    // carry out of the low half
    logic [31:0] valA_hi;
    logic [31:0] valB_hi;
    reg_id_t     dstE;
  } addq_e1e2_t;

  // ---------------------------------------------------------------
  // 5-stage pipeline registers (D, E, M, W inputs)
  // ---------------------------------------------------------------
  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic [3:0] ifun;
    reg_id_t rA;
    reg_id_t rB;
    word_t   valC;
    word_t   valP;
  } pipe_d_t;

  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic [3:0] ifun;
    word_t   valC;
    word_t   valA;
    word_t   valB;
    reg_id_t dstE;
    reg_id_t dstM;
  } pipe_e_t;

  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic    cnd;
    word_t   valE;
    word_t   valA;
    reg_id_t dstE;
    reg_id_t dstM;
  } pipe_m_t;

  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    word_t   valE;
    word_t   valM;
    reg_id_t dstE;
    reg_id_t dstM;
  } pipe_w_t;

  localparam pipe_d_t D_BUBBLE = '{stat: S_BUB, icode: I_NOP, ifun: 4'h0,
                                   rA: REG_NONE, rB: REG_NONE, valC: '0, valP: '0};
  localparam pipe_e_t E_BUBBLE = '{stat: S_BUB, icode: I_NOP, ifun: 4'h0, valC: '0,
                                   valA: '0, valB: '0, dstE: REG_NONE, dstM: REG_NONE};
  localparam pipe_m_t M_BUBBLE = '{stat: S_BUB, icode: I_NOP, cnd: 1'b0, valE: '0,
                                   valA: '0, dstE: REG_NONE, dstM: REG_NONE};
  localparam pipe_w_t W_BUBBLE = '{stat: S_BUB, icode: I_NOP, valE: '0, valM: '0,
                                   dstE: REG_NONE, dstM: REG_NONE};

  // forwarding source chosen for a decode operand (for event counting)
  typedef enum logic [2:0] {
    FWD_REG   = 3'd0,  // register file output, nothing forwarded
    FWD_VALP  = 3'd1,  // D_valP (call / jXX)
    FWD_E_E   = 3'd2,  // e_valE, ALU output in execute
    FWD_M_M   = 3'd3,  // m_valM, data memory output
    FWD_M_E   = 3'd4,  // M_valE
    FWD_W_M   = 3'd5,  // W_valM
    FWD_W_E   = 3'd6   // W_valE
  } fwd_src_t;

  // condition evaluation for jXX / cmovXX
  function automatic logic cond_holds(cc_t cc, logic [3:0] ifun);
    logic lt;
    lt = cc.sf ^ cc.of;
    case (ifun)
      C_YES:   return 1'b1;
      C_LE:    return lt | cc.zf;
      C_L:     return lt;
      C_E:     return cc.zf;
      C_NE:    return ~cc.zf;
      C_GE:    return ~lt;
      C_G:     return ~lt & ~cc.zf;
      default: return 1'b0;
    endcase
  endfunction

endpackage
