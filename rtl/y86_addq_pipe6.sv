// y86_addq_pipe6: six-stage addq-only pipeline, F/D/E1/E2/M/W, in which
// the addition is spread over two execute stages.
//
// E1 adds the low 32 bits of valA and valB and keeps the carry; E2 adds
// the high halves plus that carry.  The full sum therefore exists only at
// the end of E2, one stage later than in a single-execute pipeline.  M does
// no work for addq and only carries valE on; W writes R[dstE] on the clock
// edge that ends the cycle.  Fetch reads rA from bits [15:12] and rB from
// bits [11:8] and advances the PC by 2, as in the four-stage version.
//
// Only bytes 0 and 1 of the fetched window are used and the memory's
// address-error flag is left unread: every instruction is a two-byte addq.
//
// Forwarding into decode, youngest first: the E2 adder output (e2_valE),
// the M stage's valE, the W stage's valE, else the register file.  An
// instruction in decode that needs the result of the instruction directly
// ahead of it (now in E1) cannot be served: that value does not exist yet.
// Fetch and decode then hold for one cycle and a bubble enters E1; in the
// next cycle the producer is in E2 and its result is forwarded.  So a
// back-to-back dependency costs exactly one cycle, and a dependency one
// instruction further apart costs nothing.
//
// Timing: rising-edge registers xF, fD, dE1, e1E2, e2M, mW; rst
// (synchronous, active high) clears the PC and fills the pipeline with
// bubbles (icode nop, REG_NONE).  The stage list, the one-cycle stall and
// its place (decode repeated, fetch repeated) follow the pipeline as
// specified; splitting the adder into 32-bit halves, the forwarding
// sources, the REG_NONE guard and the loader/debug ports are this design's
// choices.  ev_stall pulses in each stall cycle.
module y86_addq_pipe6
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
  output logic       ev_stall,    // decode held for a dependency on E1
  output logic       ev_fwd       // an operand was forwarded this cycle
);

  word_t      F_pc;
  addq_fd_t   D;
  addq_de_t   E1;
  addq_e1e2_t E2;
  addq_ew_t   M;
  addq_ew_t   W;

  // fetch
  logic [79:0] i10bytes;
  logic        imem_error;
  word_t       unused_rdata, unused_dbg;
  logic        unused_dmem_error;
  addq_fd_t    f_out;

  assign pc = F_pc;
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

  // decode with forwarding
  word_t    reg_outputA, reg_outputB, e2_valE;
  addq_de_t d_out;
  logic     stall, fwdA, fwdB;

  function automatic word_t fwd_val(reg_id_t src, word_t rv, output logic hit);
    hit = 1'b1;
    if (src != REG_NONE && src == E2.dstE) return e2_valE;
    if (src != REG_NONE && src == M.dstE)  return M.valE;
    if (src != REG_NONE && src == W.dstE)  return W.valE;
    hit = 1'b0;
    return rv;
  endfunction

  always_comb begin
    stall = E1.dstE != REG_NONE && (D.rA == E1.dstE || D.rB == E1.dstE);
    d_out.icode = D.icode;
    d_out.dstE  = D.rB;
    d_out.valA  = fwd_val(D.rA, reg_outputA, fwdA);
    d_out.valB  = fwd_val(D.rB, reg_outputB, fwdB);
  end

  y86_regfile u_rf (
    .clk, .rst,
    .srcA(D.rA), .srcB(D.rB), .valA(reg_outputA), .valB(reg_outputB),
    .dstE(W.dstE), .valE(W.valE), .dstM(REG_NONE), .valM('0),
    .ld_we(rf_ld_we), .ld_reg(rf_ld_reg), .ld_val(rf_ld_val),
    .dbg_reg, .dbg_val(dbg_regval)
  );

  // E1: low half; E2: high half plus carry
  logic [32:0] e1_lo;
  assign e1_lo   = {1'b0, E1.valA[31:0]} + {1'b0, E1.valB[31:0]};
  assign e2_valE = {E2.valA_hi + E2.valB_hi + 32'(E2.carry), E2.sum_lo};

  always_ff @(posedge clk) begin
    if (rst) begin
      F_pc <= '0;
      D    <= '{icode: I_NOP, rA: REG_NONE, rB: REG_NONE};
      E1   <= '{icode: I_NOP, valA: '0, valB: '0, dstE: REG_NONE};
      E2   <= '{icode: I_NOP, sum_lo: '0, carry: 1'b0, valA_hi: '0, valB_hi: '0, dstE: REG_NONE};
      M    <= '{icode: I_NOP, valE: '0, dstE: REG_NONE};
      W    <= '{icode: I_NOP, valE: '0, dstE: REG_NONE};
    end else begin
      if (!stall) begin
        F_pc <= F_pc + 64'd2;
        D    <= f_out;
        E1   <= d_out;
      end else begin
        E1   <= '{icode: I_NOP, valA: '0, valB: '0, dstE: REG_NONE};
      end
      E2 <= '{icode: E1.icode, sum_lo: e1_lo[31:0], carry: e1_lo[32],
              valA_hi: E1.valA[63:32], valB_hi: E1.valB[63:32], dstE: E1.dstE};
      M  <= '{icode: E2.icode, valE: e2_valE, dstE: E2.dstE};
      W  <= M;
    end
  end

  assign retire   = (W.icode == I_OPQ);
  assign ev_stall = stall;
  assign ev_fwd   = !stall && (fwdA || fwdB);

endmodule
