// tb_y86_hazard: self-checking test of the pipeline control unit.
//
// Directed cases for each hazard (load/use, mispredicted jXX, ret in each
// of decode/execute/memory, load/use combined with ret, exceptions) with
// the expected stall/bubble pattern written out by hand, followed by
// random inputs that check the invariants: a stalled stage is never also
// bubbled unless the hazard rules say so, and fetch stalls whenever decode
// stalls.
module tb_y86_hazard;
  import y86_pkg::*;

  icode_t  D_icode, E_icode, M_icode;
  reg_id_t E_dstM, d_srcA, d_srcB;
  logic    e_cnd;
  stat_t   m_stat, W_stat;
  logic    F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall;
  logic    load_use, mispredict, ret_hazard;
  int checks = 0, failures = 0;

  y86_hazard dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    D_icode = I_NOP; E_icode = I_NOP; M_icode = I_NOP; E_dstM = REG_NONE;
    d_srcA = REG_NONE; d_srcB = REG_NONE; e_cnd = 1; m_stat = S_AOK; W_stat = S_AOK;
  endtask

  // expected {F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall}
  task automatic expect6(string w, logic [5:0] e);
    #1;
    checks++;
    if ({F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall} !== e) begin
      failures++;
      $display("FAIL %s got %b exp %b", w, {F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall}, e);
    end
  endtask

  initial begin
    idle(); expect6("idle", 6'b000000);
    idle(); E_icode = I_MRMOVQ; E_dstM = 4'h3; d_srcB = 4'h3; expect6("load/use srcB", 6'b110100);
    idle(); E_icode = I_POPQ; E_dstM = 4'h5; d_srcA = 4'h5; expect6("load/use popq", 6'b110100);
    idle(); E_icode = I_MRMOVQ; E_dstM = 4'h3; d_srcA = 4'h2; expect6("no dependency", 6'b000000);
    idle(); E_icode = I_OPQ; E_dstM = 4'h3; d_srcA = 4'h3; expect6("not a load", 6'b000000);
    idle(); E_icode = I_JXX; e_cnd = 0; expect6("mispredict", 6'b001100);
    idle(); E_icode = I_JXX; e_cnd = 1; expect6("predicted right", 6'b000000);
    idle(); D_icode = I_RET; expect6("ret in D", 6'b101000);
    idle(); E_icode = I_RET; expect6("ret in E", 6'b101000);
    idle(); M_icode = I_RET; expect6("ret in M", 6'b101000);
    idle(); D_icode = I_RET; E_icode = I_MRMOVQ; E_dstM = REG_RSP; d_srcA = REG_RSP;
    expect6("load/use + ret", 6'b110100);
    idle(); E_icode = I_JXX; e_cnd = 0; D_icode = I_RET; expect6("mispredict + ret", 6'b101100);
    idle(); m_stat = S_ADR; expect6("m exception", 6'b000010);
    idle(); W_stat = S_HLT; expect6("W halt", 6'b000011);
    idle(); W_stat = S_INS; expect6("W invalid", 6'b000011);
    idle(); m_stat = S_BUB; W_stat = S_BUB; expect6("bubbles", 6'b000000);

    for (int t = 0; t < 3000; t++) begin
      D_icode = icode_t'($urandom_range(0, 11)); E_icode = icode_t'($urandom_range(0, 11));
      M_icode = icode_t'($urandom_range(0, 11));
      E_dstM = reg_id_t'($urandom_range(0, 15)); d_srcA = reg_id_t'($urandom_range(0, 15));
      d_srcB = reg_id_t'($urandom_range(0, 15)); e_cnd = 1'($urandom);
      m_stat = stat_t'($urandom_range(0, 4)); W_stat = stat_t'($urandom_range(0, 4));
      #1;
      checks++;
      if (D_stall && !F_stall) begin failures++; $display("FAIL D stalls without F"); end
      checks++;
      if (D_stall && D_bubble) begin failures++; $display("FAIL D stall and bubble"); end
      checks++;
      if (load_use !== ((E_icode inside {I_MRMOVQ, I_POPQ}) && E_dstM != REG_NONE &&
                        (E_dstM == d_srcA || E_dstM == d_srcB))) begin
        failures++; $display("FAIL load_use");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
