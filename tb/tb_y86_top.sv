// tb_y86_top: end-to-end test of both pipelines at their default sizes.
//
// Four-stage addq pipeline: the two forwarding examples (three addq into
// %r8 in a row; producer, independent addq, consumer) run on loaded
// register values; the final registers are checked against values worked
// out by hand and both forwarding paths must have been used.
// Six-stage addq pipeline: the split-execute example (addq %rcx,%r9;
// addq %r9,%rbx; addq %rax,%r9) must take exactly one stall cycle and give
// the hand-computed registers.
// Five-stage pipeline: one program that contains a load/use pair, a jne
// that is mispredicted, a call and a ret, and forwarding from execute and
// memory.  Final registers, the stack word written by call, and the cycle
// count (N + 3 + 1 load/use + 2 mispredict + 3 ret) are checked, and each
// mechanism (forwarding, load/use stall, misprediction squash, ret stall)
// must have acted.
module tb_y86_top;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  logic       clk = 0, rst = 1;
  logic       p4_ld_we = 0, p4_rf_ld_we = 0, p5_ld_we = 0, p6_ld_we = 0, p6_rf_ld_we = 0;
  word_t      p6_ld_addr = 0, p6_rf_ld_val = 0, p6_dbg_regval, p6_pc;
  logic [7:0] p6_ld_data = 0;
  reg_id_t    p6_rf_ld_reg = 0, p6_dbg_reg = 0;
  logic       p6_retire, p6_ev_stall, p6_ev_fwd;
  word_t      p4_ld_addr = 0, p4_rf_ld_val = 0, p5_ld_addr = 0, p5_dbg_addr = 0;
  logic [7:0] p4_ld_data = 0, p5_ld_data = 0;
  reg_id_t    p4_rf_ld_reg = 0, p4_dbg_reg = 0, p5_dbg_reg = 0;
  word_t      p4_dbg_regval, p4_pc, p5_dbg_regval, p5_dbg_memval;
  logic       p4_retire, p4_ev_fwd_e, p4_ev_fwd_w;
  stat_t      p5_stat;
  logic       p5_retire, p5_ev_load_use, p5_ev_mispredict, p5_ev_ret_stall, p5_ev_fwd;
  int checks = 0, failures = 0;

  y86_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, word_t g, word_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h expected %h", w, g, e); end
  endtask

  task automatic count(string w, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL %s never happened", w); end
  endtask

  initial begin
    bq_t p4, p5, p6, pad;
    int n_st, n_f6, n_r6, cyc, n_fe, n_fw, n_lu, n_mp, n_ret, n_fwd, n_p4ret;
    logic [63:0] foo, sub;

    // ---------- program images ----------
    for (int i = 0; i < 16; i++) p4 = {p4, a_op(ALU_ADD, 4'hF, 4'hF)};
    p4 = {p4, a_op(ALU_ADD, R10, R8), a_op(ALU_ADD, R11, R8), a_op(ALU_ADD, R12, R8),
              a_op(ALU_ADD, R10, R8), a_op(ALU_ADD, R11, R12), a_op(ALU_ADD, R12, R8)};
    for (int i = 0; i < 8; i++) p4 = {p4, a_op(ALU_ADD, 4'hF, 4'hF)};

    for (int i = 0; i < 16; i++) p6 = {p6, a_op(ALU_ADD, 4'hF, 4'hF)};
    p6 = {p6, a_op(ALU_ADD, RCX, R9), a_op(ALU_ADD, R9, RBX), a_op(ALU_ADD, RAX, R9)};
    for (int i = 0; i < 30; i++) p6 = {p6, a_op(ALU_ADD, 4'hF, 4'hF)};

    foo = 64'(4 * 10 + 10 + 2 + 9);
    sub = foo + 64'(2 + 10 + 9 + 10 + 1);
    p5 = {a_irmovq(64'h300, RSP), a_irmovq(64'h200, RAX), a_irmovq(-64'sd3, RCX),
          a_irmovq(64'h208, RDX), a_mrmovq(0, RAX, RBX), a_op(ALU_ADD, RBX, RCX),
          a_jxx(C_NE, foo), a_op(ALU_ADD, RCX, RDX), a_mrmovq(0, RDX, RCX),
          a_call(sub), a_irmovq(1, RSI), a_halt(), a_irmovq(9, RDI), a_ret()};
    for (int i = 0; i < 16; i++) pad.push_back(8'h00);
    p5 = {p5, pad};

    // ---------- load both memories while in reset ----------
    for (int i = 0; i < p5.size() || i < p4.size(); i++) begin
      @(negedge clk);
      p4_ld_we = (i < p4.size()); p4_ld_addr = word_t'(i); p4_ld_data = (i < p4.size()) ? p4[i] : 8'h0;
      p5_ld_we = (i < p5.size()); p5_ld_addr = word_t'(i); p5_ld_data = (i < p5.size()) ? p5[i] : 8'h0;
    end
    p4_ld_we = 0;
    foreach (p6[i]) begin
      @(negedge clk);
      p6_ld_we = 1; p6_ld_addr = word_t'(i); p6_ld_data = p6[i];
    end
    @(negedge clk); p6_ld_we = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      p5_ld_we = 1; p5_ld_addr = 64'h200 + word_t'(i);
      p5_ld_data = (i == 0) ? 8'd3 : (i == 8) ? 8'h77 : 8'h00;
    end
    @(negedge clk); p5_ld_we = 0;
    @(negedge clk); rst = 0;

    // ---------- run ----------
    cyc = -1; n_fe = 0; n_fw = 0; n_lu = 0; n_mp = 0; n_ret = 0; n_fwd = 0; n_p4ret = 0;
    n_st = 0; n_f6 = 0; n_r6 = 0;
    for (int c = 0; c < 40; c++) begin
      // starting registers of the addq pipeline: r10=1, r11=2, r12=4, r8=0x10
      p4_rf_ld_we = 1'b1;
      case (c)
        0: begin p4_rf_ld_reg = R10; p4_rf_ld_val = 1; end
        1: begin p4_rf_ld_reg = R11; p4_rf_ld_val = 2; end
        2: begin p4_rf_ld_reg = R12; p4_rf_ld_val = 4; end
        3: begin p4_rf_ld_reg = R8;  p4_rf_ld_val = 64'h10; end
        default: p4_rf_ld_we = 1'b0;
      endcase
      // starting registers of the six-stage pipeline: rcx=5, r9=100, rbx=1000, rax=7
      p6_rf_ld_we = 1'b1;
      case (c)
        0: begin p6_rf_ld_reg = RCX; p6_rf_ld_val = 5; end
        1: begin p6_rf_ld_reg = R9;  p6_rf_ld_val = 100; end
        2: begin p6_rf_ld_reg = RBX; p6_rf_ld_val = 1000; end
        3: begin p6_rf_ld_reg = RAX; p6_rf_ld_val = 7; end
        default: p6_rf_ld_we = 1'b0;
      endcase
      @(posedge clk); #1;
      n_st += int'(p6_ev_stall); n_f6 += int'(p6_ev_fwd); n_r6 += int'(p6_retire);
      n_fe += int'(p4_ev_fwd_e); n_fw += int'(p4_ev_fwd_w); n_p4ret += int'(p4_retire);
      if (p5_stat != S_AOK && cyc < 0) cyc = c + 1;
      if (cyc < 0) begin
        n_lu += int'(p5_ev_load_use); n_mp += int'(p5_ev_mispredict);
        n_ret += int'(p5_ev_ret_stall); n_fwd += int'(p5_ev_fwd);
      end
      @(negedge clk);
    end

    // ---------- four-stage results ----------
    // r8: 0x10 +1 +2 +4 = 0x17, +1 = 0x18; r12 = 4 + 2 = 6; r8 = 0x18 + 6 = 0x1E
    p4_dbg_reg = R8;  #1; chk("p4 R8", p4_dbg_regval, 64'h1E);
    p4_dbg_reg = R12; #1; chk("p4 R12", p4_dbg_regval, 6);
    chk("p4 retired", 64'(n_p4ret), 64'(p4.size() / 2));
    count("p4 forwarding from execute", n_fe);
    count("p4 forwarding from writeback", n_fw);

    // ---------- six-stage results ----------
    // r9 = 100 + 5 = 105; rbx = 1000 + 105 = 1105; r9 = 105 + 7 = 112
    p6_dbg_reg = R9;  #1; chk("p6 R9", p6_dbg_regval, 112);
    p6_dbg_reg = RBX; #1; chk("p6 RBX", p6_dbg_regval, 1105);
    chk("p6 stall cycles", 64'(n_st), 1);
    // 40 cycles: first retire after 5 edges, then one per cycle except the stall
    chk("p6 retired", 64'(n_r6), 64'(40 - 4 - 1));
    count("p6 forwarding", n_f6);

    // ---------- five-stage results ----------
    chk("p5 stat", 64'(p5_stat), 64'(S_HLT));
    chk("p5 cycles", 64'(cyc), 64'(14 + 3 + 1 + 2 + 3));
    p5_dbg_reg = RBX; #1; chk("p5 RBX", p5_dbg_regval, 3);
    p5_dbg_reg = RDX; #1; chk("p5 RDX", p5_dbg_regval, 64'h208);
    p5_dbg_reg = RCX; #1; chk("p5 RCX", p5_dbg_regval, 64'h77);
    p5_dbg_reg = RSI; #1; chk("p5 RSI", p5_dbg_regval, 1);
    p5_dbg_reg = RDI; #1; chk("p5 RDI", p5_dbg_regval, 9);
    p5_dbg_reg = RSP; #1; chk("p5 RSP", p5_dbg_regval, 64'h300);
    p5_dbg_addr = 64'h2F8; #1; chk("p5 return address", p5_dbg_memval, sub - 64'(10 + 1));
    count("p5 forwarding", n_fwd);
    count("p5 load/use stall", n_lu);
    count("p5 misprediction squash", n_mp);
    count("p5 ret stall", n_ret);
    $display("p6: stall=%0d fwd=%0d", n_st, n_f6);
    $display("p4: fwd-e=%0d fwd-w=%0d | p5: fwd=%0d load/use=%0d mispredict=%0d ret-stall=%0d cycles=%0d",
             n_fe, n_fw, n_fwd, n_lu, n_mp, n_ret, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
