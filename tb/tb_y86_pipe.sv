// tb_y86_pipe: self-checking test of the five-stage Y86-64 pipeline.
//
// Runs a set of short programs, each built from the hazard examples of the
// pipeline's description (forwarding chains, load/use, a mispredicted jne,
// call/ret, push/pop, cmov, exceptions).  For each program the expected
// final registers and memory words are worked out by hand from the
// instruction semantics, and the cycle count is checked against
//   cycles = N + 3 + 1*(load/use) + 2*(mispredicts) + 3*(rets)
// where N is the number of instructions executed including halt and
// "cycles" counts clock edges from reset release until halt reaches
// writeback.  The number of cycles each hazard mechanism acted is checked
// too.
module tb_y86_pipe;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  logic       clk = 0;
  logic       rst = 1;
  logic       ld_we = 0;
  word_t      ld_addr = '0;
  logic [7:0] ld_data = '0;
  reg_id_t    dbg_reg = '0;
  word_t      dbg_regval, dbg_addr = '0, dbg_memval;
  stat_t      stat;
  logic       retire, ev_load_use, ev_mispredict, ev_ret_stall, ev_fwd;

  int checks = 0, failures = 0;
  int n_lu, n_mp, n_ret, n_fwd, n_ret_tot, n_lu_tot, n_mp_tot, n_fwd_tot;

  y86_pipe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_bytes(logic [63:0] base, bq_t q);
    foreach (q[i]) begin
      @(negedge clk);
      ld_we = 1; ld_addr = base + 64'(i); ld_data = q[i];
    end
    @(negedge clk);
    ld_we = 0;
  endtask

  task automatic load_word(logic [63:0] addr, logic [63:0] v);
    load_bytes(addr, le64(v));
  endtask

  // load the program at 0 (followed by halts), release reset, run to a
  // non-AOK status and return the cycle count
  task automatic run(bq_t prog, output int cycles);
    bq_t pad;
    for (int i = 0; i < 16; i++) pad.push_back(8'h00);
    @(negedge clk); rst = 1;
    load_bytes(0, {prog, pad});
    @(negedge clk); rst = 0;
    cycles = 0; n_lu = 0; n_mp = 0; n_ret = 0; n_fwd = 0;
    while (cycles < 500) begin
      @(posedge clk);
      cycles++;
      #1;
      if (stat != S_AOK) break;
      n_lu += int'(ev_load_use); n_mp += int'(ev_mispredict);
      n_ret += int'(ev_ret_stall); n_fwd += int'(ev_fwd);
    end
    n_lu_tot += n_lu; n_mp_tot += n_mp; n_ret_tot += n_ret; n_fwd_tot += n_fwd;
  endtask

  task automatic reg_is(logic [3:0] r, logic [63:0] exp);
    @(negedge clk); dbg_reg = r; #1;
    check($sformatf("R[%0d]", r), dbg_regval, exp);
  endtask

  task automatic mem_is(logic [63:0] a, logic [63:0] exp);
    @(negedge clk); dbg_addr = a; #1;
    check($sformatf("M[%h]", a), dbg_memval, exp);
  endtask

  initial begin
    bq_t p, sub, skip;
    int cyc;
    logic [63:0] foo, lbl;
    n_lu_tot = 0; n_mp_tot = 0; n_ret_tot = 0; n_fwd_tot = 0;
    repeat (3) @(posedge clk);

    // ---- P1: forwarding chain (addq/subq/mrmovq/rmmovq/xorq) ----
    load_word(64'hF8, 64'h0123456789ABCDEF);
    p = {a_irmovq(5, R8), a_irmovq(7, R9), a_irmovq(64'h100, R11),
         a_op(ALU_ADD, R8, R9), a_op(ALU_SUB, R9, R11), a_mrmovq(4, R11, R10),
         a_rmmovq(R9, 8, R11), a_op(ALU_XOR, R10, R9), a_halt()};
    run(p, cyc);
    check("P1 stat", 64'(stat), 64'(S_HLT));
    check("P1 cycles", 64'(cyc), 64'(9 + 3));
    check("P1 load/use", 64'(n_lu), 0);
    reg_is(R11, 64'hF4);
    reg_is(R10, 64'h0123456789ABCDEF);
    reg_is(R9, 64'd12 ^ 64'h0123456789ABCDEF);
    mem_is(64'hFC, 64'd12);
    mem_is(64'hF8, 64'h0000000C_89ABCDEF);
    checks++; if (n_fwd < 4) begin failures++; $display("FAIL P1 forwarding count %0d", n_fwd); end

    // ---- P2: load/use hazard (mrmovq then subq) ----
    load_word(64'h200, 64'd3);
    p = {a_irmovq(64'h200, RAX), a_irmovq(10, RCX), a_mrmovq(0, RAX, RBX),
         a_op(ALU_SUB, RBX, RCX), a_halt()};
    run(p, cyc);
    check("P2 stat", 64'(stat), 64'(S_HLT));
    check("P2 cycles", 64'(cyc), 64'(5 + 3 + 1));
    check("P2 load/use", 64'(n_lu), 1);
    reg_is(RBX, 3);
    reg_is(RCX, 7);

    // ---- P3: load/use + mispredicted jne ----
    load_word(64'h200, 64'd3);
    load_word(64'h208, 64'h77);
    foo = 64'(10 + 10 + 10 + 10 + 2 + 9);
    p = {a_irmovq(64'h200, RAX), a_irmovq(-64'sd3, RCX), a_irmovq(64'h208, RDX),
         a_mrmovq(0, RAX, RBX), a_op(ALU_ADD, RBX, RCX), a_jxx(C_NE, foo),
         a_op(ALU_ADD, RCX, RDX), a_mrmovq(0, RDX, RCX), a_halt()};
    run(p, cyc);
    check("P3 stat", 64'(stat), 64'(S_HLT));
    check("P3 cycles", 64'(cyc), 64'(9 + 3 + 1 + 2));
    check("P3 load/use", 64'(n_lu), 1);
    check("P3 mispredict", 64'(n_mp), 1);
    reg_is(RBX, 3);
    reg_is(RDX, 64'h208);
    reg_is(RCX, 64'h77);

    // ---- P4: call / ret ----
    lbl = 64'(10 + 9 + 10 + 1);
    p = {a_irmovq(64'h300, RSP), a_call(lbl), a_irmovq(1, RAX), a_halt(),
         a_irmovq(9, RBX), a_ret()};
    run(p, cyc);
    check("P4 stat", 64'(stat), 64'(S_HLT));
    check("P4 cycles", 64'(cyc), 64'(6 + 3 + 3));
    // 3 cycles for the ret that runs, plus 1 for the ret fetched after halt
    // that reaches decode one cycle before halt reaches writeback
    check("P4 ret stall cycles", 64'(n_ret), 3 + 1);
    reg_is(RSP, 64'h300);
    reg_is(RAX, 1);
    reg_is(RBX, 9);
    mem_is(64'h2F8, 64'd19);

    // ---- P5: multiple forwarding paths, push/pop, cmov, taken jump ----
    load_word(64'h600, 64'hAAAA);
    load_word(64'h308, 64'hBBBB);
    p = {a_irmovq(1, R10), a_irmovq(2, R11), a_irmovq(4, R12), a_irmovq(64'h10, R8),
         a_op(ALU_ADD, R10, R8), a_op(ALU_ADD, R11, R8), a_op(ALU_ADD, R12, R8),
         a_op(ALU_ADD, R10, R8), a_op(ALU_ADD, R11, R12), a_op(ALU_ADD, R12, R8),
         a_rr(C_YES, R8, RSI),
         a_irmovq(64'h200, RCX), a_irmovq(64'h100, R9), a_irmovq(64'h500, R8),
         a_irmovq(64'h600, RSP),
         a_op(ALU_ADD, RCX, R9), a_rmmovq(R9, 8, R8), a_popq(R10),
         a_mrmovq(8, R9, R11), a_pushq(R11),
         a_irmovq(5, RAX), a_irmovq(9, RBX), a_op(ALU_SUB, RAX, RBX),
         a_rr(C_LE, RAX, RDI), a_rr(C_G, RAX, RBP)};
    skip = a_irmovq(64'hDEAD, R13);
    lbl = 64'(p.size() + 9 + skip.size());
    p = {p, a_jxx(C_G, lbl), skip, a_irmovq(64'h77, R14), a_halt()};
    run(p, cyc);
    check("P5 stat", 64'(stat), 64'(S_HLT));
    check("P5 cycles", 64'(cyc), 64'(28 + 3 + 1));
    check("P5 load/use", 64'(n_lu), 1);
    check("P5 mispredict", 64'(n_mp), 0);
    reg_is(RSI, 64'h1E);
    reg_is(R12, 6);
    reg_is(R8, 64'h500);
    reg_is(R9, 64'h300);
    reg_is(R10, 64'hAAAA);
    reg_is(R11, 64'hBBBB);
    reg_is(RSP, 64'h600);
    reg_is(RAX, 5);
    reg_is(RBX, 4);
    reg_is(RDI, 0);
    reg_is(RBP, 5);
    reg_is(R13, 0);
    reg_is(R14, 64'h77);
    mem_is(64'h508, 64'h300);
    mem_is(64'h600, 64'hBBBB);

    // ---- P8: dependency example (addq/subq/irmovq/addq/addq) ----
    p = {a_irmovq(2, RAX), a_irmovq(10, RBX), a_irmovq(20, RCX),
         a_op(ALU_ADD, RAX, RBX), a_op(ALU_SUB, RAX, RCX), a_irmovq(100, RCX),
         a_op(ALU_ADD, RCX, R10), a_op(ALU_ADD, RBX, R10), a_halt()};
    run(p, cyc);
    check("P8 stat", 64'(stat), 64'(S_HLT));
    check("P8 cycles", 64'(cyc), 64'(9 + 3));
    reg_is(RBX, 12);
    reg_is(RCX, 100);
    reg_is(R10, 112);

    // ---- P6: data address error stops the machine ----
    p = {a_irmovq(64'h7FFF_0000_0000_0000, RBX), a_mrmovq(0, RBX, RCX),
         a_irmovq(5, RDX), a_halt()};
    run(p, cyc);
    check("P6 stat", 64'(stat), 64'(S_ADR));
    reg_is(RCX, 0);
    reg_is(RDX, 0);

    // ---- P7: invalid instruction ----
    p = {a_irmovq(1, RAX), b1(8'hC0), a_irmovq(2, RAX), a_halt()};
    run(p, cyc);
    check("P7 stat", 64'(stat), 64'(S_INS));
    reg_is(RAX, 1);

    // each mechanism must have acted at least once
    checks++; if (n_lu_tot == 0)  begin failures++; $display("FAIL no load/use stall"); end
    checks++; if (n_mp_tot == 0)  begin failures++; $display("FAIL no misprediction"); end
    checks++; if (n_ret_tot == 0) begin failures++; $display("FAIL no ret stall"); end
    checks++; if (n_fwd_tot == 0) begin failures++; $display("FAIL no forwarding"); end
    $display("events: load/use=%0d mispredict=%0d ret-stall-cycles=%0d forward-cycles=%0d",
             n_lu_tot, n_mp_tot, n_ret_tot, n_fwd_tot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
