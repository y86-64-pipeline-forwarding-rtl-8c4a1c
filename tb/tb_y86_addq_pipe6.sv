// tb_y86_addq_pipe6: self-checking test of the six-stage addq pipeline.
//
// Program: sixteen "addq %r15,%r15" no-ops while starting register values
// are loaded, the split-execute example (addq %rcx,%r9; addq %r9,%rbx;
// addq %rax,%r9), then random addq over five registers.  Expected values
// come from a sequential model.  The expected number of stall cycles is
// counted from the program text: one for every instruction that reads the
// destination of the instruction directly before it.  Checks: final
// registers, that exactly that many stall cycles and retire gaps occur,
// that the first instruction retires after five cycles, and the final PC.
module tb_y86_addq_pipe6;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  localparam int NRAND = 200;
  logic       clk = 0, rst = 1;
  logic       ld_we = 0, rf_ld_we = 0;
  word_t      ld_addr = 0, rf_ld_val = 0, dbg_regval, pc;
  logic [7:0] ld_data = 0;
  reg_id_t    rf_ld_reg = 0, dbg_reg = 0;
  logic       retire, ev_stall, ev_fwd;
  int checks = 0, failures = 0;

  y86_addq_pipe6 #(.MEM_BYTES(1024)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t prog;
    word_t init_r [16], model [16];
    int n_ins, n_ret, n_stall, n_fwd, first_ret, last_ret, exp_stall, cycles;
    logic [3:0] ra, rb, prev_rb;

    for (int i = 0; i < 16; i++) prog = {prog, a_op(ALU_ADD, 4'hF, 4'hF)};
    for (int i = 0; i < 15; i++) init_r[i] = {$urandom, $urandom};
    init_r[15] = '0;
    prog = {prog, a_op(ALU_ADD, RCX, R9), a_op(ALU_ADD, R9, RBX), a_op(ALU_ADD, RAX, R9)};
    for (int i = 0; i < NRAND; i++) begin
      ra = 4'($urandom_range(0, 4)); rb = 4'($urandom_range(0, 4));
      prog = {prog, a_op(ALU_ADD, ra, rb)};
    end
    n_ins = prog.size() / 2;
    model = init_r;
    exp_stall = 0; prev_rb = 4'hF;
    for (int i = 0; i < n_ins; i++) begin
      ra = prog[2*i+1][7:4]; rb = prog[2*i+1][3:0];
      if (prev_rb != 4'hF && (ra == prev_rb || rb == prev_rb)) exp_stall++;
      prev_rb = rb;
      if (rb != 4'hF) model[rb] = model[rb] + model[ra];
    end
    for (int i = 0; i < 8; i++) prog = {prog, a_op(ALU_ADD, 4'hF, 4'hF)};

    foreach (prog[i]) begin
      @(negedge clk); ld_we = 1; ld_addr = word_t'(i); ld_data = prog[i];
    end
    @(negedge clk); ld_we = 0;
    @(negedge clk); rst = 0;
    n_ret = 0; n_stall = 0; n_fwd = 0; first_ret = -1; last_ret = -1;
    cycles = n_ins + 4 + exp_stall;
    for (int c = 0; c < cycles; c++) begin
      rf_ld_we = (c < 15); rf_ld_reg = reg_id_t'(c); rf_ld_val = init_r[c % 16];
      @(posedge clk); #1;
      if (retire) begin
        n_ret++; last_ret = c;
        if (first_ret < 0) first_ret = c;
      end
      n_stall += int'(ev_stall); n_fwd += int'(ev_fwd);
      @(negedge clk);
    end
    rf_ld_we = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (first_ret != 4 || n_ret != n_ins || last_ret != cycles - 1) begin
      failures++;
      $display("FAIL timing: first retire %0d, last %0d (exp %0d), retired %0d of %0d",
               first_ret, last_ret, cycles - 1, n_ret, n_ins);
    end
    checks++;
    if (n_stall != exp_stall) begin
      failures++; $display("FAIL stall cycles %0d expected %0d", n_stall, exp_stall);
    end
    checks++;
    if (pc != word_t'(2 * (cycles + 3 - exp_stall))) begin
      failures++; $display("FAIL pc %0d", pc);
    end
    for (int r = 0; r < 16; r++) begin
      dbg_reg = reg_id_t'(r); #1;
      checks++;
      if (dbg_regval !== model[r]) begin
        failures++; $display("FAIL R[%0d] = %h expected %h", r, dbg_regval, model[r]);
      end
    end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    checks++; if (n_fwd == 0)   begin failures++; $display("FAIL no forwarding"); end
    $display("instructions=%0d stalls=%0d forwards=%0d", n_ins, n_stall, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
