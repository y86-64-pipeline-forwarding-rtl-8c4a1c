// tb_y86_addq_pipe: self-checking test of the four-stage addq pipeline.
//
// The program starts with sixteen "addq %r15,%r15" instructions, which
// read and write no register, while the testbench writes random starting
// values into all fifteen registers through the loader port.  Then come
// the two forwarding examples (three addq into %r8 in a row; an
// independent addq between producer and consumer) followed by random
// addq instructions over a few registers so that back-to-back and
// one-apart dependencies are frequent.  A sequential model (R[rB] +=
// R[rA], one instruction at a time) gives the expected registers.  The
// pipeline must retire one instruction per cycle from the third cycle on,
// and both forwarding paths must have been used.
module tb_y86_addq_pipe;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  localparam int NRAND = 200;
  logic       clk = 0, rst = 1;
  logic       ld_we = 0, rf_ld_we = 0;
  word_t      ld_addr = 0, rf_ld_val = 0, dbg_regval, pc;
  logic [7:0] ld_data = 0;
  reg_id_t    rf_ld_reg = 0, dbg_reg = 0;
  logic       retire, ev_fwd_e, ev_fwd_w;
  int checks = 0, failures = 0;

  y86_addq_pipe #(.MEM_BYTES(1024)) dut (.*);
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
    int n_ins, n_ret, n_fe, n_fw, first_ret, gaps;
    logic [3:0] ra, rb;

    for (int i = 0; i < 16; i++) prog = {prog, a_op(ALU_ADD, 4'hF, 4'hF)};
    for (int i = 0; i < 15; i++) init_r[i] = {$urandom, $urandom};
    init_r[15] = '0;
    // three-in-a-row into %r8, then producer / independent / consumer
    prog = {prog, a_op(ALU_ADD, R10, R8), a_op(ALU_ADD, R11, R8), a_op(ALU_ADD, R12, R8)};
    prog = {prog, a_op(ALU_ADD, R10, R8), a_op(ALU_ADD, R11, R12), a_op(ALU_ADD, R12, R8)};
    for (int i = 0; i < NRAND; i++) begin
      ra = 4'($urandom_range(0, 4)); rb = 4'($urandom_range(0, 4));
      prog = {prog, a_op(ALU_ADD, ra, rb)};
    end
    n_ins = prog.size() / 2;
    // sequential model of the instructions
    model = init_r;
    for (int i = 16; i < n_ins; i++) begin
      ra = prog[2*i+1][7:4]; rb = prog[2*i+1][3:0];
      model[rb] = model[rb] + model[ra];
    end
    // trailing no-ops
    for (int i = 0; i < 8; i++) prog = {prog, a_op(ALU_ADD, 4'hF, 4'hF)};

    foreach (prog[i]) begin
      @(negedge clk); ld_we = 1; ld_addr = word_t'(i); ld_data = prog[i];
    end
    @(negedge clk); ld_we = 0;
    @(negedge clk); rst = 0;
    n_ret = 0; n_fe = 0; n_fw = 0; first_ret = -1; gaps = 0;
    // loop index c observes the state after clock edge c+1
    for (int c = 0; c < n_ins + 2; c++) begin
      rf_ld_we = (c < 15); rf_ld_reg = reg_id_t'(c); rf_ld_val = init_r[c % 16];
      @(posedge clk); #1;
      if (retire) begin n_ret++; if (first_ret < 0) first_ret = c; end
      else if (first_ret >= 0) gaps++;
      n_fe += int'(ev_fwd_e); n_fw += int'(ev_fwd_w);
      @(negedge clk);
    end
    rf_ld_we = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (first_ret != 2 || n_ret != n_ins || gaps != 0) begin
      failures++;
      $display("FAIL throughput: first retire %0d, retired %0d of %0d, gaps %0d",
               first_ret, n_ret, n_ins, gaps);
    end
    checks++;
    if (pc != word_t'(2 * (n_ins + 5))) begin failures++; $display("FAIL pc %0d", pc); end
    for (int r = 0; r < 16; r++) begin
      dbg_reg = reg_id_t'(r); #1;
      checks++;
      if (dbg_regval !== model[r]) begin
        failures++; $display("FAIL R[%0d] = %h expected %h", r, dbg_regval, model[r]);
      end
    end
    checks++; if (n_fe == 0) begin failures++; $display("FAIL execute forwarding never used"); end
    checks++; if (n_fw == 0) begin failures++; $display("FAIL writeback forwarding never used"); end
    $display("instructions=%0d forward-from-execute=%0d forward-from-writeback=%0d",
             n_ins, n_fe, n_fw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
