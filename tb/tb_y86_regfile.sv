// tb_y86_regfile: self-checking test of the register file.
//
// Random writes through the E, M and loader ports are mirrored in a
// reference array; after every clock both read ports and the debug port are
// compared with it.  Covers REG_NONE reads (zero) and dropped writes, the
// dstM-over-dstE priority, reset to zero and read-old-value-during-write.
module tb_y86_regfile;
  import y86_pkg::*;

  logic    clk = 0, rst = 1;
  reg_id_t srcA, srcB, dstE, dstM, ld_reg, dbg_reg;
  word_t   valA, valB, valE, valM, ld_val, dbg_val;
  logic    ld_we;
  word_t   ref_r [16];
  int checks = 0, failures = 0;

  y86_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, word_t g, word_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  initial begin
    srcA = 0; srcB = 0; dstE = REG_NONE; dstM = REG_NONE; ld_we = 0; ld_reg = 0;
    valE = 0; valM = 0; ld_val = 0; dbg_reg = 0;
    foreach (ref_r[i]) ref_r[i] = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 15; i++) begin
      dbg_reg = reg_id_t'(i); #1; chk("reset", dbg_val, 0);
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      dstE = reg_id_t'($urandom_range(0, 15));
      dstM = ($urandom_range(0, 3) == 0) ? dstE : reg_id_t'($urandom_range(0, 15));
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      ld_we = ($urandom_range(0, 3) == 0); ld_reg = reg_id_t'($urandom_range(0, 15));
      ld_val = {$urandom, $urandom};
      srcA = reg_id_t'($urandom_range(0, 15)); srcB = reg_id_t'($urandom_range(0, 15));
      dbg_reg = reg_id_t'($urandom_range(0, 15));
      #1;
      // combinational reads see the old contents
      chk("valA", valA, ref_r[srcA]);
      chk("valB", valB, ref_r[srcB]);
      chk("dbg", dbg_val, ref_r[dbg_reg]);
      @(posedge clk);
      if (ld_we)             ref_r[ld_reg] = ld_val;
      if (dstE != REG_NONE)  ref_r[dstE] = valE;
      if (dstM != REG_NONE)  ref_r[dstM] = valM;
      ref_r[15] = '0;
    end
    @(negedge clk); rst = 1; @(negedge clk); rst = 0; dstE = REG_NONE; dstM = REG_NONE; ld_we = 0;
    for (int i = 0; i < 15; i++) begin
      srcA = reg_id_t'(i); #1; chk("reset2", valA, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
