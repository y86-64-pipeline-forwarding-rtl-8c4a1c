// tb_y86_fwd: self-checking test of the decode forwarding unit.
//
// Random register numbers drawn from a small set so that matches are
// frequent; the expected operand is found by walking the producers from
// youngest to oldest (execute, memory load, memory ALU result, writeback
// load, writeback ALU result) and falling back to the register file.
// call and jXX must take valP for operand A.
module tb_y86_fwd;
  import y86_pkg::*;

  icode_t  D_icode;
  word_t   D_valP, rvalA, rvalB, e_valE, m_valM, M_valE, W_valM, W_valE, valA, valB;
  reg_id_t srcA, srcB, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE;
  fwd_src_t selA, selB;
  int checks = 0, failures = 0;
  int hits [7];

  y86_fwd dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic reg_id_t rr();
    int k = $urandom_range(0, 4);
    return (k == 4) ? REG_NONE : reg_id_t'(k);
  endfunction

  function automatic word_t expect_val(reg_id_t s, word_t rv);
    reg_id_t d [5];
    word_t   v [5];
    d = '{e_dstE, M_dstM, M_dstE, W_dstM, W_dstE};
    v = '{e_valE, m_valM, M_valE, W_valM, W_valE};
    if (s == REG_NONE) return rv;
    for (int i = 0; i < 5; i++) if (d[i] == s) return v[i];
    return rv;
  endfunction

  initial begin
    word_t ea;
    for (int t = 0; t < 5000; t++) begin
      D_icode = icode_t'($urandom_range(0, 11));
      {D_valP, rvalA, rvalB} = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      e_valE = 64'h1000 + t; m_valM = 64'h2000 + t; M_valE = 64'h3000 + t;
      W_valM = 64'h4000 + t; W_valE = 64'h5000 + t;
      srcA = rr(); srcB = rr(); e_dstE = rr(); M_dstM = rr(); M_dstE = rr();
      W_dstM = rr(); W_dstE = rr();
      #1;
      ea = (D_icode == I_CALL || D_icode == I_JXX) ? D_valP : expect_val(srcA, rvalA);
      checks += 2;
      if (valA !== ea) begin failures++; $display("FAIL valA %h exp %h", valA, ea); end
      if (valB !== expect_val(srcB, rvalB)) begin
        failures++; $display("FAIL valB %h exp %h", valB, expect_val(srcB, rvalB));
      end
      hits[selA]++; hits[selB]++;
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("FAIL source %0d never selected", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
