// y86_asm_pkg: a tiny Y86-64 assembler for the testbenches.
//
// Each function returns the bytes of one instruction in memory order, so
// a program is built by concatenating queues.  Encodings are the standard
// Y86-64 ones: byte 0 = icode:ifun, byte 1 = rA:rB (0xF for "none"), then
// an 8-byte little-endian constant where the instruction has one.
package y86_asm_pkg;

  typedef logic [7:0] bq_t[$];

  function automatic bq_t le64(logic [63:0] v);
    bq_t q;
    for (int i = 0; i < 8; i++) q.push_back(v[8*i +: 8]);
    return q;
  endfunction

  function automatic bq_t b1(logic [7:0] x0);
    bq_t q;
    q.push_back(x0);
    return q;
  endfunction
  function automatic bq_t b2(logic [7:0] x0, logic [7:0] x1);
    bq_t q;
    q.push_back(x0); q.push_back(x1);
    return q;
  endfunction

  function automatic bq_t a_halt();              return b1(8'h00); endfunction
  function automatic bq_t a_nop();               return b1(8'h10); endfunction
  function automatic bq_t a_ret();               return b1(8'h90); endfunction
  function automatic bq_t a_rr(logic [3:0] fn, logic [3:0] ra, logic [3:0] rb);
    return b2({4'h2, fn}, {ra, rb});
  endfunction
  function automatic bq_t a_op(logic [3:0] fn, logic [3:0] ra, logic [3:0] rb);
    return b2({4'h6, fn}, {ra, rb});
  endfunction
  function automatic bq_t a_irmovq(logic [63:0] v, logic [3:0] rb);
    return {b2(8'h30, {4'hF, rb}), le64(v)};
  endfunction
  function automatic bq_t a_rmmovq(logic [3:0] ra, logic [63:0] d, logic [3:0] rb);
    return {b2(8'h40, {ra, rb}), le64(d)};
  endfunction
  function automatic bq_t a_mrmovq(logic [63:0] d, logic [3:0] rb, logic [3:0] ra);
    return {b2(8'h50, {ra, rb}), le64(d)};
  endfunction
  function automatic bq_t a_jxx(logic [3:0] fn, logic [63:0] dest);
    return {b1({4'h7, fn}), le64(dest)};
  endfunction
  function automatic bq_t a_call(logic [63:0] dest);
    return {b1(8'h80), le64(dest)};
  endfunction
  function automatic bq_t a_pushq(logic [3:0] ra); return b2(8'hA0, {ra, 4'hF}); endfunction
  function automatic bq_t a_popq(logic [3:0] ra);  return b2(8'hB0, {ra, 4'hF}); endfunction

  // register numbers
  localparam logic [3:0] RAX = 0, RCX = 1, RDX = 2, RBX = 3, RSP = 4, RBP = 5,
                         RSI = 6, RDI = 7, R8 = 8, R9 = 9, R10 = 10, R11 = 11,
                         R12 = 12, R13 = 13, R14 = 14;

endpackage
