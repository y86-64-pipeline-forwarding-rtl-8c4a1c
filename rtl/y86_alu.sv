// y86_alu: the Y86-64 arithmetic/logic unit with its condition-code flags.
//
// result = b OP a for OP in add, sub, and, xor (alufun uses the OPq
// function codes 0..3).  Subtraction computes b - a, so "subq %rax,%rcx"
// yields rcx - rax.  The flags describe the result: zf (zero), sf (sign),
// of (signed overflow of the add or subtract; zero for and/xor).  Purely
// combinational.  The operation set follows the instructions the pipelines
// run; the flag definitions are those of the Y86-64 instruction set.
module y86_alu
  import y86_pkg::*;
(
  input  word_t      a,
  input  word_t      b,
  input  logic [3:0] alufun,
  output word_t      result,
  output cc_t        flags
);

  always_comb begin
    flags.of = 1'b0;
    case (alufun)
      ALU_SUB: begin
        result   = b - a;
        flags.of = (b[63] != a[63]) && (result[63] != b[63]);
      end
      ALU_AND: result = b & a;
      ALU_XOR: result = b ^ a;
      default: begin
        result   = b + a;
        flags.of = (b[63] == a[63]) && (result[63] != b[63]);
      end
    endcase
    flags.zf = (result == '0);
    flags.sf = result[63];
  end

endmodule
