// tb_y86_alu: self-checking test of the ALU and its flags.
//
// Random and corner operands for add, sub, and, xor; the expected result
// and flags are computed here from signed arithmetic in a wider type.
module tb_y86_alu;
  import y86_pkg::*;

  word_t a, b, result;
  logic [3:0] alufun;
  cc_t flags;
  int checks = 0, failures = 0;

  y86_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint signed sa, sb;
    logic signed [64:0] wide;
    word_t er;
    logic eo;
    word_t corner [6] = '{64'h0, 64'h1, 64'hFFFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000,
                          64'h7FFF_FFFF_FFFF_FFFF, 64'h1234};
    for (int t = 0; t < 4000; t++) begin
      a = (t % 4 == 0) ? corner[$urandom_range(0, 5)] : {$urandom, $urandom};
      b = (t % 3 == 0) ? corner[$urandom_range(0, 5)] : {$urandom, $urandom};
      if (t % 7 == 0) a = b;
      alufun = 4'(t % 4);
      sa = a; sb = b;
      case (alufun)
        0: begin wide = 65'(sb) + 65'(sa); er = wide[63:0];
                 eo = (wide > 65'sh0_7FFF_FFFF_FFFF_FFFF) || (wide < -65'sh0_8000_0000_0000_0000); end
        1: begin wide = 65'(sb) - 65'(sa); er = wide[63:0];
                 eo = (wide > 65'sh0_7FFF_FFFF_FFFF_FFFF) || (wide < -65'sh0_8000_0000_0000_0000); end
        2: begin er = b & a; eo = 0; end
        default: begin er = b ^ a; eo = 0; end
      endcase
      #1;
      checks++;
      if (result !== er || flags.zf !== (er == 0) || flags.sf !== er[63] || flags.of !== eo) begin
        failures++;
        $display("FAIL fun=%0d a=%h b=%h got %h %b exp %h zf=%b sf=%b of=%b",
                 alufun, a, b, result, flags, er, er == 0, er[63], eo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
