// extender_tb: self-checking test of the immediate extender.
// Every 16-bit value is extended in both modes and compared with the
// expected zero- and sign-extended words.
module extender_tb;
  import mips_pkg::*;

  logic [15:0] imm;
  extop_e      op;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  extender dut (.imm(imm), .ext_op(op), .ext(ext));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v += 7) begin
      logic [31:0] zexp, sexp;
      zexp = {16'h0000, v[15:0]};
      sexp = v[15] ? {16'hFFFF, v[15:0]} : {16'h0000, v[15:0]};
      imm = v[15:0];
      op = EXT_ZERO; #1;
      checks++;
      if (ext !== zexp) begin failures++; $display("FAIL zero imm=%h got=%h", imm, ext); end
      op = EXT_SIGN; #1;
      checks++;
      if (ext !== sexp) begin failures++; $display("FAIL sign imm=%h got=%h", imm, ext); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
