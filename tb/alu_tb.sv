// alu_tb: self-checking test of the ALU.
// Drives directed corner cases and random operands for ADD, SUB and OR and
// compares the result and the `equal` flag with values computed here.
module alu_tb;
  import mips_pkg::*;

  logic [31:0] a, b, result;
  aluctr_e     ctr;
  logic        equal;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(ctr), .result(result), .equal(equal));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input aluctr_e tc);
    logic [31:0] exp;
    a = ta; b = tb_; ctr = tc;
    #1;
    case (tc)
      ALU_ADD: exp = ta + tb_;
      ALU_SUB: exp = ta - tb_;
      default: exp = ta | tb_;
    endcase
    checks++;
    if (result !== exp || equal !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got=%h eq=%b exp=%h", tc.name(), ta, tb_, result, equal, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: wrap-around, borrow, equality for beq
    check(32'hFFFF_FFFF, 32'd1, ALU_ADD);
    check(32'd0, 32'd1, ALU_SUB);
    check(32'h1234_5678, 32'h1234_5678, ALU_SUB);   // equal -> zero
    check(32'h1234_5678, 32'h1234_5679, ALU_SUB);
    check(32'hF0F0_0000, 32'h0000_0F0F, ALU_OR);
    check(32'd0, 32'd0, ALU_OR);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = (i % 7 == 0) ? x : $urandom;
      check(x, y, aluctr_e'(i % 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
