// control_tb: self-checking test of the main decoder.
// The expected control word of each instruction is written out here as a
// table row (RegDst, ALUSrc, MemtoReg, RegWr, MemWr, nPC_sel, Jump, ExtOp,
// ALUctr). Every supported op/funct pair is checked against it, and random
// unsupported encodings must produce an all-zero control word.
module control_tb;
  import mips_pkg::*;

  logic [5:0] op, funct;
  ctrl_t      ctrl;
  logic [6:0] insn;
  int checks = 0, failures = 0;

  control dut (.op(op), .funct(funct), .ctrl(ctrl), .insn(insn));

  // row layout: reg_dst alu_src mem_to_reg reg_wr mem_wr npc_sel jump ext_op alu_ctr[1:0]
  task automatic expect_row(input string nm, input logic [5:0] o, input logic [5:0] f,
                            input logic [9:0] row, input logic [6:0] onehot);
    op = o; funct = f; #1;
    checks++;
    if (ctrl !== row || insn !== onehot) begin
      failures++;
      $display("FAIL %s: ctrl=%b exp %b insn=%b exp %b", nm, ctrl, row, insn, onehot);
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
    for (int k = 0; k < 8; k++) begin
      logic [5:0] junk;
      junk = 6'($urandom);
      //                                    dst src m2r rw mw npc j ext alu
      expect_row("add", 6'b000000, 6'b100000, 10'b1_0_0_1_0_0_0_0_00, 7'b0000001);
      expect_row("sub", 6'b000000, 6'b100010, 10'b1_0_0_1_0_0_0_0_01, 7'b0000010);
      expect_row("ori", 6'b001101, junk,      10'b0_1_0_1_0_0_0_0_10, 7'b0000100);
      expect_row("lw",  6'b100011, junk,      10'b0_1_1_1_0_0_0_1_00, 7'b0001000);
      expect_row("sw",  6'b101011, junk,      10'b0_1_0_0_1_0_0_1_00, 7'b0010000);
      expect_row("beq", 6'b000100, junk,      10'b0_0_0_0_0_1_0_0_01, 7'b0100000);
      expect_row("j",   6'b000010, junk,      10'b0_0_0_0_0_0_1_0_00, 7'b1000000);
    end
    // unsupported encodings decode to nothing
    for (int k = 0; k < 500; k++) begin
      logic [5:0] o, f;
      o = 6'($urandom); f = 6'($urandom);
      if (o inside {6'b001101, 6'b100011, 6'b101011, 6'b000100, 6'b000010}) continue;
      if (o == 6'b000000 && (f == 6'b100000 || f == 6'b100010)) continue;
      expect_row("other", o, f, 10'b0, 7'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
