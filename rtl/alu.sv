// alu: the 32-bit arithmetic/logic unit of the single-cycle datapath.
//
// ALUctr selects one of three operations on busA (a) and the second operand
// (b): ADD (add, lw and sw address), SUB (sub, and beq's comparison) and OR
// (ori). The unit is purely combinational. Besides the result it drives
// `equal`, high when the result is zero; with ALUctr = SUB this is the
// a == b condition that beq uses to choose the branch target.
//
// The operation set and the 00/01/10 code follow the course material. The
// arithmetic wraps modulo 2^32 with no overflow trap (as addu/subu do), and
// code 11 is unused and returns zero: both are this design's choices.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = XLEN
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  aluctr_e          alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             equal
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
  end

  assign equal = (result == '0);

endmodule
