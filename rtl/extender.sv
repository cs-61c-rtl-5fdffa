// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// ExtOp = zero fills the upper 16 bits with zeros (ori); ExtOp = sign copies
// bit 15 into them (lw, sw address offsets). Combinational.
//
// Both modes and the ExtOp control follow the course material; nothing here
// is this design's own beyond the port names.
module extender
  import mips_pkg::*;
#(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = XLEN
) (
  input  logic [IN_W-1:0]  imm,
  input  extop_e           ext_op,
  output logic [OUT_W-1:0] ext
);

  logic fill;

  assign fill = (ext_op == EXT_SIGN) ? imm[IN_W-1] : 1'b0;
  assign ext  = {{(OUT_W-IN_W){fill}}, imm};

endmodule
