// control: the single-cycle processor's main decoder.
//
// Purely combinational, built as two planes. The "AND" plane matches the
// opcode (and, for R-type, the funct field) against each supported
// instruction and raises exactly one of add, sub, ori, lw, sw, beq, jump.
// The "OR" plane forms each control signal as the OR of the instructions
// that need it:
//   RegDst   = add + sub          ALUSrc  = ori + lw + sw
//   MemtoReg = lw                 RegWr   = add + sub + ori + lw
//   MemWr    = sw                 nPC_sel = beq
//   Jump     = jump               ExtOp   = lw + sw
//   ALUctr[0] = sub + beq         ALUctr[1] = ori
// An opcode or funct outside the subset raises no instruction line, so every
// control signal is low: nothing is written and the PC advances by 4.
//
// Interface: op (6 bits), funct (6 bits); output ctrl (mips_pkg::ctrl_t) and
// a one-hot instruction vector, insn, for observation.
//
// The decoding equations and codes follow the course material. Table entries
// it marks "don't care" are driven low here, and the treatment of unknown
// instructions is this design's choice.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl,
  output logic [6:0] insn   // {jump, beq, sw, lw, ori, sub, add}
);

  logic rtype, i_add, i_sub, i_ori, i_lw, i_sw, i_beq, i_jump;

  // AND plane
  assign rtype  = (op == OP_RTYPE);
  assign i_add  = rtype && (funct == FUNCT_ADD);
  assign i_sub  = rtype && (funct == FUNCT_SUB);
  assign i_ori  = (op == OP_ORI);
  assign i_lw   = (op == OP_LW);
  assign i_sw   = (op == OP_SW);
  assign i_beq  = (op == OP_BEQ);
  assign i_jump = (op == OP_JUMP);

  assign insn = {i_jump, i_beq, i_sw, i_lw, i_ori, i_sub, i_add};

  // OR plane
  always_comb begin
    ctrl.reg_dst    = i_add | i_sub;
    ctrl.alu_src    = i_ori | i_lw | i_sw;
    ctrl.mem_to_reg = i_lw;
    ctrl.reg_wr     = i_add | i_sub | i_ori | i_lw;
    ctrl.mem_wr     = i_sw;
    ctrl.npc_sel    = i_beq;
    ctrl.jump       = i_jump;
    ctrl.ext_op     = extop_e'(i_lw | i_sw);
    ctrl.alu_ctr    = aluctr_e'({i_ori, i_sub | i_beq});
  end

endmodule
