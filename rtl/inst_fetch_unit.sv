// inst_fetch_unit: program counter and next-address logic.
//
// The PC register supplies the instruction address. Every cycle the unit
// computes three candidates for the next PC:
//   * sequential   PC + 4                            (first adder)
//   * branch       PC + 4 + SignExt(imm16) * 4      ("PC Ext" and second adder)
//   * jump         {PC[31:28], target26, 00}
// The branch mux takes the branch target only when nPC_sel (a beq is
// executing) and Equal (the ALU found rs == rt) are both high, i.e. the mux
// select is nPC_sel AND Equal. A second mux then takes the jump address when
// Jump is high, whatever the branch mux chose. The new PC is loaded at the
// rising clock edge that ends the instruction.
//
// The PC is word aligned: its two low bits are constant zeros and only bits
// 31..2 are stored.
//
// Interface: clk, rst (synchronous, active high, loads RESET_PC), npc_sel,
// equal, jump, imm16, target (26 bits); output pc (32 bits).
//
// The adders, the PC Ext block, the nPC_sel/Equal mux encoding and the jump
// address formula follow the course material. The reset value, the reset
// itself, and taking PC[31:28] from the current PC (as the material writes
// it) rather than from PC + 4 are this design's choices.
module inst_fetch_unit
  import mips_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            npc_sel,
  input  logic            equal,
  input  logic            jump,
  input  logic [15:0]     imm16,
  input  logic [25:0]     target,
  output logic [XLEN-1:0] pc
);

  logic [XLEN-1:2] pc_q;
  logic [XLEN-1:0] pc_plus4;
  logic [XLEN-1:0] pc_ext;
  logic [XLEN-1:0] br_target;
  logic [XLEN-1:0] jmp_target;
  logic            br_taken;
  logic [XLEN-1:0] npc_br;
  logic [XLEN-1:0] npc;

  assign pc = {pc_q, 2'b00};

  // PC Ext: sign-extend the word offset and scale it to bytes.
  assign pc_ext     = {{(XLEN-18){imm16[15]}}, imm16, 2'b00};
  assign pc_plus4   = pc + XLEN'(4);
  assign br_target  = pc_plus4 + pc_ext;
  assign jmp_target = {pc[31:28], target, 2'b00};

  assign br_taken = npc_sel & equal;
  assign npc_br   = br_taken ? br_target : pc_plus4;
  assign npc      = jump ? jmp_target : npc_br;

  always_ff @(posedge clk) begin
    if (rst) pc_q <= RESET_PC[XLEN-1:2];
    else     pc_q <= npc[XLEN-1:2];
  end

endmodule
