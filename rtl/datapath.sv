// datapath: the single-cycle datapath, without its memories and decoder.
//
// One instruction passes through it per clock cycle:
//   1. The fetch unit drives the PC to the instruction memory (outside) and
//      receives Instruction<31:0> back; rs, rt, rd, imm16 and the jump
//      target are sliced from it.
//   2. The register file reads R[rs] onto busA and R[rt] onto busB.
//   3. The extender widens imm16 (zero or sign, ExtOp); the ALUSrc mux
//      gives the ALU either busB (0) or the extended immediate (1).
//   4. The ALU computes ADD/SUB/OR (ALUctr) and raises Equal on a zero
//      result. Its result is the data-memory address; busB is the store data.
//   5. The MemtoReg mux picks the ALU result (0) or the memory word (1) as
//      busW; the RegDst mux picks rt (0) or rd (1) as the write register Rw.
//   6. At the rising clock edge the register file writes busW if RegWr is
//      high, the data memory writes if MemWr is high, and the PC takes its
//      next value (PC+4, branch target when nPC_sel AND Equal, or jump).
// All of this settles combinationally within the cycle; the only state is
// the PC and the register file (plus the memories outside).
//
// Interface: clk, rst; ctrl (mips_pkg::ctrl_t) from the decoder; instr from
// the instruction memory and pc to it; dmem_addr, dmem_wdata and
// dmem_rdata to the data memory; and the write-back bus (wb_en, wb_reg,
// wb_data) and `equal` brought out for observation.
//
// The blocks, muxes, their 0/1 input order and the control signals follow
// the course material's "putting it all together" datapath. Field positions
// follow its R/I/J instruction formats (rs = bits 25..21, rt = 20..16,
// rd = 15..11).
module datapath
  import mips_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  ctrl_t           ctrl,
  output logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] instr,
  output logic [XLEN-1:0] dmem_addr,
  output logic [XLEN-1:0] dmem_wdata,
  input  logic [XLEN-1:0] dmem_rdata,
  output logic            equal,
  output logic            wb_en,
  output logic [4:0]      wb_reg,
  output logic [XLEN-1:0] wb_data
);

  r_fmt_t          ir;
  i_fmt_t          ii;
  j_fmt_t          ij;
  logic [4:0]      rs, rt, rd, rw;
  logic [15:0]     imm16;
  logic [25:0]     target;
  logic [XLEN-1:0] bus_a, bus_b, bus_w;
  logic [XLEN-1:0] imm_ext, alu_b, alu_out;

  // The same word viewed in the R, I and J formats.
  assign ir     = r_fmt_t'(instr);
  assign ii     = i_fmt_t'(instr);
  assign ij     = j_fmt_t'(instr);
  assign rs     = ir.rs;
  assign rt     = ir.rt;
  assign rd     = ir.rd;
  assign imm16  = ii.imm16;
  assign target = ij.target;

  // RegDst mux: 1 -> rd, 0 -> rt
  assign rw = ctrl.reg_dst ? rd : rt;

  regfile u_rf (
    .clk    (clk),
    .rst    (rst),
    .ra     (rs),
    .rb     (rt),
    .rw     (rw),
    .bus_w  (bus_w),
    .reg_wr (ctrl.reg_wr),
    .bus_a  (bus_a),
    .bus_b  (bus_b)
  );

  extender u_ext (
    .imm    (imm16),
    .ext_op (ctrl.ext_op),
    .ext    (imm_ext)
  );

  // ALUSrc mux: 1 -> immediate, 0 -> busB
  assign alu_b = ctrl.alu_src ? imm_ext : bus_b;

  alu u_alu (
    .a       (bus_a),
    .b       (alu_b),
    .alu_ctr (ctrl.alu_ctr),
    .result  (alu_out),
    .equal   (equal)
  );

  assign dmem_addr  = alu_out;
  assign dmem_wdata = bus_b;

  // MemtoReg mux: 1 -> memory, 0 -> ALU
  assign bus_w = ctrl.mem_to_reg ? dmem_rdata : alu_out;

  inst_fetch_unit #(.RESET_PC(RESET_PC)) u_ifu (
    .clk     (clk),
    .rst     (rst),
    .npc_sel (ctrl.npc_sel),
    .equal   (equal),
    .jump    (ctrl.jump),
    .imm16   (imm16),
    .target  (target),
    .pc      (pc)
  );

  assign wb_en   = ctrl.reg_wr;
  assign wb_reg  = rw;
  assign wb_data = bus_w;

endmodule
