// single_cycle_cpu: a complete single-cycle processor for a MIPS subset.
//
// Every instruction (add, sub, ori, lw, sw, beq, j) completes in exactly one
// clock cycle: fetch, decode, register read, ALU, memory access and
// register write-back all settle combinationally between two rising edges,
// and the PC, register file and data memory are updated together at the
// edge. The clock period must therefore cover the slowest instruction (lw:
// instruction memory, register read, extender, ALU, data memory, write-back
// mux and register set-up).
//
// Structure: the decoder (control) turns op/funct into the control word;
// the datapath holds the fetch unit, register file, extender, ALU and muxes;
// the instruction and data memories sit beside it.
//
// Interface:
//   clk, rst          clock; synchronous active-high reset (PC <= RESET_PC,
//                     registers cleared)
//   imem_load_*       port to write a program into the instruction memory,
//                     to be used while rst is held
//   pc, instr         the instruction executing this cycle
//   reg_wr/reg_waddr/reg_wdata   register write committed at the next edge
//   mem_wr/mem_addr/mem_wdata    data-memory write committed at the next edge
//   branch_taken, jump_taken     next-PC choice of this cycle
//
// The organisation follows the course material; memory depths, the reset,
// the load port and the observation outputs are this design's choices.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int unsigned   IMEM_DEPTH = 1024,
  parameter int unsigned   DMEM_DEPTH = 1024,
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            imem_load_we,
  input  logic [XLEN-1:0] imem_load_addr,
  input  logic [XLEN-1:0] imem_load_data,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] instr,
  output logic            reg_wr,
  output logic [4:0]      reg_waddr,
  output logic [XLEN-1:0] reg_wdata,
  output logic            mem_wr,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  output logic            branch_taken,
  output logic            jump_taken
);

  r_fmt_t          ir;
  ctrl_t           ctrl;
  logic [6:0]      insn;
  logic [XLEN-1:0] dmem_rdata;
  logic            equal;

  inst_memory #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk       (clk),
    .addr      (pc),
    .instr     (instr),
    .load_we   (imem_load_we),
    .load_addr (imem_load_addr),
    .load_data (imem_load_data)
  );

  assign ir = r_fmt_t'(instr);

  control u_ctrl (
    .op    (ir.op),
    .funct (ir.funct),
    .ctrl  (ctrl),
    .insn  (insn)
  );

  datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk        (clk),
    .rst        (rst),
    .ctrl       (ctrl),
    .pc         (pc),
    .instr      (instr),
    .dmem_addr  (mem_addr),
    .dmem_wdata (mem_wdata),
    .dmem_rdata (dmem_rdata),
    .equal      (equal),
    .wb_en      (reg_wr),
    .wb_reg     (reg_waddr),
    .wb_data    (reg_wdata)
  );

  // Writes are suppressed while the processor is held in reset.
  data_memory #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk      (clk),
    .wr_en    (mem_wr),
    .addr     (mem_addr),
    .data_in  (mem_wdata),
    .data_out (dmem_rdata)
  );

  assign mem_wr       = ctrl.mem_wr & ~rst;
  assign branch_taken = ctrl.npc_sel & equal;
  assign jump_taken   = ctrl.jump;

endmodule
