// mips_pkg: types and constants shared by the single-cycle processor.
//
// The processor runs a seven-instruction subset of MIPS: add, sub (R-type),
// ori, lw, sw, beq (I-type) and j (J-type). This package holds the field
// positions of the three 32-bit instruction formats (as packed structs), the opcode and funct
// values of those instructions, the two-bit ALU operation code and the
// control word that the decoder hands to the datapath.
//
// Opcode and funct values, the ALUctr code (00 add, 01 subtract, 10 or) and
// the set of control signals follow the course material this design is built
// from. The struct packing order and the helper functions are this design's
// own.
package mips_pkg;

  localparam int unsigned XLEN = 32;   // data and address width
  localparam int unsigned NREGS = 32;  // architectural registers

  // Major opcodes, instruction bits 31..26.
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b00_0000,
    OP_JUMP  = 6'b00_0010,
    OP_BEQ   = 6'b00_0100,
    OP_ORI   = 6'b00_1101,
    OP_LW    = 6'b10_0011,
    OP_SW    = 6'b10_1011
  } opcode_e;

  // funct field of R-type instructions, bits 5..0.
  localparam logic [5:0] FUNCT_ADD = 6'b10_0000;
  localparam logic [5:0] FUNCT_SUB = 6'b10_0010;

  // ALU operation select.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } aluctr_e;

  // Extender mode: 0 zero-extends, 1 sign-extends.
  typedef enum logic {
    EXT_ZERO = 1'b0,
    EXT_SIGN = 1'b1
  } extop_e;

  // Control word produced by the decoder each cycle.
  typedef struct packed {
    logic    reg_dst;    // 1: write rd, 0: write rt
    logic    alu_src;    // 1: ALU B input is the extended immediate, 0: busB
    logic    mem_to_reg; // 1: write-back data from memory, 0: from ALU
    logic    reg_wr;     // register file write enable
    logic    mem_wr;     // data memory write enable
    logic    npc_sel;    // 1: branch instruction (beq)
    logic    jump;       // 1: jump instruction
    extop_e  ext_op;     // immediate extension mode
    aluctr_e alu_ctr;    // ALU operation
  } ctrl_t;

  // The three instruction formats, most significant field first.
  typedef struct packed {
    logic [5:0] op;      // 31..26
    logic [4:0] rs;      // 25..21
    logic [4:0] rt;      // 20..16
    logic [4:0] rd;      // 15..11
    logic [4:0] shamt;   // 10..6 (unused by this subset)
    logic [5:0] funct;   // 5..0
  } r_fmt_t;

  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [15:0] imm16;  // 15..0
  } i_fmt_t;

  typedef struct packed {
    logic [5:0]  op;
    logic [25:0] target; // 25..0
  } j_fmt_t;

endpackage
