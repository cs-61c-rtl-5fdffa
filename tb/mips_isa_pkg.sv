// mips_isa_pkg: instruction-level reference model and assembler helpers for
// the test benches of the single-cycle processor.
//
// The enc_* functions build 32-bit instruction words for the supported
// subset. The isa_model class executes one instruction at a time on its own
// copy of the architectural state (PC, 32 registers with register 0 fixed
// at zero, and a sparse word memory) and reports what the hardware must do
// in that cycle: the register write, the memory write and the next PC. Its
// control_row function gives, independently of the RTL decoder, the control
// word each instruction needs.
package mips_isa_pkg;

  function automatic logic [31:0] enc_r(input logic [4:0] rd, rs, rt, input logic [5:0] funct);
    return {6'b000000, rs, rt, rd, 5'd0, funct};
  endfunction
  function automatic logic [31:0] enc_add(input logic [4:0] rd, rs, rt);
    return enc_r(rd, rs, rt, 6'b100000);
  endfunction
  function automatic logic [31:0] enc_sub(input logic [4:0] rd, rs, rt);
    return enc_r(rd, rs, rt, 6'b100010);
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input logic [4:0] rt, rs, input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic logic [31:0] enc_ori(input logic [4:0] rt, rs, input logic [15:0] imm);
    return enc_i(6'b001101, rt, rs, imm);
  endfunction
  function automatic logic [31:0] enc_lw(input logic [4:0] rt, rs, input logic [15:0] imm);
    return enc_i(6'b100011, rt, rs, imm);
  endfunction
  function automatic logic [31:0] enc_sw(input logic [4:0] rt, rs, input logic [15:0] imm);
    return enc_i(6'b101011, rt, rs, imm);
  endfunction
  // offset in instructions, relative to the instruction after the beq
  function automatic logic [31:0] enc_beq(input logic [4:0] rs, rt, input logic [15:0] off);
    return enc_i(6'b000100, rt, rs, off);
  endfunction
  // byte address of the destination; bits 27..2 go into the target field
  function automatic logic [31:0] enc_j(input logic [31:0] dest);
    return {6'b000010, dest[27:2]};
  endfunction

  typedef enum int {K_ADD, K_SUB, K_ORI, K_LW, K_SW, K_BEQ, K_J, K_OTHER} kind_e;

  class isa_model;
    logic [31:0] pc;
    logic [31:0] regs [32];
    logic [31:0] mem [int unsigned];   // word index -> data

    // effects of the last step
    kind_e       kind;
    logic        reg_we;
    logic [4:0]  reg_idx;
    logic [31:0] reg_val;
    logic        mem_we;
    logic [31:0] mem_addr;
    logic [31:0] mem_val;
    logic        taken;
    logic        load_known;   // false when lw read a word never written

    function new(input logic [31:0] reset_pc);
      pc = reset_pc;
      foreach (regs[i]) regs[i] = '0;
    endfunction

    static function kind_e decode(input logic [31:0] ins);
      case (ins[31:26])
        6'b000000: return (ins[5:0] == 6'b100000) ? K_ADD :
                          (ins[5:0] == 6'b100010) ? K_SUB : K_OTHER;
        6'b001101: return K_ORI;
        6'b100011: return K_LW;
        6'b101011: return K_SW;
        6'b000100: return K_BEQ;
        6'b000010: return K_J;
        default:   return K_OTHER;
      endcase
    endfunction

    // {reg_dst, alu_src, mem_to_reg, reg_wr, mem_wr, npc_sel, jump, ext_op, alu_ctr[1:0]}
    static function logic [9:0] control_row(input logic [31:0] ins);
      case (decode(ins))
        K_ADD:   return 10'b1_0_0_1_0_0_0_0_00;
        K_SUB:   return 10'b1_0_0_1_0_0_0_0_01;
        K_ORI:   return 10'b0_1_0_1_0_0_0_0_10;
        K_LW:    return 10'b0_1_1_1_0_0_0_1_00;
        K_SW:    return 10'b0_1_0_0_1_0_0_1_00;
        K_BEQ:   return 10'b0_0_0_0_0_1_0_0_01;
        K_J:     return 10'b0_0_0_0_0_0_1_0_00;
        default: return 10'b0;
      endcase
    endfunction

    function logic [31:0] read_mem(input logic [31:0] byte_addr);
      int unsigned w = byte_addr >> 2;
      if (mem.exists(w)) begin
        load_known = 1'b1;
        return mem[w];
      end
      load_known = 1'b0;
      return '0;
    endfunction

    // Execute `ins` at the current PC. For lw, `dut_load` is the value the
    // hardware read, used only when the model has never seen that word.
    function void step(input logic [31:0] ins, input logic [31:0] dut_load);
      logic [4:0]  rs, rt, rd;
      logic [31:0] a, b, sext, zext, npc;
      rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
      a = regs[rs]; b = regs[rt];
      sext = {{16{ins[15]}}, ins[15:0]};
      zext = {16'h0000, ins[15:0]};
      kind = decode(ins);
      reg_we = 0; reg_idx = 0; reg_val = 0;
      mem_we = 0; mem_addr = 0; mem_val = 0;
      taken = 0; load_known = 1;
      npc = pc + 4;
      case (kind)
        K_ADD: begin reg_we = 1; reg_idx = rd; reg_val = a + b; end
        K_SUB: begin reg_we = 1; reg_idx = rd; reg_val = a - b; end
        K_ORI: begin reg_we = 1; reg_idx = rt; reg_val = a | zext; end
        K_LW: begin
          reg_we = 1; reg_idx = rt;
          reg_val = read_mem(a + sext);
          if (!load_known) reg_val = dut_load;
        end
        K_SW: begin mem_we = 1; mem_addr = a + sext; mem_val = b; end
        K_BEQ: if (a == b) begin taken = 1; npc = pc + 4 + {sext[29:0], 2'b00}; end
        K_J:   npc = {pc[31:28], ins[25:0], 2'b00};
        default: ;
      endcase
      if (reg_we && reg_idx != 0) regs[reg_idx] = reg_val;
      if (mem_we) mem[mem_addr >> 2] = mem_val;
      pc = npc;
    endfunction
  endclass

  typedef logic [31:0] prog_t[$];

  // Random test program. A prologue points r30 at byte 512 and zeroes data
  // words 0..127 so that every load has a known value. The body mixes all
  // seven instructions: register operands mostly from a small set (so beq
  // finds equal values often), loads and stores either at r0 + offset or
  // r30 + negative offset (exercising sign extension), ori immediates with
  // bit 15 set, writes to r0, forward branches and forward jumps. It ends
  // with padding and a jump-to-self at `halt` (returned as a byte address).
  function automatic prog_t gen_random(input int n, output logic [31:0] halt);
    prog_t p;
    p.push_back(enc_ori(5'd30, 5'd0, 16'd512));
    for (int w = 0; w < 128; w++) p.push_back(enc_sw(5'd0, 5'd0, 16'(w * 4)));
    for (int i = 0; i < n; i++) begin
      logic [4:0] rd, rs, rt;
      int unsigned sel;
      rd = 5'(($urandom % 8 == 0) ? 0 : 1 + $urandom % 7);
      rs = 5'($urandom % 8);
      rt = 5'($urandom % 8);
      sel = $urandom % 16;
      case (sel)
        0, 1, 2: p.push_back(enc_add(rd, rs, rt));
        3, 4:    p.push_back(enc_sub(rd, rs, rt));
        5, 6:    p.push_back(enc_ori(rd, rs, 16'($urandom)));
        7:       p.push_back(enc_lw(rd, 5'd0, 16'(($urandom % 128) * 4)));
        8:       p.push_back(enc_lw(rd, 5'd30, 16'(-(1 + $urandom % 64) * 4)));
        9:       p.push_back(enc_sw(rt, 5'd0, 16'(($urandom % 128) * 4)));
        10:      p.push_back(enc_sw(rt, 5'd30, 16'(-(1 + $urandom % 64) * 4)));
        11, 12:  p.push_back(enc_beq(rs, ($urandom % 3 == 0) ? rs : rt, 16'($urandom % 4)));
        13:      p.push_back(enc_j(32'((p.size() + 1 + $urandom % 4) * 4)));
        14:      p.push_back({6'b111111, 26'($urandom)});   // not in the subset
        default: p.push_back(enc_add(rd, rs, rt));
      endcase
    end
    for (int i = 0; i < 6; i++) p.push_back(enc_add(5'd1, 5'd1, 5'd2));
    halt = 32'(p.size() * 4);
    p.push_back(enc_j(halt));
    return p;
  endfunction

endpackage
