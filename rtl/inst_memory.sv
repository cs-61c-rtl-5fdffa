// inst_memory: instruction memory of the single-cycle processor.
//
// A word array of DEPTH 32-bit instructions, read combinationally: the word
// at byte address `addr` (bits 1..0 ignored) appears on `instr` in the same
// cycle, as a single-cycle machine needs. Addresses beyond the array wrap.
//
// The processor itself never writes this memory. A separate load port
// (load_we, load_addr, load_data, written at the rising clock edge) lets a
// test bench or boot logic place a program in it.
//
// The course material only names this block and shows its Adr input and
// Instruction<31:0> output. The depth (1024 words), the load port and the
// wrap-around are this design's choices.
module inst_memory
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic            clk,
  input  logic [XLEN-1:0] addr,
  output logic [XLEN-1:0] instr,
  input  logic            load_we,
  input  logic [XLEN-1:0] load_addr,
  input  logic [XLEN-1:0] load_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [XLEN-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;
  end

  assign instr = mem[addr[AW+1:2]];

endmodule
