// data_memory: data memory of the single-cycle processor.
//
// A word array of DEPTH 32-bit words. The ALU result is the byte address
// (Adr; bits 1..0 ignored, higher bits beyond the array wrap). The read is
// combinational, so lw has its data before the end of its single cycle.
// When WrEn (MemWr) is high, Data In (busB, i.e. R[rt]) is written at the
// rising clock edge.
//
// Interface: clk, wr_en, addr, data_in (32 bits); output data_out (32 bits).
//
// The ports, the clocked write and the combinational read follow the course
// material's datapath. The depth of 1024 words and word-only access are this
// design's choices; the contents are not reset.
module data_memory
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [XLEN-1:0] addr,
  input  logic [XLEN-1:0] data_in,
  output logic [XLEN-1:0] data_out
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [XLEN-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[addr[AW+1:2]] <= data_in;
  end

  assign data_out = mem[addr[AW+1:2]];

endmodule
