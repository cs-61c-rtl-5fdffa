// regfile: the processor's 32 x 32-bit general-purpose register file.
//
// Two read ports and one write port. Ra and Rb select the registers driven
// onto busA and busB; the reads are combinational, so a new register number
// shows up on the bus within the same cycle. When RegWr is high, busW is
// written into register Rw at the rising clock edge that ends the cycle,
// which is where a single-cycle instruction commits its result.
//
// Interface: clk, rst (synchronous, active high), ra/rb/rw (5 bits),
// bus_w (32 bits), reg_wr; outputs bus_a, bus_b (32 bits).
//
// The port set, widths and the clocked write follow the course material.
// Three choices are this design's own: register 0 always reads as zero and
// ignores writes (the MIPS convention), a reset clears every register, and a
// read of the register being written returns the old value (no bypass), as
// expected when the write happens only at the clock edge.
module regfile
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = XLEN,
  parameter int unsigned DEPTH = NREGS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH)-1:0] ra,
  input  logic [$clog2(DEPTH)-1:0] rb,
  input  logic [$clog2(DEPTH)-1:0] rw,
  input  logic [WIDTH-1:0]         bus_w,
  input  logic                     reg_wr,
  output logic [WIDTH-1:0]         bus_a,
  output logic [WIDTH-1:0]         bus_b
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (reg_wr && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  assign bus_a = (ra == '0) ? '0 : regs[ra];
  assign bus_b = (rb == '0) ? '0 : regs[rb];

endmodule
