// inst_memory_tb: self-checking test of the instruction memory.
// Fills the whole array through the load port with a pattern computed from
// the address, then reads every word back through the fetch address port
// (combinational read) and checks the contents and the address wrap.
module inst_memory_tb;
  localparam int unsigned DEPTH = 1024;
  logic        clk = 0;
  logic [31:0] addr, instr, load_addr, load_data;
  logic        load_we;
  int checks = 0, failures = 0;

  inst_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(input int unsigned w);
    return (w * 32'h9E37_79B9) ^ 32'h5A5A_0000 ^ w;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; addr = 0; load_addr = 0; load_data = 0;
    for (int unsigned w = 0; w < DEPTH; w++) begin
      @(negedge clk);
      load_we = 1; load_addr = w * 4; load_data = pattern(w);
    end
    @(negedge clk) load_we = 0;
    for (int unsigned w = 0; w < DEPTH; w++) begin
      addr = w * 4 + ($urandom % 4);    // byte offset is ignored
      #1 checks++;
      if (instr !== pattern(w)) begin failures++; $display("FAIL w=%0d got %h", w, instr); end
    end
    for (int k = 0; k < 50; k++) begin
      int unsigned w;
      w = $urandom % DEPTH;
      addr = (w + DEPTH * (1 + $urandom % 8)) * 4;  // wraps onto word w
      #1 checks++;
      if (instr !== pattern(w)) begin failures++; $display("FAIL wrap w=%0d got %h", w, instr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
