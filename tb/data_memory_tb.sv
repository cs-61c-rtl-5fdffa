// data_memory_tb: self-checking test of the data memory.
// Initialises every word, then performs random reads and writes against a
// shadow array: a write needs WrEn and takes effect only at the clock edge,
// and the read is combinational (same-cycle data).
module data_memory_tb;
  localparam int unsigned DEPTH = 1024;
  logic        clk = 0, wr_en;
  logic [31:0] addr, data_in, data_out;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  data_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; addr = 0; data_in = 0;
    for (int unsigned w = 0; w < DEPTH; w++) begin
      @(negedge clk);
      wr_en = 1; addr = w * 4; data_in = ~w; shadow[w] = ~w;
    end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 6000; n++) begin
      int unsigned w;
      @(negedge clk);
      w = $urandom % DEPTH;
      addr = w * 4; data_in = $urandom; wr_en = ($urandom % 2) == 0;
      #1 checks++;      // read before the edge returns the old word
      if (data_out !== shadow[w]) begin failures++; $display("FAIL rd w=%0d got %h exp %h", w, data_out, shadow[w]); end
      @(posedge clk);
      if (wr_en) shadow[w] = data_in;
      #1 checks++;
      if (data_out !== shadow[w]) begin failures++; $display("FAIL wr w=%0d got %h exp %h", w, data_out, shadow[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
