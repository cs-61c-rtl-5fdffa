// regfile_tb: self-checking test of the register file.
// A shadow copy of the 32 registers is kept here. Random writes and reads
// on both ports are checked against it, including: register 0 stays zero,
// a write needs RegWr, and a write lands only at the clock edge (the read
// in the same cycle still returns the old value).
module regfile_tb;
  logic        clk = 0, rst;
  logic [4:0]  ra, rb, rw;
  logic [31:0] bus_w, bus_a, bus_b;
  logic        reg_wr;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check_reads();
    checks++;
    if (bus_a !== shadow[ra] || bus_b !== shadow[rb]) begin
      failures++;
      $display("FAIL ra=%0d a=%h exp %h | rb=%0d b=%h exp %h", ra, bus_a, shadow[ra], rb, bus_b, shadow[rb]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; reg_wr = 0; ra = 0; rb = 0; rw = 0; bus_w = 0;
    foreach (shadow[i]) shadow[i] = '0;
    @(posedge clk); #1 rst = 0;
    // after reset every register reads zero
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1 check_reads();
    end
    for (int n = 0; n < 4000; n++) begin
      ra = 5'($urandom); rb = 5'($urandom);
      rw = (n % 5 == 0) ? ra : 5'($urandom);
      bus_w = $urandom; reg_wr = ($urandom % 4) != 0;
      #1 check_reads();           // old value before the edge
      @(posedge clk);
      if (reg_wr && rw != 0) shadow[rw] = bus_w;
      #1 check_reads();           // new value after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
