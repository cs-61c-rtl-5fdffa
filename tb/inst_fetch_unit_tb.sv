// inst_fetch_unit_tb: self-checking test of the PC and next-address logic.
// A reference PC is kept here. Each cycle random nPC_sel, Equal, Jump,
// imm16 and target are applied; after the clock edge the unit's PC must
// equal PC+4, PC+4+SignExt(imm16)*4 (nPC_sel AND Equal) or
// {PC[31:28], target, 00} (Jump). The number of taken branches, untaken
// branches, jumps and sequential steps is counted and each must occur.
// One PC update per clock edge is also checked (single-cycle timing).
module inst_fetch_unit_tb;
  logic        clk = 0, rst;
  logic        npc_sel, equal, jump;
  logic [15:0] imm16;
  logic [25:0] target;
  logic [31:0] pc, ref_pc;
  int checks = 0, failures = 0;
  int n_seq = 0, n_taken = 0, n_not_taken = 0, n_jump = 0, n_backward = 0;

  inst_fetch_unit #(.RESET_PC(32'h0040_0000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; equal = 0; jump = 0; imm16 = 0; target = 0;
    @(posedge clk); #1 rst = 0;
    ref_pc = 32'h0040_0000;
    checks++;
    if (pc !== ref_pc) begin failures++; $display("FAIL reset pc=%h", pc); end
    for (int n = 0; n < 5000; n++) begin
      npc_sel = ($urandom % 3) == 0;
      equal   = 1'($urandom & 1);
      jump    = ($urandom % 6) == 0;
      imm16   = 16'($urandom);
      target  = 26'($urandom);
      if (jump) begin
        ref_pc = {ref_pc[31:28], target, 2'b00};
        n_jump++;
      end else if (npc_sel && equal) begin
        ref_pc = ref_pc + 32'd4 + {{14{imm16[15]}}, imm16, 2'b00};
        n_taken++;
        if (imm16[15]) n_backward++;
      end else begin
        ref_pc = ref_pc + 32'd4;
        if (npc_sel) n_not_taken++; else n_seq++;
      end
      @(posedge clk); #1;
      checks++;
      if (pc !== ref_pc) begin
        failures++;
        $display("FAIL n=%0d sel=%b eq=%b j=%b imm=%h pc=%h exp %h", n, npc_sel, equal, jump, imm16, pc, ref_pc);
      end
    end
    // mechanisms exercised
    checks++; if (n_seq == 0)       begin failures++; $display("no sequential step"); end
    checks++; if (n_taken == 0)     begin failures++; $display("no taken branch"); end
    checks++; if (n_not_taken == 0) begin failures++; $display("no untaken branch"); end
    checks++; if (n_jump == 0)      begin failures++; $display("no jump"); end
    checks++; if (n_backward == 0)  begin failures++; $display("no backward branch"); end
    $display("seq=%0d taken=%0d not_taken=%0d jump=%0d", n_seq, n_taken, n_not_taken, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
