// datapath_tb: test of the datapath on its own.
//
// The decoder is not used: the control word for each instruction comes from
// the reference table in mips_isa_pkg (control_row). The instruction memory
// is a queue holding a random program and the data memory is an array, both
// in this bench. Every cycle the PC, the write-back bus, the data-memory
// write and the Equal flag of beq are compared with the instruction-level
// model.
module datapath_tb;
  import mips_pkg::*;
  import mips_isa_pkg::*;

  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [31:0] pc, instr, dmem_addr, dmem_wdata, dmem_rdata, wb_data;
  logic        equal, wb_en;
  logic [4:0]  wb_reg;
  logic [31:0] dmem [1024];
  prog_t       p;

  datapath dut (.*);

  always #5 clk = ~clk;

  assign instr      = ((pc >> 2) < p.size()) ? p[pc >> 2] : 32'd0;
  assign ctrl       = ctrl_t'(isa_model::control_row(instr));
  assign dmem_rdata = dmem[dmem_addr[11:2]];

  always @(posedge clk) if (ctrl.mem_wr && !rst) dmem[dmem_addr[11:2]] <= dmem_wdata;

  int checks = 0, failures = 0;
  int n_taken = 0, n_untaken = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    isa_model    m;
    logic [31:0] halt;
    static int   cycles = 0;
    p = gen_random(1500, halt);
    foreach (dmem[i]) dmem[i] = '0;
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    m = new(32'd0);
    while (pc != halt && cycles < 10000) begin
      logic [31:0] ins;
      ins = p[m.pc >> 2];
      checks++;
      if (pc !== m.pc) fail($sformatf("pc %h exp %h", pc, m.pc));
      m.step(ins, dmem_rdata);
      checks++;
      if (wb_en !== m.reg_we || (m.reg_we && (wb_reg !== m.reg_idx || wb_data !== m.reg_val)))
        fail($sformatf("write-back en=%b r%0d=%h exp en=%b r%0d=%h ins %h",
                       wb_en, wb_reg, wb_data, m.reg_we, m.reg_idx, m.reg_val, ins));
      checks++;
      if (m.mem_we && (dmem_addr !== m.mem_addr || dmem_wdata !== m.mem_val))
        fail($sformatf("store [%h]=%h exp [%h]=%h", dmem_addr, dmem_wdata, m.mem_addr, m.mem_val));
      if (m.kind == K_BEQ) begin
        checks++;
        if (equal !== m.taken) fail($sformatf("equal %b exp %b", equal, m.taken));
        if (m.taken) n_taken++; else n_untaken++;
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (pc != halt) fail("did not reach the end of the program");
    checks++;
    if (n_taken == 0 || n_untaken == 0) fail("branch outcomes not both exercised");
    $display("cycles=%0d taken=%0d untaken=%0d", cycles, n_taken, n_untaken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
