// single_cycle_cpu_tb: end-to-end test of the single-cycle processor at its
// default sizes.
//
// Each program is written into the instruction memory through the load port
// while reset is held. Then, every cycle, the instruction-level model in
// mips_isa_pkg executes the same instruction and the processor's observable
// actions are compared with it: the PC, the register write (enable, register
// number, data), the data-memory write (enable, address, data) and the
// branch/jump choice. Because the PC is checked every cycle, this also checks
// that every instruction takes exactly one clock cycle.
//
// Programs:
//   1. swap    - the array-element swap v[k] <-> v[k+1] written as two lw
//                and two sw, followed by loads that read the swapped words.
//   2. sum     - a counting loop (beq out, add, sub, j back) summing 1..N;
//                checks the result and the cycle count 4N + 6.
//   3. random  - a long random program over the whole subset.
// Mechanisms counted (each must happen): every instruction kind, taken and
// untaken branch, backward jump, forward branch, write to r0 discarded,
// negative load/store offset, ori with immediate bit 15 set, load of data
// stored earlier, undecoded instruction acting as a no-op.
module single_cycle_cpu_tb;
  import mips_isa_pkg::*;

  logic        clk = 0, rst;
  logic        imem_load_we;
  logic [31:0] imem_load_addr, imem_load_data;
  logic [31:0] pc, instr;
  logic        reg_wr;
  logic [4:0]  reg_waddr;
  logic [31:0] reg_wdata;
  logic        mem_wr;
  logic [31:0] mem_addr, mem_wdata;
  logic        branch_taken, jump_taken;

  single_cycle_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_kind [8];
  int n_taken = 0, n_untaken = 0, n_back_jump = 0, n_r0_write = 0;
  int n_neg_off = 0, n_ori_hi = 0, n_load_stored = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  task automatic load_program(input prog_t p);
    rst = 1;
    imem_load_we = 0;
    @(negedge clk);
    foreach (p[i]) begin
      imem_load_we = 1; imem_load_addr = 32'(i * 4); imem_load_data = p[i];
      @(negedge clk);
    end
    imem_load_we = 0;
    @(negedge clk);
    rst = 0;
  endtask

  // Runs until the PC reaches `halt`; returns the number of cycles taken.
  task automatic run(input prog_t p, input logic [31:0] halt, input int max_cycles,
                     output int cycles, ref isa_model m);
    cycles = 0;
    load_program(p);
    m = new(32'd0);
    while (pc != halt && cycles < max_cycles) begin
      logic [31:0] ins;
      kind_e       k;
      // signals have settled after the falling edge
      ins = p[m.pc >> 2];
      checks++;
      if (pc !== m.pc || instr !== ins) fail($sformatf("pc %h exp %h", pc, m.pc));
      k = isa_model::decode(ins);
      if (k == K_ORI && ins[15]) n_ori_hi++;
      if ((k == K_LW || k == K_SW) && ins[15]) n_neg_off++;
      if (k == K_J && {pc[31:28], ins[25:0], 2'b00} <= pc) n_back_jump++;
      m.step(ins, reg_wdata);
      n_kind[m.kind]++;
      if (k == K_LW && m.load_known && m.mem.exists(mem_addr >> 2)) n_load_stored++;
      if (m.reg_we && m.reg_idx == 0) n_r0_write++;
      if (k == K_BEQ) begin
        if (m.taken) n_taken++; else n_untaken++;
      end
      checks++;
      if (reg_wr !== m.reg_we) fail($sformatf("reg_wr %b exp %b ins %h", reg_wr, m.reg_we, ins));
      else if (m.reg_we && (reg_waddr !== m.reg_idx || reg_wdata !== m.reg_val))
        fail($sformatf("reg write r%0d=%h exp r%0d=%h ins %h", reg_waddr, reg_wdata, m.reg_idx, m.reg_val, ins));
      checks++;
      if (mem_wr !== m.mem_we) fail($sformatf("mem_wr %b exp %b ins %h", mem_wr, m.mem_we, ins));
      else if (m.mem_we && (mem_addr !== m.mem_addr || mem_wdata !== m.mem_val))
        fail($sformatf("mem write [%h]=%h exp [%h]=%h", mem_addr, mem_wdata, m.mem_addr, m.mem_val));
      checks++;
      if (branch_taken !== m.taken || jump_taken !== (k == K_J))
        fail($sformatf("next-pc choice br=%b j=%b ins %h", branch_taken, jump_taken, ins));
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (pc != halt) fail($sformatf("did not reach halt %h, pc %h", halt, pc));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_t      p;
    isa_model   m;
    int         cycles;
    logic [31:0] halt;
    foreach (n_kind[i]) n_kind[i] = 0;
    rst = 1; imem_load_we = 0; imem_load_addr = 0; imem_load_data = 0;

    // ---- 1. swap: v[k] <-> v[k+1], base address in $2 ----
    p = {};
    p.push_back(enc_ori(5'd2, 5'd0, 16'h0100));     // $2 = &v[k]
    p.push_back(enc_ori(5'd3, 5'd0, 16'h1111));
    p.push_back(enc_ori(5'd4, 5'd0, 16'h2222));
    p.push_back(enc_sw(5'd3, 5'd2, 16'd0));          // v[k]   = 0x1111
    p.push_back(enc_sw(5'd4, 5'd2, 16'd4));          // v[k+1] = 0x2222
    p.push_back(enc_lw(5'd8, 5'd2, 16'd0));          // lw $t0, 0($2)
    p.push_back(enc_lw(5'd9, 5'd2, 16'd4));          // lw $t1, 4($2)
    p.push_back(enc_sw(5'd9, 5'd2, 16'd0));          // sw $t1, 0($2)
    p.push_back(enc_sw(5'd8, 5'd2, 16'd4));          // sw $t0, 4($2)
    p.push_back(enc_lw(5'd10, 5'd2, 16'd0));
    p.push_back(enc_lw(5'd11, 5'd2, 16'd4));
    halt = 32'(p.size() * 4);
    p.push_back(enc_j(halt));
    run(p, halt, 100, cycles, m);
    checks++;
    if (m.regs[10] !== 32'h2222 || m.regs[11] !== 32'h1111) fail("swap result");
    $display("swap: %0d cycles", cycles);

    // ---- 2. sum of 1..N with a backward jump ----
    begin
      static int unsigned N = 25;
      p = {};
      p.push_back(enc_ori(5'd1, 5'd0, 16'(N)));      // 0  r1 = N
      p.push_back(enc_ori(5'd2, 5'd0, 16'd0));       // 1  r2 = 0 (sum)
      p.push_back(enc_ori(5'd3, 5'd0, 16'd1));       // 2  r3 = 1
      p.push_back(enc_beq(5'd1, 5'd0, 16'd3));       // 3  loop: if r1 == 0 goto 7
      p.push_back(enc_add(5'd2, 5'd2, 5'd1));        // 4  sum += r1
      p.push_back(enc_sub(5'd1, 5'd1, 5'd3));        // 5  r1 -= 1
      p.push_back(enc_j(32'd12));                    // 6  goto loop
      p.push_back(enc_sw(5'd2, 5'd0, 16'd64));       // 7  mem[64] = sum
      p.push_back(enc_lw(5'd4, 5'd0, 16'd64));       // 8  r4 = mem[64]
      halt = 32'd36;
      p.push_back(enc_j(halt));                      // 9  halt
      run(p, halt, 1000, cycles, m);
      checks++;
      if (m.regs[4] !== 32'(N * (N + 1) / 2)) fail("sum result");
      checks++;
      if (cycles != int'(4 * N + 6)) fail($sformatf("sum took %0d cycles, expected %0d", cycles, 4 * N + 6));
      $display("sum: %0d cycles for N=%0d", cycles, N);
    end

    // ---- 3. random program ----
    p = gen_random(700, halt);
    run(p, halt, 5000, cycles, m);
    $display("random: %0d cycles, %0d instructions in program", cycles, p.size());

    // ---- every mechanism must have happened ----
    begin
      static string names [8] = '{"add", "sub", "ori", "lw", "sw", "beq", "j", "undecoded"};
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (n_kind[i] == 0) fail({"never executed ", names[i]});
        $display("  %-10s %0d", names[i], n_kind[i]);
      end
    end
    checks++; if (n_taken == 0)       fail("no taken branch");
    checks++; if (n_untaken == 0)     fail("no untaken branch");
    checks++; if (n_back_jump == 0)   fail("no backward jump");
    checks++; if (n_r0_write == 0)    fail("no write to r0");
    checks++; if (n_neg_off == 0)     fail("no negative offset");
    checks++; if (n_ori_hi == 0)      fail("no ori with imm[15] set");
    checks++; if (n_load_stored == 0) fail("no load of stored data");
    $display("taken=%0d untaken=%0d back_jump=%0d r0_write=%0d neg_off=%0d ori_hi=%0d load_stored=%0d",
             n_taken, n_untaken, n_back_jump, n_r0_write, n_neg_off, n_ori_hi, n_load_stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
