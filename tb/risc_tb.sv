// risc_tb: end-to-end test of the processor with its memory, at the default
// sizes (32-bit, 32 registers, 256-word memory, one-cycle memory latency).
//
// Part 1 runs the block-copy program that goes with the design: it builds
// its pointers with LODI, ADD, SHL and DEC, then loops LOAD / STORE /
// conditional indirect branch / INC / INC / BRANCHI, copying words 10H-1BH
// to 20H onwards; when the source pointer passes the end it jumps through R5
// back to address 0 and the program starts over. The testbench waits for
// that restart, checks the copied words and that the loop ran 12 times, and
// lets the copy repeat once more.
// Part 2 runs a program using all 32 opcodes (taken and untaken branches in
// both forms) and compares registers and memory with the reference model.
// Mechanisms counted, each of which must happen at least once: memory wait
// cycles, reads, writes, instruction fetches of all 32 opcodes, two-word
// immediates, direct branches taken and skipped, register-indirect branches
// taken and not taken, the unconditional jumps, the reset sequence clearing
// the PC, and the program's restart at address 0.
// Part 3 reloads the block copy, resets only the processor (CPU_RESET) in
// the middle of a pass, and checks that it restarts at address 0, that the
// memory keeps the program, and that the copy still completes.
module risc_tb;
  import risc_asm_pkg::*;

  logic clk = 0, reset, cpu_reset, prog_we;
  logic [31:0] prog_addr, prog_wdata, addr, data;
  logic vma, rw, ready;
  int checks = 0, failures = 0;

  risc dut (.clk(clk), .reset(reset), .prog_we(prog_we), .prog_addr(prog_addr),
            .prog_wdata(prog_wdata), .cpu_reset(cpu_reset), .addr(addr), .vma(vma), .rw(rw), .ready(ready),
            .data(data));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters
  int n_wait, n_read, n_write, n_fetch, n_lodi, n_dir_taken, n_dir_skip, n_ind_taken,
      n_ind_not, n_branch, n_branchi, n_pc_reset, n_restart, n_cpu_reset;
  int op_seen [32];
  logic [4:0] last_op;
  bit ind_jumped;

  function automatic bit is_ind_cond(logic [4:0] op);
    return op inside {BRANCHGT, BRANCHGTE, BRANCHLT, BRANCHLTE, BRANCHEQ, BRANCHNEQ};
  endfunction

  always @(posedge clk) if (!reset && !cpu_reset) begin
    if (vma && !ready) n_wait++;
    if (vma && ready && !rw) n_read++;
    if (vma && ready && rw) n_write++;
    if (dut.cpu1.ctl.outregrd && dut.cpu1.ctl.pcwr && data == 0 && n_fetch == 0) n_pc_reset++;
    if (dut.cpu1.ctl.instrwr) begin
      if (is_ind_cond(last_op) && !ind_jumped && n_fetch > 0) n_ind_not++;
      n_fetch++;
      last_op = data[31:27];
      op_seen[data[31:27]]++;
      ind_jumped = 0;
      if (data[31:27] == LODI) n_lodi++;
      if (addr == 0 && n_fetch > 1) n_restart++;
    end
    if (dut.cpu1.ctl.pcwr && dut.cpu1.ctl.regrd) begin
      if (is_ind_cond(last_op)) begin n_ind_taken++; ind_jumped = 1; end
      else n_branch++;
    end
    if (dut.cpu1.ctl.pcwr && vma && ready) begin
      if (last_op == BRANCHI) n_branchi++; else n_dir_taken++;
    end
    if (dut.cpu1.ctl.pcrd && dut.cpu1.ctl.opregwr && !dut.cpu1.ctl.addrregwr) n_dir_skip++;
  end

  logic [31:0] image [256];
  logic [31:0] prog [$];
  logic [31:0] block_prog [$];

  task automatic load_and_reset();
    reset = 1; prog_we = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 256; i++) begin
      prog_we = 1; prog_addr = i; prog_wdata = image[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1 reset = 0;
  endtask

  // ---- part 1: block copy program
  task automatic block_copy();
    int cyc, loops, first_restart_cycle;
    prog = '{
      enc(LODI, 0, 0, 1), 32'h08,          // 0  starting address of the block
      enc(ADD, 1, 1, 1),                   // 2  R1 + R1 -> R1 = 10H
      enc(LODI, 0, 0, 5), 32'h00,          // 3  program start address
      enc(LODI, 0, 0, 2), 32'h10,          // 5  destination base
      enc(SHL, 0, 2, 2),                   // 7  R2 = 20H
      enc(LODI, 0, 0, 6), 32'h1B,          // 8  last address of the block
      enc(DEC, 0, 0, 6),                   // 10 R6 = 1AH
      enc(LOAD, 0, 1, 4),                  // 11 YY: R4 <- mem[R1]
      enc(STORE, 0, 2, 4),                 // 12 mem[R2] <- R4
      enc(BRANCHGT, 5, 1, 6),              // 13 if R1 > R6 jump to R5
      enc(INC, 0, 0, 1),                   // 14
      enc(INC, 0, 0, 2),                   // 15
      enc(BRANCHI), 32'd11                 // 16 back to YY
    };
    block_prog = prog;
    for (int i = 0; i < 256; i++) image[i] = 32'h0;
    foreach (prog[i]) image[i] = prog[i];
    for (int i = 32'h12; i <= 32'h1B; i++) image[i] = $urandom;
    load_and_reset();
    cyc = 0; loops = 0; first_restart_cycle = 0;
    while (n_restart < 2 && cyc < 20000) begin
      @(posedge clk); #1; cyc++;
      if (dut.cpu1.ctl.instrwr && addr == 11) loops++;
      if (n_restart == 1 && first_restart_cycle == 0) first_restart_cycle = cyc;
    end
    checks++;
    if (n_restart < 2) begin failures++; $display("FAIL block copy did not restart twice"); end
    checks++;
    if (loops != 24) begin failures++; $display("FAIL copy loop ran %0d times over two passes, expected 24", loops); end
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (dut.mem1.mem[32'h20 + i] !== image[32'h10 + i]) begin
        failures++;
        $display("FAIL mem[%0h] = %h, expected %h", 32'h20 + i, dut.mem1.mem[32'h20 + i], image[32'h10 + i]);
      end
    end
    checks++;
    if (dut.mem1.mem[32'h2C] !== 32'h0) begin failures++; $display("FAIL copy ran past 2BH"); end
    // per-instruction cycles at memory latency 1: reset 2; LODI 10, ADD/SHL/DEC/INC 8,
    // LOAD/STORE/BRANCHI 9, register-indirect branch 7 not taken / 8 taken; set-up
    // 64, 11 loop passes of 50, last pass 26, then 4 cycles to fetch address 0 again
    checks++;
    if (first_restart_cycle != 2 + 64 + 11 * 50 + 26 + 4) begin
      failures++; $display("FAIL one pass took %0d cycles, expected 646", first_restart_cycle);
    end
    $display("block copy: one pass of the program takes %0d cycles", first_restart_cycle);
  endtask

  // ---- part 2: all opcodes, checked against the reference model
  task automatic all_opcodes();
    logic [4:0] dconds [6] = '{BRANCHGTI, BRANCHGTEI, BRANCHLTI, BRANCHLTEI, BRANCHEQI, BRANCHNEQI};
    logic [4:0] iconds [6] = '{BRANCHGT, BRANCHGTE, BRANCHLT, BRANCHLTE, BRANCHEQ, BRANCHNEQ};
    int target, halt, cyc;
    iss_t s;
    prog.delete();
    prog.push_back(enc(LODI, 0, 0, 1)); prog.push_back(32'd200);
    prog.push_back(enc(LODI, 0, 0, 2)); prog.push_back(32'h8000_0005);
    prog.push_back(enc(LODI, 0, 0, 3)); prog.push_back(32'd7);
    prog.push_back(enc(LOAD, 0, 1, 4));
    prog.push_back(enc(ADD, 2, 3, 5)); prog.push_back(enc(SUB, 3, 2, 6));
    prog.push_back(enc(AND_, 2, 4, 7)); prog.push_back(enc(OR_, 2, 3, 8));
    prog.push_back(enc(XOR_, 4, 2, 9)); prog.push_back(enc(MOVE, 0, 2, 10));
    prog.push_back(enc(NOT_, 0, 0, 10)); prog.push_back(enc(INC, 0, 0, 11));
    prog.push_back(enc(DEC, 0, 0, 12)); prog.push_back(enc(ZERO, 0, 0, 4));
    prog.push_back(enc(SHL, 0, 2, 14)); prog.push_back(enc(SHR, 0, 2, 15));
    prog.push_back(enc(ROTL, 0, 2, 16)); prog.push_back(enc(ROTR, 0, 2, 17));
    prog.push_back(enc(NOP)); prog.push_back(enc(STORE, 0, 1, 5));
    for (int c = 0; c < 6; c++) begin
      for (int k = 0; k < 3; k++) begin
        int a, b;
        a = (k == 1) ? 2 : 3; b = (k == 0) ? 2 : 3;
        target = prog.size() + 3;
        prog.push_back(enc(dconds[c], 0, a, b)); prog.push_back(32'(target));
        prog.push_back(enc(INC, 0, 0, 20 + c));
        target = prog.size() + 4;
        prog.push_back(enc(LODI, 0, 0, 29)); prog.push_back(32'(target));
        prog.push_back(enc(iconds[c], 29, a, b));
        prog.push_back(enc(INC, 0, 0, 26 + c % 3));
      end
    end
    target = prog.size() + 4;
    prog.push_back(enc(LODI, 0, 0, 29)); prog.push_back(32'(target));
    prog.push_back(enc(BRANCH, 0, 0, 29));
    prog.push_back(enc(INC, 0, 0, 30));
    prog.push_back(enc(INC, 0, 0, 1));
    prog.push_back(enc(STORE, 0, 1, 10));
    halt = prog.size();
    prog.push_back(enc(BRANCHI)); prog.push_back(32'(halt));
    for (int i = 0; i < 256; i++) image[i] = (i >= 192) ? 32'hC0DE_0000 + 32'(i) : 32'h0;
    foreach (prog[i]) image[i] = prog[i];
    s.m = new[256];
    for (int i = 0; i < 256; i++) s.m[i] = image[i];
    for (int i = 0; i < 32; i++) s.r[i] = 0;
    s.pc = 0; s.executed = 0; s.taken = 0; s.not_taken = 0;
    iss_run(s, 32'(halt), 10000);
    load_and_reset();
    cyc = 0;
    while (!(dut.cpu1.ctl.instrwr && addr == halt) && cyc < 50000) begin
      @(posedge clk); #1; cyc++;
    end
    repeat (2) @(posedge clk); #1;
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (dut.cpu1.u_regarray.regs[i] !== s.r[i]) begin
        failures++; $display("FAIL R%0d = %h, expected %h", i, dut.cpu1.u_regarray.regs[i], s.r[i]);
      end
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (dut.mem1.mem[i] !== s.m[i]) begin
        failures++; $display("FAIL mem[%0d] = %h, expected %h", i, dut.mem1.mem[i], s.m[i]);
      end
    end
    $display("all opcodes: %0d instructions in %0d cycles", s.executed, cyc);
  endtask

  // ---- part 3: processor-only reset in the middle of the block copy
  task automatic cpu_reset_midway();
    logic [31:0] first_addr;
    foreach (image[i]) image[i] = 32'h0;
    foreach (prog[i]) image[i] = prog[i];
    for (int i = 32'h12; i <= 32'h1B; i++) image[i] = $urandom;
    load_and_reset();
    repeat (300) @(posedge clk);
    #1 cpu_reset = 1;
    repeat (3) @(posedge clk);
    #1 cpu_reset = 0;
    while (!dut.cpu1.ctl.instrwr) begin @(posedge clk); #1; end
    first_addr = addr;
    checks++;
    if (first_addr != 0) begin failures++; $display("FAIL after CPU reset first fetch at %0d", first_addr); end
    else n_cpu_reset++;
    repeat (1400) @(posedge clk);
    #1;
    for (int i = 0; i < 18; i++) begin
      checks++;
      if (dut.mem1.mem[i] !== image[i]) begin failures++; $display("FAIL program word %0d changed", i); end
    end
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (dut.mem1.mem[32'h20 + i] !== image[32'h10 + i]) begin
        failures++; $display("FAIL after CPU reset mem[%0h] = %h", 32'h20 + i, dut.mem1.mem[32'h20 + i]);
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    int distinct;
    reset = 1; cpu_reset = 0; prog_we = 0; prog_addr = 0; prog_wdata = 0; last_op = 0; ind_jumped = 0;
    {n_wait, n_read, n_write, n_fetch, n_lodi, n_dir_taken, n_dir_skip, n_ind_taken,
     n_ind_not, n_branch, n_branchi, n_pc_reset, n_restart, n_cpu_reset} = '0;
    foreach (op_seen[i]) op_seen[i] = 0;
    block_copy();
    n_fetch = 0;
    all_opcodes();
    prog = block_prog;
    cpu_reset_midway();
    distinct = 0;
    foreach (op_seen[i]) if (op_seen[i] > 0) distinct++;
    $display("mechanisms:");
    need("memory wait cycles", n_wait);
    need("memory reads", n_read);
    need("memory writes", n_write);
    need("two-word immediates (LODI)", n_lodi);
    need("direct branches taken", n_dir_taken);
    need("direct branches skipped", n_dir_skip);
    need("indirect branches taken", n_ind_taken);
    need("indirect branches not taken", n_ind_not);
    need("BRANCH (register)", n_branch);
    need("BRANCHI", n_branchi);
    need("PC cleared by reset sequence", n_pc_reset);
    need("program restart at address 0", n_restart);
    need("processor-only reset restarts at 0", n_cpu_reset);
    checks++;
    $display("  %-34s %0d of 32", "distinct opcodes executed", distinct);
    if (distinct != 32) begin failures++; $display("FAIL not all opcodes executed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
