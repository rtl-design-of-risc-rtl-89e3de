// control_tb: self-checking test of the instruction decoder's control
// sequences.
//
// The testbench stands in for the datapath: it plays the instruction
// register (loading the next word when the decoder raises its instruction
// write), answers VMA with READY after a random wait, and sets the
// comparator result. For reset, the fetch, and every instruction class
// (register ALU op, unary op, shift, move, LOAD, STORE, LODI, BRANCHI,
// BRANCH, NOP, direct and register-indirect conditional branches taken and
// not taken) it compares the control word of every clock with the expected
// register transfers. Fields that do not matter in a cycle (register select
// when no register is read or written, ALU and shift selects when the output
// register is not written) are masked. It also checks that VMA drops between
// accesses and that at most one bus driver is enabled.
module control_tb;
  import risc_pkg::*;
  import risc_asm_pkg::*;

  logic clk = 0, reset, compout, ready;
  logic [31:0] instr;
  ctrl_t ctl;
  int checks = 0, failures = 0;
  logic [31:0] next_instr;

  control dut (.clk(clk), .reset(reset), .instr(instr), .compout(compout),
               .ready(ready), .ctl(ctl));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t norm(ctrl_t c);
    ctrl_t n;
    n = c;
    if (!(c.regrd || c.regwr)) n.regsel = '0;
    if (!c.outregwr) begin n.alusel = ALU_PASS; n.shiftsel = SH_PASS; end
    if (!c.vma) n.rw = 1'b0;
    return n;
  endfunction

  function automatic ctrl_t cw(bit vma = 0, bit rw = 0, bit pcwr = 0, bit pcrd = 0,
                               bit addrregwr = 0, bit outregwr = 0, bit outregrd = 0,
                               bit opregwr = 0, bit opregrd = 0, bit instrwr = 0,
                               bit regwr = 0, bit regrd = 0, int regsel = 0,
                               alu_op_e alu = ALU_PASS, shift_op_e sh = SH_PASS,
                               comp_op_e cmp = CMP_EQ);
    ctrl_t c;
    c = '0;
    c.vma = vma; c.rw = rw; c.pcwr = pcwr; c.pcrd = pcrd; c.addrregwr = addrregwr;
    c.outregwr = outregwr; c.outregrd = outregrd; c.opregwr = opregwr; c.opregrd = opregrd;
    c.instrwr = instrwr; c.regwr = regwr; c.regrd = regrd; c.regsel = 5'(regsel);
    c.alusel = alu; c.shiftsel = sh; c.compsel = cmp;
    return norm(c);
  endfunction

  // one clock: apply inputs, compare, advance
  task automatic step(string what, ctrl_t exp, bit rdy = 0, bit cmp = 0);
    bit load_ir;
    @(negedge clk);
    ready = rdy; compout = cmp;
    #1;
    checks++;
    if (norm(ctl) !== exp) begin
      failures++;
      $display("FAIL %s: got %p", what, norm(ctl));
      $display("          expected %p", exp);
    end
    load_ir = ctl.instrwr;
    @(posedge clk);
    if (load_ir) instr = next_instr;
  endtask

  // memory access lasting a random number of wait cycles
  task automatic mem(string what, ctrl_t waiting, ctrl_t done);
    int k;
    k = $urandom % 4;
    for (int i = 0; i < k; i++) step({what, " wait"}, waiting);
    step({what, " ready"}, done, 1);
  endtask

  ctrl_t F1, F2w, F2d, F3, IM1, IM2w, IM3, SK1, SK2;

  task automatic fetch(logic [31:0] w);
    next_instr = w;
    step("F1", F1);
    mem("F2", F2w, F2d);
    step("F3", F3);
  endtask

  task automatic second_word(bit lodi, int rd);
    step("IM1", IM1);
    if (lodi) begin
      mem("IM2", IM2w, cw(.vma(1), .opregrd(1), .alu(ALU_INC), .outregwr(1), .regsel(rd), .regwr(1)));
      step("IM3", IM3);
    end else begin
      mem("IM2", IM2w, cw(.vma(1), .opregrd(1), .alu(ALU_INC), .outregwr(1), .pcwr(1)));
    end
  endtask

  // at most one data-bus driver, VMA low between accesses
  logic prev_ready;
  always @(posedge clk) begin
    if (!reset) begin
      if ($countones({ctl.regrd, ctl.pcrd, ctl.outregrd, ctl.vma && !ctl.rw && ready}) > 1) begin
        failures++; $display("FAIL two bus drivers");
      end
      if (prev_ready && ctl.vma && !ready) begin
        failures++; $display("FAIL VMA not released after READY");
      end
    end
    prev_ready <= ready && !reset;
  end

  initial begin
    automatic logic [4:0] dconds [6] = '{BRANCHGTI, BRANCHGTEI, BRANCHLTI, BRANCHLTEI, BRANCHEQI, BRANCHNEQI};
    automatic logic [4:0] iconds [6] = '{BRANCHGT, BRANCHGTE, BRANCHLT, BRANCHLTE, BRANCHEQ, BRANCHNEQ};
    automatic comp_op_e   cops   [6] = '{CMP_GT, CMP_GTE, CMP_LT, CMP_LTE, CMP_EQ, CMP_NEQ};
    automatic logic [4:0] binops [5] = '{ADD, SUB, AND_, OR_, XOR_};
    automatic alu_op_e    balu [5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR};
    automatic logic [4:0] uns  [4] = '{INC, DEC, NOT_, ZERO};
    automatic alu_op_e    ualu [4] = '{ALU_INC, ALU_DEC, ALU_NOT, ALU_ZERO};
    automatic logic [4:0] shs  [4] = '{SHL, SHR, ROTL, ROTR};
    automatic shift_op_e  shop [4] = '{SH_SHL, SH_SHR, SH_ROTL, SH_ROTR};

    F1   = cw(.pcrd(1), .addrregwr(1), .opregwr(1));
    F2w  = cw(.vma(1), .opregrd(1), .alu(ALU_INC), .outregwr(1));
    F2d  = cw(.vma(1), .opregrd(1), .alu(ALU_INC), .outregwr(1), .instrwr(1));
    F3   = cw(.outregrd(1), .pcwr(1));
    IM1  = cw(.pcrd(1), .addrregwr(1), .opregwr(1));
    IM2w = cw(.vma(1), .opregrd(1), .alu(ALU_INC), .outregwr(1));
    IM3  = cw(.outregrd(1), .pcwr(1));
    SK1  = cw(.pcrd(1), .opregwr(1));
    SK2  = cw(.opregrd(1), .alu(ALU_INC), .outregwr(1));

    reset = 1; ready = 0; compout = 0; instr = 0; prev_ready = 0;
    @(posedge clk); @(posedge clk);
    #1 reset = 0;
    step("RST0", cw(.alu(ALU_ZERO), .outregwr(1)));
    step("RST1", cw(.outregrd(1), .pcwr(1)));

    for (int i = 0; i < 5; i++) begin
      fetch(enc(binops[i], 1 + i, 2 + i, 3 + i));
      step("A1", cw(.regsel(1 + i), .regrd(1), .opregwr(1)));
      step("A2", cw(.regsel(2 + i), .regrd(1), .opregrd(1), .alu(balu[i]), .outregwr(1)));
      step("A3", cw(.outregrd(1), .regsel(3 + i), .regwr(1)));
    end
    for (int i = 0; i < 4; i++) begin
      fetch(enc(uns[i], 0, 0, 7 + i));
      step("U1", cw(.regsel(7 + i), .regrd(1), .opregwr(1)));
      step("U2", cw(.opregrd(1), .alu(ualu[i]), .outregwr(1)));
      step("U3", cw(.outregrd(1), .regsel(7 + i), .regwr(1)));
    end
    for (int i = 0; i < 4; i++) begin
      fetch(enc(shs[i], 0, 12 + i, 20 + i));
      step("H1", cw(.regsel(12 + i), .regrd(1), .opregwr(1)));
      step("H2", cw(.opregrd(1), .sh(shop[i]), .outregwr(1)));
      step("H3", cw(.outregrd(1), .regsel(20 + i), .regwr(1)));
    end
    fetch(enc(MOVE, 0, 30, 31));
    step("M1", cw(.regsel(30), .regrd(1), .opregwr(1)));
    step("M2", cw(.opregrd(1), .outregwr(1)));
    step("M3", cw(.outregrd(1), .regsel(31), .regwr(1)));

    fetch(enc(LOAD, 0, 1, 4));
    step("LD1", cw(.regsel(1), .regrd(1), .addrregwr(1)));
    mem("LD2", cw(.vma(1)), cw(.vma(1), .regsel(4), .regwr(1)));
    fetch(enc(STORE, 0, 2, 4));
    step("ST1", cw(.regsel(2), .regrd(1), .addrregwr(1)));
    mem("ST2", cw(.vma(1), .rw(1), .regsel(4), .regrd(1)), cw(.vma(1), .rw(1), .regsel(4), .regrd(1)));

    fetch(enc(LODI, 0, 0, 6));
    second_word(1, 6);
    fetch(enc(BRANCHI));
    second_word(0, 0);
    fetch(enc(BRANCH, 0, 0, 8));
    step("CJ", cw(.regsel(8), .regrd(1), .pcwr(1)));
    fetch(enc(NOP));

    for (int c = 0; c < 6; c++) begin
      for (int t = 0; t < 2; t++) begin
        fetch(enc(dconds[c], 0, 1, 6));
        step("C1", cw(.regsel(1), .regrd(1), .opregwr(1)));
        step("C2", cw(.regsel(6), .regrd(1), .opregrd(1), .cmp(cops[c])), 0, t[0]);
        if (t != 0) second_word(0, 0);
        else begin step("SK1", SK1); step("SK2", SK2); step("IM3", IM3); end
        fetch(enc(iconds[c], 9, 2, 3));
        step("C1", cw(.regsel(2), .regrd(1), .opregwr(1)));
        step("C2", cw(.regsel(3), .regrd(1), .opregrd(1), .cmp(cops[c])), 0, t[0]);
        if (t != 0) step("CJ", cw(.regsel(9), .regrd(1), .pcwr(1)));
      end
    end
    fetch(enc(NOP));
    step("F1 again", F1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
