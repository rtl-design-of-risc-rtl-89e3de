// cpu_tb: self-checking test of the processor against an instruction-set
// reference model.
//
// A behavioural memory in this testbench answers VMA with READY after a
// random 1-4 cycle wait. The processor runs (1) a directed program that uses
// all 32 opcodes, including taken and untaken branches of every condition in
// both the direct and the register-indirect form, and (2) twelve random
// programs of register, shift, load/store, immediate and forward-branch
// instructions. Each program ends in a jump-to-itself; when the processor
// fetches that jump, its 32 registers, the data memory and the number of
// instructions fetched are compared with the reference model's.
module cpu_tb;
  import risc_asm_pkg::*;

  localparam int WORDS = 512;
  localparam int DATA0 = 256;

  logic clk = 0, reset;
  logic [31:0] addr, data_out, data_in;
  logic vma, rw, ready;
  int checks = 0, failures = 0;

  cpu #(.DATA_W(32), .NREGS(32)) dut (
    .clk(clk), .reset(reset), .addr(addr), .vma(vma), .rw(rw),
    .data_out(data_out), .data_in(data_in), .ready(ready));

  always #5 clk = ~clk;

  // ---- behavioural memory with random wait
  logic [31:0] mem [WORDS];
  int wait_left;
  logic busy;
  always_ff @(posedge clk) begin
    if (reset || !vma) begin
      ready <= 0; busy <= 0; wait_left <= 1 + $urandom % 4;
    end else if (!busy) begin
      if (wait_left == 0) begin
        ready <= 1; busy <= 1;
        if (rw) mem[addr % WORDS] <= data_out;
        else    data_in <= mem[addr % WORDS];
      end else wait_left <= wait_left - 1;
    end else ready <= 0;
  end

  // ---- program builder
  logic [31:0] prog [$];
  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction

  // ---- run one loaded program and compare with the reference model
  int fetches;
  always @(posedge clk) if (!reset && dut.ctl.instrwr) fetches++;

  task automatic run_and_compare(string name, logic [31:0] halt_pc);
    iss_t s;
    int cyc;
    s.m = new[WORDS];
    for (int i = 0; i < WORDS; i++) s.m[i] = mem[i];
    for (int i = 0; i < 32; i++) s.r[i] = 0;
    s.pc = 0; s.executed = 0; s.taken = 0; s.not_taken = 0;
    iss_run(s, halt_pc, 100000);
    reset = 1; repeat (2) @(posedge clk); #1 reset = 0;
    fetches = 0;
    cyc = 0;
    while (!(dut.ctl.instrwr && addr == halt_pc) && cyc < 200000) begin
      @(posedge clk); #1; cyc++;
    end
    repeat (2) @(posedge clk); #1;
    checks++;
    if (fetches != s.executed + 1) begin
      failures++; $display("FAIL %s: %0d instructions fetched, reference ran %0d", name, fetches - 1, s.executed);
    end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (dut.u_regarray.regs[i] !== s.r[i]) begin
        failures++; $display("FAIL %s: R%0d = %h, expected %h", name, i, dut.u_regarray.regs[i], s.r[i]);
      end
    end
    for (int i = DATA0; i < WORDS; i++) begin
      checks++;
      if (mem[i] !== s.m[i]) begin
        failures++; $display("FAIL %s: mem[%0d] = %h, expected %h", name, i, mem[i], s.m[i]);
      end
    end
    $display("%s: %0d instructions, %0d taken / %0d untaken branches, %0d cycles",
             name, s.executed, s.taken, s.not_taken, cyc);
    if (s.taken == 0 || s.not_taken == 0) begin
      failures++; $display("FAIL %s: branches not exercised both ways", name);
    end
  endtask

  task automatic load_prog();
    for (int i = 0; i < WORDS; i++) mem[i] = (i >= DATA0) ? 32'hD000_0000 + 32'(i) : 32'h0;
    foreach (prog[i]) mem[i] = prog[i];
  endtask

  // directed: all opcodes, each condition taken and not taken, both forms
  task automatic directed();
    logic [4:0] dconds [6] = '{BRANCHGTI, BRANCHGTEI, BRANCHLTI, BRANCHLTEI, BRANCHEQI, BRANCHNEQI};
    logic [4:0] iconds [6] = '{BRANCHGT, BRANCHGTE, BRANCHLT, BRANCHLTE, BRANCHEQ, BRANCHNEQ};
    int target;
    prog.delete();
    emit(enc(LODI, 0, 0, 1)); emit(32'd300);           // R1 = 300 (data pointer)
    emit(enc(LODI, 0, 0, 2)); emit(32'h8000_0005);     // R2
    emit(enc(LODI, 0, 0, 3)); emit(32'd7);             // R3
    emit(enc(LOAD, 0, 1, 4));                          // R4 = mem[300]
    emit(enc(ADD, 2, 3, 5)); emit(enc(SUB, 3, 2, 6));
    emit(enc(AND_, 2, 4, 7)); emit(enc(OR_, 2, 3, 8)); emit(enc(XOR_, 4, 2, 9));
    emit(enc(MOVE, 0, 2, 10)); emit(enc(NOT_, 0, 0, 10));
    emit(enc(MOVE, 0, 3, 11)); emit(enc(INC, 0, 0, 11));
    emit(enc(MOVE, 0, 3, 12)); emit(enc(DEC, 0, 0, 12));
    emit(enc(MOVE, 0, 4, 13)); emit(enc(ZERO, 0, 0, 13));
    emit(enc(SHL, 0, 2, 14)); emit(enc(SHR, 0, 2, 15));
    emit(enc(ROTL, 0, 2, 16)); emit(enc(ROTR, 0, 2, 17));
    emit(enc(NOP));
    emit(enc(INC, 0, 0, 1));
    emit(enc(STORE, 0, 1, 5));                         // mem[301] = R5
    // each condition: R3 vs R2, R2 vs R3, R3 vs R3 -> covers true and false
    for (int c = 0; c < 6; c++) begin
      for (int k = 0; k < 3; k++) begin
        int a, b;
        a = (k == 1) ? 2 : 3; b = (k == 0) ? 2 : 3;
        target = prog.size() + 4;                      // over the INC below
        emit(enc(dconds[c], 0, a, b)); emit(32'(target));
        emit(enc(INC, 0, 0, 20 + c));                  // counts untaken
        emit(enc(NOP));
        target = prog.size() + 4;
        emit(enc(LODI, 0, 0, 29)); emit(32'(target));
        emit(enc(iconds[c], 29, a, b));
        emit(enc(INC, 0, 0, 26 + c % 3));              // counts untaken
      end
    end
    target = prog.size() + 5;
    emit(enc(LODI, 0, 0, 29)); emit(32'(target));
    emit(enc(BRANCH, 0, 0, 29));
    emit(enc(INC, 0, 0, 30));                          // skipped
    emit(enc(INC, 0, 0, 30));                          // skipped
    emit(enc(BRANCHI)); emit(32'(prog.size() + 3));
    emit(enc(INC, 0, 0, 30));                          // skipped
    emit(enc(INC, 0, 0, 1));
    emit(enc(STORE, 0, 1, 10));
    emit(enc(BRANCHI)); emit(32'(prog.size() - 1));    // halt: jump to itself
    load_prog();
    run_and_compare("directed", 32'(prog.size() - 2));
  endtask

  // random program; R30/R31 hold data pointers, R29 holds jump targets
  task automatic random_prog(int n);
    logic [4:0] alu_ops [14] = '{ADD, SUB, AND_, OR_, XOR_, NOT_, INC, DEC, ZERO,
                                 MOVE, SHL, SHR, ROTL, ROTR};
    logic [4:0] dconds [6] = '{BRANCHGTI, BRANCHGTEI, BRANCHLTI, BRANCHLTEI, BRANCHEQI, BRANCHNEQI};
    logic [4:0] iconds [6] = '{BRANCHGT, BRANCHGTE, BRANCHLT, BRANCHLTE, BRANCHEQ, BRANCHNEQ};
    int fix_at [$];     // positions of target words to fill
    int fix_skip [$];   // how many instructions forward
    int starts [$];     // address of each instruction
    prog.delete();
    for (int r = 0; r < 29; r++) begin
      emit(enc(LODI, 0, 0, r)); emit((r % 4 == 0) ? 32'($urandom % 8) : $urandom);
    end
    emit(enc(LODI, 0, 0, 30)); emit(32'(DATA0 + $urandom % 256));
    emit(enc(LODI, 0, 0, 31)); emit(32'(DATA0 + $urandom % 256));
    for (int i = 0; i < n; i++) begin
      int kind, d, a, b;
      kind = $urandom % 10;
      d = $urandom % 29; a = $urandom % 29; b = $urandom % 29;
      starts.push_back(prog.size());
      case (kind)
        0, 1, 2, 3: emit(enc(alu_ops[$urandom % 14], a, b, d));
        4: emit(enc(LOAD, 0, 30 + $urandom % 2, d));
        5: emit(enc(STORE, 0, 30 + $urandom % 2, a));
        6: begin emit(enc(LODI, 0, 0, 30 + $urandom % 2)); emit(32'(DATA0 + $urandom % 256)); end
        7: begin
             emit(enc(dconds[$urandom % 6], 0, a, b));
             fix_at.push_back(prog.size()); fix_skip.push_back(1 + $urandom % 3); emit(0);
           end
        8: begin
             emit(enc(LODI, 0, 0, 29));
             fix_at.push_back(prog.size()); fix_skip.push_back(1 + $urandom % 3); emit(0);
             emit(enc(iconds[$urandom % 6], 29, a, b));
           end
        default: emit(enc(NOP));
      endcase
    end
    starts.push_back(prog.size());
    emit(enc(BRANCHI)); emit(32'(prog.size() - 1));   // halt
    // fill forward targets: start of the instruction 'skip' ahead, capped at halt
    foreach (fix_at[k]) begin
      int idx;
      idx = 0;
      while (idx < starts.size() - 1 && starts[idx] <= fix_at[k]) idx++;
      idx = idx + fix_skip[k] - 1;
      if (idx > starts.size() - 1) idx = starts.size() - 1;
      prog[fix_at[k]] = 32'(starts[idx]);
    end
    load_prog();
    run_and_compare($sformatf("random %0d", n), 32'(starts[starts.size() - 1]));
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1;
    repeat (3) @(posedge clk);
    directed();
    for (int p = 0; p < 12; p++) random_prog(40 + 10 * p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
