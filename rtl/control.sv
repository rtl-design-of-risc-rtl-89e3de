// control: instruction decoder and control logic, a state machine. Its next
// state depends on the state, the opcode, READY and COMPOUT; the outputs
// depend on the state and opcode, and the writes that take memory data (and
// the taken-branch PC write) also on READY.
//
// Every instruction starts with the same fetch: the PC is put on the data
// bus and copied into the address register and the operand register (F1);
// VMA is raised for a read while the ALU increments the operand register into
// the output register, and when READY comes the memory word is written into
// the instruction register (F2); the incremented value is copied back into
// the PC (F3), which is also where the opcode in bits [31:27] is decoded.
// Execution then moves values over the single data bus one step per clock:
//   ALU ops     first source -> operand register; ALU (operand register, bus
//               = second source) -> shifter -> output register; output
//               register -> destination register (three cycles)
//   LOAD/STORE  address register <- address register field; memory access
//   LODI/BRANCHI/direct branches  second word fetched at PC, PC incremented
//   conditional compare the two registers (operand register vs. bus) and
//               take or skip the branch according to COMPOUT
// The fetch and the operand-register/output-register data path follow the
// report's description; the exact states, the field positions of the
// registers ([14:10], [9:5], [4:0]) and the reset sequence (PC cleared through
// the ALU "zero" function) are own choices. Timing with a memory of latency
// L: fetch takes L+4 cycles, register instructions three more, LOAD/STORE
// L+3 more. Synchronous active-high reset. Instruction bits [26:15] carry
// nothing in this instruction set and are left unused.
module control
  import risc_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] instr,
  input  logic        compout,
  input  logic        ready,
  output ctrl_t       ctl
);

  typedef enum logic [4:0] {
    S_RST0, S_RST1,
    S_F1, S_F2, S_F3,
    S_A1, S_A2, S_A3,
    S_LD1, S_LD2,
    S_ST1, S_ST2,
    S_IM1, S_IM2, S_IM3,
    S_SK1, S_SK2,
    S_C1, S_C2, S_CJ
  } state_e;

  state_e state, next;

  opcode_e     opc;
  logic [4:0]  f_hi, f_mid, f_lo;   // register fields [14:10], [9:5], [4:0]

  assign opc   = opcode_e'(instr[31:27]);
  assign f_hi  = instr[14:10];
  assign f_mid = instr[9:5];
  assign f_lo  = instr[4:0];

  // instruction classes
  logic is_binary, is_unary, is_shift, is_cond, is_direct;

  always_comb begin
    is_binary = opc inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR};
    is_unary  = opc inside {OP_INC, OP_DEC, OP_NOT, OP_ZERO};
    is_shift  = opc inside {OP_SHL, OP_SHR, OP_ROTL, OP_ROTR};
    is_direct = opc inside {OP_BRANCHGTI, OP_BRANCHGTEI, OP_BRANCHLTI,
                            OP_BRANCHLTEI, OP_BRANCHEQI, OP_BRANCHNEQI};
    is_cond   = is_direct ||
                (opc inside {OP_BRANCHGT, OP_BRANCHGTE, OP_BRANCHLT,
                             OP_BRANCHLTE, OP_BRANCHEQ, OP_BRANCHNEQ});
  end

  function automatic alu_op_e alu_of(opcode_e o);
    unique case (o)
      OP_ADD:  return ALU_ADD;
      OP_SUB:  return ALU_SUB;
      OP_AND:  return ALU_AND;
      OP_OR:   return ALU_OR;
      OP_XOR:  return ALU_XOR;
      OP_NOT:  return ALU_NOT;
      OP_INC:  return ALU_INC;
      OP_DEC:  return ALU_DEC;
      OP_ZERO: return ALU_ZERO;
      default: return ALU_PASS;   // MOVE and shifts
    endcase
  endfunction

  function automatic shift_op_e shift_of(opcode_e o);
    unique case (o)
      OP_SHL:  return SH_SHL;
      OP_SHR:  return SH_SHR;
      OP_ROTL: return SH_ROTL;
      OP_ROTR: return SH_ROTR;
      default: return SH_PASS;
    endcase
  endfunction

  function automatic comp_op_e comp_of(opcode_e o);
    unique case (o)
      OP_BRANCHGT,  OP_BRANCHGTI:  return CMP_GT;
      OP_BRANCHGTE, OP_BRANCHGTEI: return CMP_GTE;
      OP_BRANCHLT,  OP_BRANCHLTI:  return CMP_LT;
      OP_BRANCHLTE, OP_BRANCHLTEI: return CMP_LTE;
      OP_BRANCHNEQ, OP_BRANCHNEQI: return CMP_NEQ;
      default:                     return CMP_EQ;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (reset) state <= S_RST0;
    else       state <= next;
  end

  always_comb begin
    ctl          = '0;
    ctl.alusel   = ALU_PASS;
    ctl.shiftsel = SH_PASS;
    ctl.compsel  = CMP_EQ;
    next         = state;

    unique case (state)
      // ---- reset: PC <= 0 through ALU "zero" and the output register
      S_RST0: begin
        ctl.alusel   = ALU_ZERO;
        ctl.outregwr = 1'b1;
        next         = S_RST1;
      end
      S_RST1: begin
        ctl.outregrd = 1'b1;
        ctl.pcwr     = 1'b1;
        next         = S_F1;
      end

      // ---- instruction fetch
      S_F1: begin
        ctl.pcrd      = 1'b1;
        ctl.addrregwr = 1'b1;
        ctl.opregwr   = 1'b1;
        next          = S_F2;
      end
      S_F2: begin
        ctl.vma      = 1'b1;
        ctl.opregrd  = 1'b1;
        ctl.alusel   = ALU_INC;
        ctl.outregwr = 1'b1;
        if (ready) begin
          ctl.instrwr = 1'b1;
          next        = S_F3;
        end
      end
      S_F3: begin   // PC <= PC + 1, decode
        ctl.outregrd = 1'b1;
        ctl.pcwr     = 1'b1;
        if (is_binary || is_unary || is_shift || opc == OP_MOVE) next = S_A1;
        else if (opc == OP_LOAD)                                 next = S_LD1;
        else if (opc == OP_STORE)                                next = S_ST1;
        else if (opc == OP_LODI || opc == OP_BRANCHI)            next = S_IM1;
        else if (opc == OP_BRANCH)                               next = S_CJ;
        else if (is_cond)                                        next = S_C1;
        else                                                     next = S_F1;   // NOP
      end

      // ---- ALU, move and shift instructions
      S_A1: begin   // first source -> operand register
        ctl.regsel  = is_binary ? f_hi : (is_unary ? f_lo : f_mid);
        ctl.regrd   = 1'b1;
        ctl.opregwr = 1'b1;
        next        = S_A2;
      end
      S_A2: begin   // operation -> output register
        ctl.regsel   = f_mid;
        ctl.regrd    = is_binary;
        ctl.opregrd  = 1'b1;
        ctl.alusel   = alu_of(opc);
        ctl.shiftsel = shift_of(opc);
        ctl.outregwr = 1'b1;
        next         = S_A3;
      end
      S_A3: begin   // output register -> destination
        ctl.outregrd = 1'b1;
        ctl.regsel   = f_lo;
        ctl.regwr    = 1'b1;
        next         = S_F1;
      end

      // ---- LOAD: register[f_lo] <= memory[register[f_mid]]
      S_LD1: begin
        ctl.regsel    = f_mid;
        ctl.regrd     = 1'b1;
        ctl.addrregwr = 1'b1;
        next          = S_LD2;
      end
      S_LD2: begin
        ctl.vma    = 1'b1;
        ctl.regsel = f_lo;
        if (ready) begin
          ctl.regwr = 1'b1;
          next      = S_F1;
        end
      end

      // ---- STORE: memory[register[f_mid]] <= register[f_lo]
      S_ST1: begin
        ctl.regsel    = f_mid;
        ctl.regrd     = 1'b1;
        ctl.addrregwr = 1'b1;
        next          = S_ST2;
      end
      S_ST2: begin
        ctl.vma    = 1'b1;
        ctl.rw     = 1'b1;
        ctl.regsel = f_lo;
        ctl.regrd  = 1'b1;
        if (ready) next = S_F1;
      end

      // ---- second instruction word (LODI data or branch address)
      S_IM1: begin
        ctl.pcrd      = 1'b1;
        ctl.addrregwr = 1'b1;
        ctl.opregwr   = 1'b1;
        next          = S_IM2;
      end
      S_IM2: begin
        ctl.vma      = 1'b1;
        ctl.opregrd  = 1'b1;
        ctl.alusel   = ALU_INC;
        ctl.outregwr = 1'b1;
        ctl.regsel   = f_lo;
        if (ready) begin
          if (opc == OP_LODI) begin
            ctl.regwr = 1'b1;
            next      = S_IM3;
          end else begin   // taken branch: PC <= address word
            ctl.pcwr  = 1'b1;
            next      = S_F1;
          end
        end
      end
      S_IM3: begin   // PC <= PC + 1 (past the second word)
        ctl.outregrd = 1'b1;
        ctl.pcwr     = 1'b1;
        next         = S_F1;
      end

      // ---- untaken direct branch: skip the address word
      S_SK1: begin
        ctl.pcrd    = 1'b1;
        ctl.opregwr = 1'b1;
        next        = S_SK2;
      end
      S_SK2: begin
        ctl.opregrd  = 1'b1;
        ctl.alusel   = ALU_INC;
        ctl.outregwr = 1'b1;
        next         = S_IM3;
      end

      // ---- conditional branches: compare register[f_mid] with register[f_lo]
      S_C1: begin
        ctl.regsel  = f_mid;
        ctl.regrd   = 1'b1;
        ctl.opregwr = 1'b1;
        next        = S_C2;
      end
      S_C2: begin
        ctl.regsel  = f_lo;
        ctl.regrd   = 1'b1;
        ctl.opregrd = 1'b1;
        ctl.compsel = comp_of(opc);
        if (compout) next = is_direct ? S_IM1 : S_CJ;
        else         next = is_direct ? S_SK1 : S_F1;
      end

      // ---- register-indirect jump: PC <= register (f_hi for conditional)
      S_CJ: begin
        ctl.regsel = is_cond ? f_hi : f_lo;
        ctl.regrd  = 1'b1;
        ctl.pcwr   = 1'b1;
        next       = S_F1;
      end

      default: next = S_RST0;
    endcase
  end

endmodule
