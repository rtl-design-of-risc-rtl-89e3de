// risc_asm_pkg: test-side assembler and instruction-set reference model for
// the 32-bit bus-based RISC processor.
//
// The encoders build instruction words from the published opcode table
// (opcode in bits [31:27]; register fields [14:10], [9:5], [4:0]); opcode
// numbers are written out here again rather than taken from the design's
// package, so that a wrong code in the design is caught. The reference
// model executes a program held in an array, one instruction at a time, with
// the architectural meaning of each instruction, and reports the final
// registers, memory and the number of instructions run.
package risc_asm_pkg;

  // opcodes
  localparam logic [4:0] NOP = 5'b00000, LOAD = 5'b00001, STORE = 5'b00010, MOVE = 5'b00011,
    LODI = 5'b00100, BRANCHI = 5'b00101, BRANCHGTI = 5'b00110, INC = 5'b00111, DEC = 5'b01000,
    AND_ = 5'b01001, OR_ = 5'b01010, XOR_ = 5'b01011, NOT_ = 5'b01100, ADD = 5'b01101,
    SUB = 5'b01110, ZERO = 5'b01111, BRANCHLTI = 5'b10000, BRANCHLT = 5'b10001,
    BRANCHNEQ = 5'b10010, BRANCHNEQI = 5'b10011, BRANCHGT = 5'b10100, BRANCH = 5'b10101,
    BRANCHEQ = 5'b10110, BRANCHEQI = 5'b10111, BRANCHLTEI = 5'b11000, BRANCHLTE = 5'b11001,
    SHL = 5'b11010, SHR = 5'b11011, ROTR = 5'b11100, ROTL = 5'b11101, BRANCHGTEI = 5'b11110,
    BRANCHGTE = 5'b11111;

  function automatic logic [31:0] enc(logic [4:0] op, int hi = 0, int mid = 0, int lo = 0);
    return {op, 12'd0, 5'(hi), 5'(mid), 5'(lo)};
  endfunction

  function automatic bit is_two_word(logic [4:0] op);
    return op inside {LODI, BRANCHI, BRANCHGTI, BRANCHGTEI, BRANCHLTI, BRANCHLTEI,
                      BRANCHEQI, BRANCHNEQI};
  endfunction

  function automatic bit cond_true(logic [4:0] op, logic [31:0] x, logic [31:0] y);
    case (op)
      BRANCHGT, BRANCHGTI:   return x > y;
      BRANCHGTE, BRANCHGTEI: return x >= y;
      BRANCHLT, BRANCHLTI:   return x < y;
      BRANCHLTE, BRANCHLTEI: return x <= y;
      BRANCHEQ, BRANCHEQI:   return x == y;
      default:               return x != y;
    endcase
  endfunction

  typedef struct {
    logic [31:0] r [32];
    logic [31:0] m [];
    logic [31:0] pc;
    int          executed;
    int          taken;
    int          not_taken;
  } iss_t;

  // run from pc until pc == stop_pc or max_steps instructions
  function automatic void iss_run(ref iss_t s, input logic [31:0] stop_pc, input int max_steps);
    int words;
    words = s.m.size();
    for (int step = 0; step < max_steps && s.pc != stop_pc; step++) begin
      logic [31:0] w, w2, x, y;
      logic [4:0]  op;
      int hi, mid, lo;
      w   = s.m[s.pc % words];
      w2  = s.m[(s.pc + 1) % words];
      op  = w[31:27];
      hi  = int'(w[14:10]); mid = int'(w[9:5]); lo = int'(w[4:0]);
      s.pc = s.pc + 1;
      s.executed++;
      case (op)
        NOP:   ;
        LOAD:  s.r[lo] = s.m[s.r[mid] % words];
        STORE: s.m[s.r[mid] % words] = s.r[lo];
        MOVE:  s.r[lo] = s.r[mid];
        LODI:  begin s.r[lo] = w2; s.pc++; end
        ZERO:  s.r[lo] = 0;
        INC:   s.r[lo] = s.r[lo] + 1;
        DEC:   s.r[lo] = s.r[lo] - 1;
        NOT_:  s.r[lo] = ~s.r[lo];
        ADD:   s.r[lo] = s.r[hi] + s.r[mid];
        SUB:   s.r[lo] = s.r[hi] - s.r[mid];
        AND_:  s.r[lo] = s.r[hi] & s.r[mid];
        OR_:   s.r[lo] = s.r[hi] | s.r[mid];
        XOR_:  s.r[lo] = s.r[hi] ^ s.r[mid];
        SHL:   s.r[lo] = s.r[mid] << 1;
        SHR:   s.r[lo] = s.r[mid] >> 1;
        ROTL:  s.r[lo] = {s.r[mid][30:0], s.r[mid][31]};
        ROTR:  s.r[lo] = {s.r[mid][0], s.r[mid][31:1]};
        BRANCHI: s.pc = w2;
        BRANCH:  s.pc = s.r[lo];
        default: begin   // conditional branches
          x = s.r[mid]; y = s.r[lo];
          if (is_two_word(op)) begin
            if (cond_true(op, x, y)) begin s.pc = w2; s.taken++; end
            else begin s.pc++; s.not_taken++; end
          end else begin
            if (cond_true(op, x, y)) begin s.pc = s.r[hi]; s.taken++; end
            else s.not_taken++;
          end
        end
      endcase
    end
  endfunction

endpackage
