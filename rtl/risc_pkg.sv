// risc_pkg: types and constants shared by the 32-bit bus-based RISC processor.
//
// Holds the 5-bit opcode map of the 32-instruction set, the 4-bit ALU
// function codes, the shift/rotate and comparison selects, the instruction
// field positions and the bundle of control signals the instruction decoder
// drives into the datapath. Opcode and ALU codes are the published ones; the
// shift select follows the order of the published shift table (confirmed by
// the shifter simulation), and the comparison select follows the order of the
// comparison table. The control bundle mirrors the decoder's published output
// list, without a separate address-register read enable.
package risc_pkg;

  localparam int unsigned REG_AW = 5;

  // 5-bit opcodes, instruction bits [31:27]
  typedef enum logic [4:0] {
    OP_NOP        = 5'b00000,
    OP_LOAD       = 5'b00001,
    OP_STORE      = 5'b00010,
    OP_MOVE       = 5'b00011,
    OP_LODI       = 5'b00100,
    OP_BRANCHI    = 5'b00101,
    OP_BRANCHGTI  = 5'b00110,
    OP_INC        = 5'b00111,
    OP_DEC        = 5'b01000,
    OP_AND        = 5'b01001,
    OP_OR         = 5'b01010,
    OP_XOR        = 5'b01011,
    OP_NOT        = 5'b01100,
    OP_ADD        = 5'b01101,
    OP_SUB        = 5'b01110,
    OP_ZERO       = 5'b01111,
    OP_BRANCHLTI  = 5'b10000,
    OP_BRANCHLT   = 5'b10001,
    OP_BRANCHNEQ  = 5'b10010,
    OP_BRANCHNEQI = 5'b10011,
    OP_BRANCHGT   = 5'b10100,
    OP_BRANCH     = 5'b10101,
    OP_BRANCHEQ   = 5'b10110,
    OP_BRANCHEQI  = 5'b10111,
    OP_BRANCHLTEI = 5'b11000,
    OP_BRANCHLTE  = 5'b11001,
    OP_SHL        = 5'b11010,
    OP_SHR        = 5'b11011,
    OP_ROTR       = 5'b11100,
    OP_ROTL       = 5'b11101,
    OP_BRANCHGTEI = 5'b11110,
    OP_BRANCHGTE  = 5'b11111
  } opcode_e;

  // ALU function select
  typedef enum logic [3:0] {
    ALU_PASS = 4'b0000,  // C <= A
    ALU_AND  = 4'b0001,  // C <= A and B
    ALU_OR   = 4'b0010,  // C <= A or B
    ALU_NOT  = 4'b0011,  // C <= not A
    ALU_XOR  = 4'b0100,  // C <= A xor B
    ALU_ADD  = 4'b0101,  // C <= A + B
    ALU_SUB  = 4'b0110,  // C <= A - B
    ALU_INC  = 4'b0111,  // C <= A + 1
    ALU_DEC  = 4'b1000,  // C <= A - 1
    ALU_ZERO = 4'b1001   // C <= 0
  } alu_op_e;

  // shift/rotate select (one-bit shifts)
  typedef enum logic [2:0] {
    SH_PASS = 3'd0,
    SH_SHL  = 3'd1,
    SH_SHR  = 3'd2,   // logical
    SH_SAR  = 3'd3,   // arithmetic
    SH_ROTL = 3'd4,
    SH_ROTR = 3'd5
  } shift_op_e;

  // comparison select
  typedef enum logic [2:0] {
    CMP_EQ  = 3'd0,
    CMP_NEQ = 3'd1,
    CMP_GT  = 3'd2,
    CMP_GTE = 3'd3,
    CMP_LT  = 3'd4,
    CMP_LTE = 3'd5
  } comp_op_e;

  // control bundle from the instruction decoder to the datapath
  typedef struct packed {
    alu_op_e            alusel;
    shift_op_e          shiftsel;
    comp_op_e           compsel;
    logic [REG_AW-1:0]  regsel;
    logic               vma;
    logic               rw;         // 1 = write, 0 = read
    logic               pcwr;
    logic               pcrd;
    logic               addrregwr;
    logic               outregwr;
    logic               outregrd;
    logic               opregwr;
    logic               opregrd;
    logic               instrwr;
    logic               regwr;
    logic               regrd;
  } ctrl_t;

endpackage
