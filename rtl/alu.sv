// alu: combinational 32-bit arithmetic logic unit of the processor.
//
// A comes from the operand register, B from the shared data bus; SEL picks
// one of ten functions and C carries the result to the shifter. Codes follow
// the published function table: pass A, AND, OR, NOT A, XOR, add, subtract,
// increment A, decrement A and zero. Arithmetic wraps modulo 2^DATA_W and no
// flags are produced, as none are described. The six unused codes give zero
// (own choice). Purely combinational, no latency.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [3:0]        sel,
  output logic [DATA_W-1:0] c
);

  always_comb begin
    unique case (sel)
      ALU_PASS: c = a;
      ALU_AND:  c = a & b;
      ALU_OR:   c = a | b;
      ALU_NOT:  c = ~a;
      ALU_XOR:  c = a ^ b;
      ALU_ADD:  c = a + b;
      ALU_SUB:  c = a - b;
      ALU_INC:  c = a + 1'b1;
      ALU_DEC:  c = a - 1'b1;
      default:  c = '0;   // ALU_ZERO and unused codes
    endcase
  end

endmodule
