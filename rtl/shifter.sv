// shifter: combinational one-bit shift/rotate stage between ALU and output
// register.
//
// Every ALU result flows through this unit, so "pass" is its usual mode. The
// other modes shift left, shift right logically or arithmetically, or rotate
// left or right, all by one bit (the report's example shifts by one, and its
// shifter simulation of an 8-bit value shows one-bit results). Select codes
// follow the order of the published shift table; codes 6 and 7 pass the
// input through. No latency.
module shifter
  import risc_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] a,
  input  logic [2:0]        sel,
  output logic [DATA_W-1:0] c
);

  always_comb begin
    unique case (sel)
      SH_SHL:  c = {a[DATA_W-2:0], 1'b0};
      SH_SHR:  c = {1'b0, a[DATA_W-1:1]};
      SH_SAR:  c = {a[DATA_W-1], a[DATA_W-1:1]};
      SH_ROTL: c = {a[DATA_W-2:0], a[DATA_W-1]};
      SH_ROTR: c = {a[0], a[DATA_W-1:1]};
      default: c = a;   // SH_PASS and unused codes
    endcase
  end

endmodule
