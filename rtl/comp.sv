// comp: combinational comparator used by the conditional branches.
//
// Compares A (operand register) with B (data bus) and sets COMPOUT to 1 when
// the relation chosen by SEL holds: equal, not equal, greater, greater or
// equal, less, less or equal, in the order of the published comparison table.
// The comparison is unsigned, an own choice since the report does not say and
// the branches in its example compare addresses. Codes 6 and 7 give 0.
module comp
  import risc_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [2:0]        sel,
  output logic              compout
);

  always_comb begin
    unique case (sel)
      CMP_EQ:  compout = (a == b);
      CMP_NEQ: compout = (a != b);
      CMP_GT:  compout = (a >  b);
      CMP_GTE: compout = (a >= b);
      CMP_LT:  compout = (a <  b);
      CMP_LTE: compout = (a <= b);
      default: compout = 1'b0;
    endcase
  end

endmodule
