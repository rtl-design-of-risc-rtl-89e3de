// busreg: bus register with an output enable, used for the program counter,
// the operand register and the output register.
//
// On a rising clock edge with WE high the register stores A. When EN is 1
// the stored value is driven on C; when EN is 0 the register releases its
// bus. The report describes a high-impedance output; here a released output
// reads as zero and the bus joins its drivers with OR (see databus), which
// behaves the same as long as one driver at a time is enabled and keeps the
// design free of internal tri-states. WE as a clock enable and the
// synchronous reset are own choices. Store: one cycle; drive: combinational.
module busreg #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [DATA_W-1:0] a,
  input  logic              en,
  output logic [DATA_W-1:0] c
);

  logic [DATA_W-1:0] q;

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (we) q <= a;
  end

  assign c = en ? q : '0;

endmodule
