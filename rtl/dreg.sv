// dreg: plain 32-bit register, used as the address register and the
// instruction register.
//
// On a rising clock edge with WE high, input A is captured; output C always
// shows the stored value. The report's register captures on every rising
// edge of its clock; here the decoder's write strobe is a clock enable on the
// common clock instead of a gated clock, and a synchronous reset to zero is
// added (both own choices). One cycle from A to C.
module dreg #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [DATA_W-1:0] a,
  output logic [DATA_W-1:0] c
);

  always_ff @(posedge clk) begin
    if (rst)     c <= '0;
    else if (we) c <= a;
  end

endmodule
