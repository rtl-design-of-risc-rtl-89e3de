// regarray: register bank of NREGS general-purpose registers of DATA_W bits.
//
// Write: with WE high, A is written at the rising clock edge into the
// register numbered by SEL. Read: with EN high, the register numbered by SEL
// appears on C at once (combinational read); with EN low C releases the bus
// (reads zero, as for busreg). One SEL serves both, as in the report's
// register array, so one register is read or written per cycle. Thirty-two
// 32-bit registers as published; the write enable and the synchronous reset
// that clears all registers are own additions.
module regarray #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NREGS  = 32,
  localparam int unsigned SEL_W = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [SEL_W-1:0]  sel,
  input  logic [DATA_W-1:0] a,
  input  logic              en,
  output logic [DATA_W-1:0] c
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[sel] <= a;
    end
  end

  assign c = en ? regs[sel] : '0;

endmodule
