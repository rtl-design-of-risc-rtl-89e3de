// databus: the processor's single shared 32-bit data bus.
//
// Each of NSRC drivers presents a value that is zero unless the driver is
// enabled (busreg, regarray and the memory read path behave so), and the bus
// value is the OR of them all. This stands in for the report's tri-state
// bus: with at most one driver enabled, which an assertion checks each
// clock, the result is the enabled driver's value, and zero when none
// drives. Combinational; CLK is used only by the assertion.
module databus #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NSRC   = 4
) (
  input  logic                          clk,
  input  logic [NSRC-1:0][DATA_W-1:0]   src,
  input  logic [NSRC-1:0]               drv,
  output logic [DATA_W-1:0]             bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < NSRC; i++) bus |= src[i];
  end

  // bus contention: never two drivers at once
  a_one_driver: assert property (@(posedge clk) $onehot0(drv))
    else $error("databus: %0d drivers enabled at once (%b)", $countones(drv), drv);

endmodule
