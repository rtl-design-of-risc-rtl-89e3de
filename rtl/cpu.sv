// cpu: the 32-bit processor, a multi-cycle machine built around one shared
// 32-bit data bus.
//
// Datapath (one instance each): a register array of NREGS registers; the
// program counter, operand register and output register, which are bus
// registers with output enables; the address register, which drives the
// address bus; the instruction register, which feeds the decoder; the ALU,
// whose A input is the operand register and whose B input is the data bus;
// the shifter between ALU and output register; and the comparator, which
// compares the operand register with the data bus for the decoder. Four
// sources can drive the data bus: the register array, the PC, the output
// register and, during a read, the memory. The decoder enables one at a time.
// The memory port follows the report: VMA, R/W (1 = write), address, data
// and READY; the bidirectional data lines appear here as DATA_OUT (the bus,
// meaningful while writing) and DATA_IN (read data, taken while READY).
// An assertion checks the handshake rule that VMA, R/W and the address hold
// until READY. Synchronous active-high reset; after reset execution starts at
// address 0.
module cpu
  import risc_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NREGS  = 32
) (
  input  logic              clk,
  input  logic              reset,
  output logic [31:0]       addr,
  output logic              vma,
  output logic              rw,
  output logic [DATA_W-1:0] data_out,
  input  logic [DATA_W-1:0] data_in,
  input  logic              ready
);

  localparam int unsigned SEL_W = (NREGS > 1) ? $clog2(NREGS) : 1;

  ctrl_t             ctl;
  logic [DATA_W-1:0] bus;
  logic [DATA_W-1:0] reg_c, pc_c, out_c, mem_c;
  logic [DATA_W-1:0] opdata, alu_c, shift_c;
  logic [31:0]       instr;
  logic [DATA_W-1:0] addr_q;
  logic              compout;
  logic              mem_drv;

  // ---- shared data bus
  assign mem_drv = ctl.vma && !ctl.rw && ready;
  assign mem_c   = mem_drv ? data_in : '0;

  databus #(.DATA_W(DATA_W), .NSRC(4)) u_bus (
    .clk (clk),
    .src ({mem_c, out_c, pc_c, reg_c}),
    .drv ({mem_drv, ctl.outregrd, ctl.pcrd, ctl.regrd}),
    .bus (bus)
  );

  // ---- registers
  regarray #(.DATA_W(DATA_W), .NREGS(NREGS)) u_regarray (
    .clk (clk), .rst (reset), .we (ctl.regwr), .sel (ctl.regsel[SEL_W-1:0]),
    .a (bus), .en (ctl.regrd), .c (reg_c)
  );

  busreg #(.DATA_W(DATA_W)) u_progcntr (
    .clk (clk), .rst (reset), .we (ctl.pcwr), .a (bus), .en (ctl.pcrd), .c (pc_c)
  );

  busreg #(.DATA_W(DATA_W)) u_opreg (
    .clk (clk), .rst (reset), .we (ctl.opregwr), .a (bus), .en (ctl.opregrd), .c (opdata)
  );

  busreg #(.DATA_W(DATA_W)) u_outreg (
    .clk (clk), .rst (reset), .we (ctl.outregwr), .a (shift_c), .en (ctl.outregrd), .c (out_c)
  );

  dreg #(.DATA_W(DATA_W)) u_addrreg (
    .clk (clk), .rst (reset), .we (ctl.addrregwr), .a (bus), .c (addr_q)
  );

  dreg #(.DATA_W(32)) u_instrreg (
    .clk (clk), .rst (reset), .we (ctl.instrwr), .a (bus[31:0]), .c (instr)
  );

  // ---- operate units
  alu #(.DATA_W(DATA_W)) u_alu (
    .a (opdata), .b (bus), .sel (ctl.alusel), .c (alu_c)
  );

  shifter #(.DATA_W(DATA_W)) u_shift (
    .a (alu_c), .sel (ctl.shiftsel), .c (shift_c)
  );

  comp #(.DATA_W(DATA_W)) u_comp (
    .a (opdata), .b (bus), .sel (ctl.compsel), .compout (compout)
  );

  // ---- instruction decoder
  control u_control (
    .clk (clk), .reset (reset), .instr (instr), .compout (compout),
    .ready (ready), .ctl (ctl)
  );

  // ---- memory port
  assign addr     = addr_q[31:0];
  assign vma      = ctl.vma;
  assign rw       = ctl.rw;
  assign data_out = bus;

  // memory handshake: once raised, VMA, R/W and the address hold until READY
  a_hold_request: assert property (@(posedge clk) disable iff (reset)
      (vma && !ready) |=> (vma && $stable(rw) && $stable(addr)))
    else $error("cpu: memory request changed before READY");

endmodule
