// risc: system top, the processor and its on-chip memory joined by the
// VMA / R/W / address / data / READY interface.
//
// Two resets, as the specification lists "global and cpu reset": RESET
// (global) restarts the processor and the memory's handshake, CPU_RESET
// restarts only the processor; neither clears the memory contents. After
// reset the processor fetches from word address 0 of the memory. While
// either reset is held, a program and its data can be written into
// the memory through the PROG_* port (own addition; the report does not say
// how the memory is filled). The address, handshake and data-bus values are
// brought out for observation, as the report's simulations show them.
// Defaults: 32-bit data, 32 registers (published), 256-word memory with a
// one-cycle access latency (own choice).
module risc #(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned MEM_WORDS   = 256,
  parameter int unsigned MEM_LATENCY = 1
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              cpu_reset,
  input  logic              prog_we,
  input  logic [31:0]       prog_addr,
  input  logic [DATA_W-1:0] prog_wdata,
  output logic [31:0]       addr,
  output logic              vma,
  output logic              rw,
  output logic              ready,
  output logic [DATA_W-1:0] data
);

  logic [DATA_W-1:0] rdata;
  logic              core_reset;

  assign core_reset = reset || cpu_reset;

  cpu #(.DATA_W(DATA_W), .NREGS(32)) cpu1 (
    .clk (clk), .reset (core_reset), .addr (addr), .vma (vma), .rw (rw),
    .data_out (data), .data_in (rdata), .ready (ready)
  );

  memory #(.DATA_W(DATA_W), .WORDS(MEM_WORDS), .LATENCY(MEM_LATENCY)) mem1 (
    .clk (clk), .rst (reset), .vma (vma), .rw (rw), .addr (addr),
    .wdata (data), .rdata (rdata), .ready (ready),
    .prog_we (prog_we), .prog_addr (prog_addr), .prog_wdata (prog_wdata)
  );

endmodule
