// memory: word-addressed on-chip program and data memory with the
// processor's VMA / R/W / READY handshake.
//
// The processor raises VMA with a valid address and R/W (1 = write, 0 =
// read) and holds them, together with the write data, until READY. LATENCY
// cycles after VMA rises the memory performs the access and pulses READY for
// one cycle; on a read, RDATA holds the word from that cycle on. A further
// access starts only after VMA has been low for a cycle. The handshake
// signals are the report's; their exact timing, the size (WORDS, word
// addressed, upper address bits ignored) and the program-load port used to
// fill the memory while the processor is held in reset are own choices.
// Reset clears only the handshake state, not the contents.
module memory #(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned WORDS   = 256,
  parameter int unsigned LATENCY = 1,
  localparam int unsigned AW     = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned CNT_W  = $clog2(LATENCY + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              vma,
  input  logic              rw,
  input  logic [31:0]       addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic              ready,
  input  logic              prog_we,
  input  logic [31:0]       prog_addr,
  input  logic [DATA_W-1:0] prog_wdata
);

  logic [DATA_W-1:0] mem [WORDS];
  logic [CNT_W-1:0]  cnt;
  logic              done;   // access of the current VMA period finished
  logic [AW-1:0]     a;

  assign a = addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW-1:0]] <= prog_wdata;
    else if (vma && !done && !rst && cnt == CNT_W'(LATENCY) && rw) mem[a] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      done  <= 1'b0;
      ready <= 1'b0;
      rdata <= '0;
    end else begin
      ready <= 1'b0;
      if (!vma) begin
        cnt  <= '0;
        done <= 1'b0;
      end else if (!done) begin
        if (cnt == CNT_W'(LATENCY)) begin
          ready <= 1'b1;
          done  <= 1'b1;
          if (!rw) rdata <= mem[a];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // READY only answers an access that was pending in the cycle before
  a_ready_after_vma: assert property (@(posedge clk) disable iff (rst) ready |-> $past(vma))
    else $error("memory: READY without a request");

endmodule
