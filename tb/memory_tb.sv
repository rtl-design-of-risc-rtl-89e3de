// memory_tb: self-checking test of the memory and its VMA/R/W/READY
// handshake.
//
// Loads the memory through the program port, then acts as the processor:
// raises VMA with an address, waits for READY, drops VMA for a cycle. Reads
// must return the loaded (or later written) words; writes must land. READY
// must come exactly LATENCY+1 cycles after VMA rises and last one cycle,
// checked at latencies 1 and 3.
module memory_tb;
  logic clk = 0, rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two instances with different latencies, driven alike
  logic        vma, rw, prog_we;
  logic [31:0] addr, wdata, prog_addr, prog_wdata;
  logic [31:0] rdata1, rdata3;
  logic        ready1, ready3;

  memory #(.DATA_W(32), .WORDS(64), .LATENCY(1)) m1 (
    .clk(clk), .rst(rst), .vma(vma), .rw(rw), .addr(addr), .wdata(wdata), .rdata(rdata1),
    .ready(ready1), .prog_we(prog_we), .prog_addr(prog_addr), .prog_wdata(prog_wdata));
  memory #(.DATA_W(32), .WORDS(64), .LATENCY(3)) m3 (
    .clk(clk), .rst(rst), .vma(vma), .rw(rw), .addr(addr), .wdata(wdata), .rdata(rdata3),
    .ready(ready3), .prog_we(prog_we), .prog_addr(prog_addr), .prog_wdata(prog_wdata));

  logic [31:0] shadow [64];

  // one access; returns cycles from VMA to READY for each instance
  task automatic access(input logic write, input logic [31:0] ad, input logic [31:0] wd);
    int n1, n3;
    logic got1, got3;
    n1 = 0; n3 = 0; got1 = 0; got3 = 0;
    vma = 1; rw = write; addr = ad; wdata = wd;
    for (int n = 1; n <= 10; n++) begin
      @(posedge clk); #1;
      if (ready1) begin
        if (got1) begin failures++; $display("FAIL second READY (latency 1)"); end
        got1 = 1; n1 = n;
        if (!write) begin
          checks++;
          if (rdata1 !== shadow[ad[5:0]]) begin failures++; $display("FAIL read %0d got %h exp %h", ad, rdata1, shadow[ad[5:0]]); end
        end
      end
      if (ready3) begin
        got3 = 1; n3 = n;
        if (!write) begin
          checks++;
          if (rdata3 !== shadow[ad[5:0]]) begin failures++; $display("FAIL read3 %0d", ad); end
        end
      end
    end
    checks += 2;
    if (n1 != 2) begin failures++; $display("FAIL latency 1: READY after %0d cycles", n1); end
    if (n3 != 4) begin failures++; $display("FAIL latency 3: READY after %0d cycles", n3); end
    vma = 0; rw = 0;
    @(posedge clk); #1;
    if (write) shadow[ad[5:0]] = wd;
  endtask

  initial begin
    rst = 1; vma = 0; rw = 0; addr = 0; wdata = 0; prog_we = 0; prog_addr = 0; prog_wdata = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 64; i++) begin
      prog_we = 1; prog_addr = i; prog_wdata = 32'hA5A5_0000 + 32'(i * 7); shadow[i] = prog_wdata;
      @(posedge clk); #1;
    end
    prog_we = 0; rst = 0;
    @(posedge clk); #1;
    checks++;
    if (ready1 || ready3) begin failures++; $display("FAIL READY without VMA"); end
    for (int i = 0; i < 8; i++) access(0, 32'(i), 0);
    for (int i = 0; i < 60; i++) begin
      logic [31:0] ad;
      ad = $urandom % 64;
      if ($urandom % 2) access(1, ad, $urandom);
      else              access(0, ad, 0);
    end
    for (int i = 0; i < 64; i++) access(0, 32'(i), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
