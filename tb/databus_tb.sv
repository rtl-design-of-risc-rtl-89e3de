// databus_tb: self-checking test of the shared data bus.
//
// Enables each of the four drivers alone (the others presenting zero, as a
// released driver does) and checks that the bus carries its value; with no
// driver the bus must read zero. Only legal one-driver patterns are applied,
// so the contention assertion must stay quiet.
module databus_tb;
  logic clk = 0;
  logic [3:0][31:0] src;
  logic [3:0]       drv;
  logic [31:0]      bus;
  int checks = 0, failures = 0;

  databus #(.DATA_W(32), .NSRC(4)) dut (.clk(clk), .src(src), .drv(drv), .bus(bus));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    for (int i = 0; i < 1000; i++) begin
      int k;
      k = $urandom % 5;   // 4 = nobody drives
      v = $urandom;
      src = '0; drv = '0;
      if (k < 4) begin src[k] = v; drv[k] = 1'b1; end
      @(negedge clk);
      checks++;
      if (bus !== (k < 4 ? v : 32'd0)) begin
        failures++; $display("FAIL driver %0d value %h bus %h", k, v, bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
