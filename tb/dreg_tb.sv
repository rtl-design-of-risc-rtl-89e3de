// dreg_tb: self-checking test of the plain register.
//
// Drives random data and write enables for 500 clocks and compares the
// output with a shadow copy kept here: the value changes only on a clock
// edge with WE high, holds otherwise, and reset clears it.
module dreg_tb;
  logic clk = 0, rst, we;
  logic [31:0] a, c, shadow;
  int checks = 0, failures = 0;

  dreg #(.DATA_W(32)) dut (.clk(clk), .rst(rst), .we(we), .a(a), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; a = '0; shadow = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      a = $urandom; we = ($urandom % 3) == 0; rst = (i == 250);
      @(posedge clk);
      if (rst) shadow = '0; else if (we) shadow = a;
      #1;
      checks++;
      if (c !== shadow) begin failures++; $display("FAIL cycle %0d got %h expected %h", i, c, shadow); end
      a = ~a; #1;   // output must not follow the input between edges
      checks++;
      if (c !== shadow) begin failures++; $display("FAIL transparent at cycle %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
