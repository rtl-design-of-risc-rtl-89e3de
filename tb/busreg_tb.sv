// busreg_tb: self-checking test of the bus register with output enable.
//
// Random write enables, data and output enables for 500 clocks; the output
// must equal the stored value (kept in a shadow copy here) when EN is 1 and
// zero (bus released) when EN is 0.
module busreg_tb;
  logic clk = 0, rst, we, en;
  logic [31:0] a, c, shadow;
  int checks = 0, failures = 0;

  busreg #(.DATA_W(32)) dut (.clk(clk), .rst(rst), .we(we), .a(a), .en(en), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; en = 0; a = '0; shadow = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      a = $urandom; we = $urandom % 2; rst = (i == 300);
      @(posedge clk);
      if (rst) shadow = '0; else if (we) shadow = a;
      #1;
      en = 1; #1;
      checks++;
      if (c !== shadow) begin failures++; $display("FAIL read cycle %0d got %h expected %h", i, c, shadow); end
      en = 0; #1;
      checks++;
      if (c !== '0) begin failures++; $display("FAIL released output %h", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
