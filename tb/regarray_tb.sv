// regarray_tb: self-checking test of the 32 x 32-bit register array.
//
// Writes every register with a distinct value and reads them all back, then
// runs 2000 random read/write cycles against a shadow array kept here. Also
// checks that a disabled read releases the output (zero) and that reset
// clears every register.
module regarray_tb;
  logic clk = 0, rst, we, en;
  logic [4:0]  sel;
  logic [31:0] a, c;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regarray #(.DATA_W(32), .NREGS(32)) dut (.clk(clk), .rst(rst), .we(we), .sel(sel),
                                         .a(a), .en(en), .c(c));

  always #5 clk = ~clk;

  task automatic expect_c(logic [31:0] exp, string what);
    checks++;
    if (c !== exp) begin failures++; $display("FAIL %s sel=%0d got %h expected %h", what, sel, c, exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; en = 0; sel = 0; a = 0;
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 32; r++) shadow[r] = '0;
    for (int r = 0; r < 32; r++) begin sel = 5'(r); en = 1; #1 expect_c(32'd0, "after reset"); end
    en = 0;
    for (int r = 0; r < 32; r++) begin
      sel = 5'(r); a = 32'h1000_0000 * (r % 16) + 32'(r * 3 + 1); we = 1;
      shadow[r] = a;
      @(posedge clk); #1;
    end
    we = 0;
    for (int r = 0; r < 32; r++) begin sel = 5'(r); en = 1; #1 expect_c(shadow[r], "readback"); end
    for (int i = 0; i < 2000; i++) begin
      sel = 5'($urandom); a = $urandom; we = $urandom % 2; en = $urandom % 2;
      #1;
      expect_c(en ? shadow[sel] : 32'd0, "random read");
      @(posedge clk);
      if (we) shadow[sel] = a;
      #1;
    end
    we = 0; rst = 1; @(posedge clk); #1 rst = 0; en = 1;
    for (int r = 0; r < 32; r++) begin sel = 5'(r); #1 expect_c(32'd0, "second reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
