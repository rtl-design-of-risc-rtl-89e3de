// alu_tb: self-checking test of the ALU.
//
// First applies A=38, B=31 to every function code and compares with the
// results 38, 6, 63, 217, 57, 69, 7, 39, 37, 0 (the operands and results of
// the published 8-bit ALU simulation, widened to 32 bits, NOT giving
// 0xFFFFFFD9). Then checks 2000 random operand pairs on all 16 codes against
// a reference written here with plain integer arithmetic.
module alu_tb;
  logic [31:0] a, b, c;
  logic [3:0]  sel;
  int checks = 0, failures = 0;

  alu #(.DATA_W(32)) dut (.a(a), .b(b), .sel(sel), .c(c));

  function automatic logic [31:0] ref_alu(logic [31:0] x, logic [31:0] y, int s);
    case (s)
      0: return x;
      1: return x & y;
      2: return x | y;
      3: return ~x;
      4: return x ^ y;
      5: return 32'(64'(x) + 64'(y));
      6: return 32'(64'(x) + 64'(~y) + 64'd1);
      7: return 32'(64'(x) + 64'd1);
      8: return 32'(64'(x) + 64'hFFFF_FFFF);
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(string what, logic [31:0] exp);
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL %s sel=%0d a=%h b=%h got %h expected %h", what, sel, a, b, c, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] fig [10] = '{32'd38, 32'd6, 32'd63, 32'hFFFF_FFD9, 32'd57,
                                        32'd69, 32'd7, 32'd39, 32'd37, 32'd0};
    a = 32'd38; b = 32'd31;
    for (int s = 0; s < 10; s++) begin
      sel = 4'(s); #1; check("figure operands", fig[s]);
    end
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom;
      if (i < 16) begin a = 32'hFFFF_FFFF; b = 32'(i); end
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s); #1; check("random", ref_alu(a, b, s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
