// comp_tb: self-checking test of the comparator.
//
// Checks every select code on equal operands, on pairs differing in the top
// bit (where signed and unsigned order disagree) and on random pairs, against
// a reference written here. Unsigned comparison is expected.
module comp_tb;
  logic [31:0] a, b;
  logic [2:0]  sel;
  logic        compout;
  int checks = 0, failures = 0;

  comp #(.DATA_W(32)) dut (.a(a), .b(b), .sel(sel), .compout(compout));

  function automatic logic ref_cmp(logic [31:0] x, logic [31:0] y, int s);
    longint unsigned ux = x, uy = y;
    case (s)
      0: return ux == uy;
      1: return ux != uy;
      2: return ux > uy;
      3: return !(ux < uy);
      4: return ux < uy;
      5: return !(ux > uy);
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      case (i % 4)
        0: begin a = $urandom; b = a; end
        1: begin a = $urandom | 32'h8000_0000; b = $urandom & 32'h7FFF_FFFF; end
        2: begin a = $urandom & 32'h7FFF_FFFF; b = $urandom | 32'h8000_0000; end
        default: begin a = $urandom; b = (i % 8 == 3) ? a + 1 : $urandom; end
      endcase
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s); #1;
        checks++;
        if (compout !== ref_cmp(a, b, s)) begin
          failures++;
          $display("FAIL sel=%0d a=%h b=%h got %b", s, a, b, compout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
