// shifter_tb: self-checking test of the one-bit shift/rotate unit.
//
// First runs the published 8-bit shifter simulation at DATA_W=8: input 198
// gives 198, 140, 99, 227, 141, 99 for pass, SHL, SHR, SAR, ROTL, ROTR. Then
// checks the 32-bit unit on random inputs against bit-by-bit references.
module shifter_tb;
  logic [7:0]  a8, c8;
  logic [31:0] a, c;
  logic [2:0]  sel;
  int checks = 0, failures = 0;

  shifter #(.DATA_W(8))  dut8  (.a(a8), .sel(sel), .c(c8));
  shifter #(.DATA_W(32)) dut32 (.a(a),  .sel(sel), .c(c));

  function automatic logic [31:0] ref_sh(logic [31:0] x, int s);
    logic [31:0] r;
    case (s)
      1: begin r = x * 2; end
      2: begin r = x / 2; end
      3: begin r = x / 2; r[31] = x[31]; end
      4: begin r = x * 2; r[0] = x[31]; end
      5: begin r = x / 2; r[31] = x[0]; end
      default: r = x;
    endcase
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [7:0] fig [8] = '{8'd198, 8'd140, 8'd99, 8'd227, 8'd141, 8'd99, 8'd198, 8'd198};
    a = '0;
    a8 = 8'd198;
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s); #1;
      checks++;
      if (c8 !== fig[s]) begin failures++; $display("FAIL 8-bit sel=%0d got %0d", s, c8); end
    end
    for (int i = 0; i < 2000; i++) begin
      a = $urandom;
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s); #1;
        checks++;
        if (c !== ref_sh(a, s)) begin
          failures++;
          $display("FAIL sel=%0d a=%h got %h expected %h", s, a, c, ref_sh(a, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
