// tb_sd_add1: exhaustive self-checking test of ADD1.
//
// Applies all 64 combinations of the six input wires (a_i, b_i in every
// two-wire form including the 2'b11 zero, and the two sign wires of
// position i-1). For each it checks the carry and intermediate sum against
// the ADD1 rule table written out here (value of a_i + b_i, and whether a
// digit of position i-1 is negative), checks w + 2c = a + b, and checks that
// both outputs are canonical (never 2'b11).
module tb_sd_add1;
  logic [1:0] a, b, sgn, c, w;
  int checks = 0, failures = 0;

  sd_add1 dut (.a(a), .b(b), .sgn(sgn), .c(c), .w(w));

  function automatic int v(input logic [1:0] d);
    return (d == 2'b01) ? 1 : (d == 2'b10) ? -1 : 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, ec, ew;
    bit neg;
    for (int i = 0; i < 64; i++) begin
      {a, b, sgn} = 6'(i);
      #1;
      s   = v(a) + v(b);
      neg = (sgn != 2'b00);
      case (s)
        2:  begin ec = 1;  ew = 0; end
        -2: begin ec = -1; ew = 0; end
        1:  begin ec = neg ? 0 : 1;   ew = neg ? 1 : -1; end
        -1: begin ec = neg ? -1 : 0;  ew = neg ? 1 : -1; end
        default: begin ec = 0; ew = 0; end
      endcase
      checks++;
      if (v(c) != ec || v(w) != ew || c == 2'b11 || w == 2'b11 || v(w) + 2 * v(c) != s) begin
        failures++;
        $display("FAIL a=%b b=%b sgn=%b : c=%b w=%b expected c=%0d w=%0d", a, b, sgn, c, w, ec, ew);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
