// tb_carry_pred: random self-checking test of the carry parity predictor
// (N = 8). The expected value is whether the carry of each position is
// non-zero, found with a model of the ADD1 rule (the carry is non-zero for
// a sum of +-2, for +1 when no digit of position i-1 is negative, and for -1
// when one is). Operand digits are canonical.
module tb_carry_pred;
  localparam int N = 8;
  logic [2*N-1:0] a, b;
  logic [N-1:0] ppc;
  int checks = 0, failures = 0;

  carry_pred #(.N(N)) dut (.a(a), .b(b), .ppc(ppc));

  function automatic int v(input logic [1:0] d);
    return (d == 2'b01) ? 1 : (d == 2'b10) ? -1 : 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_p;
    int ta, tb, s;
    bit negb;
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < N; k++) begin
        ta = int'($urandom_range(2));
        tb = int'($urandom_range(2));
        a[2*k+1 -: 2] = (ta == 0) ? 2'b00 : (ta == 1) ? 2'b01 : 2'b10;
        b[2*k+1 -: 2] = (tb == 0) ? 2'b00 : (tb == 1) ? 2'b01 : 2'b10;
      end
      #1;
      for (int k = 0; k < N; k++) begin
        s = v(a[2*k+1 -: 2]) + v(b[2*k+1 -: 2]);
        negb = (k > 0) && (v(a[2*k-1 -: 2]) < 0 || v(b[2*k-1 -: 2]) < 0);
        exp_p[k] = (s == 2 || s == -2) || (s == 1 && !negb) || (s == -1 && negb);
      end
      checks++;
      if (ppc !== exp_p) begin
        failures++;
        $display("FAIL a=%b b=%b : ppc=%b expected %b", a, b, ppc, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
