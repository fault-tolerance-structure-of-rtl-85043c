// tb_sd_add2: exhaustive self-checking test of ADD2.
//
// Applies every two-wire form of w_i and c_{i-1} whose sum fits one digit
// (ADD1 never produces w and c of the same non-zero sign) and checks that z
// is the canonical code of w + c.
module tb_sd_add2;
  logic [1:0] w, cin, z;
  int checks = 0, failures = 0;

  sd_add2 dut (.w(w), .cin(cin), .z(z));

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
    int s;
    logic [1:0] ez;
    for (int i = 0; i < 16; i++) begin
      {w, cin} = 4'(i);
      #1;
      s = v(w) + v(cin);
      if (s > 1 || s < -1) continue;
      ez = (s == 1) ? 2'b01 : (s == -1) ? 2'b10 : 2'b00;
      checks++;
      if (z !== ez) begin
        failures++;
        $display("FAIL w=%b c=%b : z=%b expected %b", w, cin, z, ez);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
