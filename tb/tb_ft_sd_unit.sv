// tb_ft_sd_unit: random self-checking test of one reconfigurable unit.
//
// Drives random canonical digits on all operand and carry inputs and random
// shift / carry-skip selects, and compares c, w and z with a model of the
// selected inputs going through the SD addition rules.
module tb_ft_sd_unit;
  logic [1:0] a_cur, a_prv, b_cur, b_prv, sgn_cur, sgn_prv, cin_cur, cin_prv, c, w, z;
  logic shift, cskip;
  int checks = 0, failures = 0;

  ft_sd_unit dut (.*);

  function automatic int v(input logic [1:0] d);
    return (d == 2'b01) ? 1 : (d == 2'b10) ? -1 : 0;
  endfunction
  function automatic logic [1:0] e(input int x);
    return (x == 1) ? 2'b01 : (x == -1) ? 2'b10 : 2'b00;
  endfunction
  function automatic logic [1:0] rd();
    return e(int'($urandom_range(2)) - 1);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, ec, ew, ez, cv;
    logic [1:0] aa, bb, ss, cc;
    for (int i = 0; i < 4000; i++) begin
      a_cur = rd(); a_prv = rd(); b_cur = rd(); b_prv = rd();
      sgn_cur = 2'($urandom); sgn_prv = 2'($urandom);
      shift = 1'($urandom); cskip = 1'($urandom);
      // carries are legal only if they cannot collide with w; draw any, check
      // c and w always, z only where it fits one digit
      cin_cur = rd(); cin_prv = rd();
      #1;
      aa = shift ? a_prv : a_cur;
      bb = shift ? b_prv : b_cur;
      ss = shift ? sgn_prv : sgn_cur;
      cc = cskip ? cin_prv : cin_cur;
      s  = v(aa) + v(bb);
      if (s == 2 || s == -2) begin ec = s / 2; ew = 0; end
      else if (s == 1)  begin ec = (ss == 0) ? 1 : 0;  ew = (ss == 0) ? -1 : 1; end
      else if (s == -1) begin ec = (ss != 0) ? -1 : 0; ew = (ss != 0) ? 1 : -1; end
      else begin ec = 0; ew = 0; end
      cv = v(cc);
      ez = ew + cv;
      checks++;
      if (c !== e(ec) || w !== e(ew) || (ez >= -1 && ez <= 1 && z !== e(ez))) begin
        failures++;
        $display("FAIL shift=%b cskip=%b a=%b b=%b s=%b cin=%b : c=%b w=%b z=%b", shift, cskip, aa, bb, ss, cc, c, w, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
