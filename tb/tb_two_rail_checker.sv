// tb_two_rail_checker: exhaustive test of the three-input two-rail checker.
// All 64 combinations of three input pairs are applied; the output must be a
// code word (01 or 10) exactly when all three input pairs are code words.
module tb_two_rail_checker;
  logic [5:0] rails;
  logic [1:0] err_rail;
  int checks = 0, failures = 0;

  two_rail_checker dut (.rails(rails), .err_rail(err_rail));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_ok;
    for (int i = 0; i < 64; i++) begin
      rails = 6'(i);
      #1;
      all_ok = (rails[1] != rails[0]) && (rails[3] != rails[2]) && (rails[5] != rails[4]);
      checks++;
      if ((err_rail[1] != err_rail[0]) != all_ok) begin
        failures++;
        $display("FAIL rails=%b : err_rail=%b", rails, err_rail);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
