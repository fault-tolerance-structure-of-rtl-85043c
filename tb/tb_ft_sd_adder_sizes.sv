// tb_ft_sd_adder_sizes: the adder at the other operand lengths it is meant
// for, 8, 16 and 32 digits (the 64-digit default is covered by
// tb_ft_sd_adder_top). Each size runs clean random additions, a permanent
// fault in unit 3 that is repaired by the spare, and further additions on
// the repaired adder (see ft_size_runner). The three sizes run in parallel.
module tb_ft_sd_adder_sizes;
  int c8, f8, c16, f16, c32, f32;
  logic d8, d16, d32;

  ft_size_runner #(.N(8))  u_n8  (.checks(c8),  .failures(f8),  .done(d8));
  ft_size_runner #(.N(16)) u_n16 (.checks(c16), .failures(f16), .done(d16));
  ft_size_runner #(.N(32)) u_n32 (.checks(c32), .failures(f32), .done(d32));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d8 && d16 && d32);
    $display("N=8: %0d checks, N=16: %0d checks, N=32: %0d checks", c8, c16, c32);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32);
    $finish;
  end
endmodule
