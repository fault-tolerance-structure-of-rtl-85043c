// tb_parity_checker: random self-checking test of one parity checker
// (N = 8). y is x with 0, 1 or 2 random bits flipped; the mismatch vector
// must show exactly the flipped positions and the two-rail summary must be
// a code word (01/10) exactly when nothing was flipped.
module tb_parity_checker;
  localparam int N = 8;
  logic [N-1:0] x, y, mismatch;
  logic [1:0] rail;
  int checks = 0, failures = 0;

  parity_checker #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] flip;
    for (int i = 0; i < 3000; i++) begin
      x = 8'($urandom);
      flip = '0;
      for (int j = 0; j < int'($urandom_range(2)); j++) flip[$urandom_range(N - 1)] = 1'b1;
      y = x ^ flip;
      #1;
      checks++;
      if (mismatch !== flip || ((rail[1] != rail[0]) != (flip == '0))) begin
        failures++;
        $display("FAIL x=%b y=%b : mismatch=%b rail=%b", x, y, mismatch, rail);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
