// tb_parity_gen: random self-checking test of the parity XOR gates (N = 8).
// Each digit's parity must be 1 exactly when the digit is +1 or -1
// (two-wire codes 01 and 10) and 0 for both zero codes.
module tb_parity_gen;
  localparam int N = 8;
  logic [2*N-1:0] w, c, z;
  logic [N-1:0] pw, pc, pz;
  int checks = 0, failures = 0;

  parity_gen #(.N(N)) dut (.*);

  function automatic logic [N-1:0] nz(input logic [2*N-1:0] x);
    logic [N-1:0] r;
    for (int k = 0; k < N; k++) r[k] = (x[2*k+1 -: 2] == 2'b01) || (x[2*k+1 -: 2] == 2'b10);
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      w = 16'($urandom); c = 16'($urandom); z = 16'($urandom);
      #1;
      checks++;
      if (pw !== nz(w) || pc !== nz(c) || pz !== nz(z)) begin
        failures++;
        $display("FAIL w=%b c=%b z=%b : %b %b %b", w, c, z, pw, pc, pz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
