// tb_fault_status_reg: self-checking test of the fault status register and
// the multiplexer controls (N = 8). Checks reset to zero, that loads OR the
// diagnosis in, that nothing changes without load, and that every control
// C_i is the OR of status bits 1..i, over random load sequences with resets.
module tb_fault_status_reg;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N-1:0] diag = '0, status, ctl;
  logic [N-1:0] model;
  int checks = 0, failures = 0;

  fault_status_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] run_or(input logic [N-1:0] s);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      r[i] = 1'b0;
      for (int k = 0; k <= i; k++) r[i] |= s[k];
    end
    return r;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (status !== model || ctl !== run_or(status)) begin
        failures++;
        $display("FAIL status=%b model=%b ctl=%b", status, model, ctl);
      end
      if ($urandom_range(99) == 0) begin
        rst_n = 0; #1; rst_n = 1; model = '0;
      end
      load = ($urandom_range(9) == 0);
      diag = '0;
      if ($urandom_range(1) == 0) diag[$urandom_range(N - 1)] = 1'b1;
      else diag = 8'($urandom);
      @(posedge clk);
      if (load) model = model | diag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
