// tb_ft_controller: cycle-by-cycle self-checking test of the fault-tolerance
// sequencer (N = 8). The checker outputs (err, err_vec) and the spare-in-use
// flag are driven directly, and in every cycle the controller's outputs
// {in_ready, load_ops, fsr_load, deliver, result_err, ev_error, ev_transient,
// ev_rediag, ev_permanent, ev_ft_ok, ev_ft_fail} are compared with the value
// the flow prescribes. Scenarios: back-to-back clean operations, a transient
// error, two differing diagnoses then a permanent fault repaired by
// reconfiguration, a permanent fault with no spare left, the delivery
// without correction after a failure, and an error that persists after
// reconfiguration.
module tb_ft_controller;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, err = 0, spare_used = 0;
  logic [N-1:0] err_vec = '0, diag;
  logic in_ready, load_ops, fsr_load, deliver, result_err, ft_fail;
  logic ev_error, ev_transient, ev_rediag, ev_permanent, ev_ft_ok, ev_ft_fail;
  int checks = 0, failures = 0;

  ft_controller #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // bit order: in_ready load_ops fsr_load deliver result_err
  //            ev_error ev_transient ev_rediag ev_permanent ev_ft_ok ev_ft_fail
  task automatic step(input logic v, input logic e, input logic [N-1:0] vec,
                      input logic [10:0] expect_o, input string tag);
    logic [10:0] got;
    @(negedge clk);
    in_valid = v; err = e; err_vec = vec;
    #1;
    got = {in_ready, load_ops, fsr_load, deliver, result_err,
           ev_error, ev_transient, ev_rediag, ev_permanent, ev_ft_ok, ev_ft_fail};
    checks++;
    if (got !== expect_o) begin
      failures++;
      $display("FAIL %s: got %b expected %b", tag, got, expect_o);
    end
  endtask

  task automatic expect_state(input logic [N-1:0] d, input logic f, input string tag);
    checks++;
    if (diag !== d || ft_fail !== f) begin
      failures++;
      $display("FAIL %s: diag=%b ft_fail=%b", tag, diag, ft_fail);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clean, back to back
    step(0, 0, 0, 11'b10000_000000, "idle");
    step(1, 0, 0, 11'b11000_000000, "accept1");
    step(1, 0, 0, 11'b11010_000000, "eval1 deliver + accept2");
    step(0, 0, 0, 11'b10010_000000, "eval2 deliver");
    step(0, 0, 0, 11'b10000_000000, "idle again");
    // transient
    step(1, 0, 0, 11'b11000_000000, "accept3");
    step(1, 1, 8'h04, 11'b00000_100000, "eval3 error");
    expect_state(8'h00, 0, "diag not yet written");
    step(1, 0, 0, 11'b00010_010000, "recompute clean: transient");
    expect_state(8'h04, 0, "first diagnosis kept");
    step(0, 0, 0, 11'b10000_000000, "idle after transient");
    // differing diagnoses, then permanent, repaired
    step(1, 0, 0, 11'b11000_000000, "accept4");
    step(0, 1, 8'h04, 11'b00000_100000, "eval4 error");
    step(0, 1, 8'h10, 11'b00000_001000, "diagnoses differ");
    step(0, 1, 8'h10, 11'b00100_000100, "diagnoses agree: permanent");
    expect_state(8'h10, 0, "diag output for the register");
    step(0, 0, 0, 11'b00010_000010, "verify clean");
    // permanent again with the spare in use: failure
    spare_used = 1;
    step(1, 0, 0, 11'b11000_000000, "accept5");
    step(0, 1, 8'h20, 11'b00000_100000, "eval5 error");
    step(0, 1, 8'h20, 11'b00011_000001, "no spare left");
    // after the failure: deliver at once, flag the error
    step(1, 0, 0, 11'b11000_000000, "accept6");
    expect_state(8'h20, 1, "ft_fail set");
    step(0, 1, 8'h01, 11'b10011_000000, "eval6 unchecked delivery");
    // reset, then an error that persists after reconfiguration
    spare_used = 0;
    @(negedge clk); rst_n = 0; #1 rst_n = 1;
    expect_state(8'h00, 0, "reset");
    step(1, 0, 0, 11'b11000_000000, "accept7");
    step(0, 1, 8'h08, 11'b00000_100000, "eval7 error");
    step(0, 1, 8'h08, 11'b00100_000100, "permanent");
    step(0, 1, 8'h08, 11'b00011_000001, "verify still wrong");
    step(0, 0, 0, 11'b10000_000000, "idle after failure");
    expect_state(8'h08, 1, "ft_fail after verify");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
