// tb_ft_sd_array: self-checking test of the unit array with its spare.
//
// Runs with N = 8 digits. For random canonical operands and every
// reconfiguration setting (no fault, or the controls switched for a faulty
// unit f = 1..8, C_k = 1 for k >= f) it checks that z + c_out * 2^N equals
// A + B in SD value, that every output digit is canonical, and that the
// per-position w and c handed to the checkers satisfy w_k + 2c_k = a_k + b_k. It then makes
// units 1, 4 and 8 misbehave (their c, w and z outputs forced to garbage)
// with the matching controls set, and checks that the sum is still right:
// the faulty unit is really bypassed, including the carry that has to skip it.
module tb_ft_sd_array;
  localparam int N = 8;
  logic [2*N-1:0] a, b, z, w, c;
  logic [N-1:0]   ctl;
  logic [1:0]     c_out;
  int checks = 0, failures = 0;

  ft_sd_array #(.N(N)) dut (.a(a), .b(b), .ctl(ctl), .z(z), .w(w), .c(c), .c_out(c_out));

  function automatic int v(input logic [1:0] d);
    return (d == 2'b01) ? 1 : (d == 2'b10) ? -1 : 0;
  endfunction
  function automatic longint sdv(input logic [2*N-1:0] x);
    longint r = 0;
    for (int k = N - 1; k >= 0; k--) r = 2 * r + longint'(v(x[2*k+1 -: 2]));
    return r;
  endfunction
  function automatic logic [2*N-1:0] rnd_op();
    logic [2*N-1:0] r;
    for (int k = 0; k < N; k++) begin
      int t = int'($urandom_range(2));
      r[2*k+1 -: 2] = (t == 0) ? 2'b00 : (t == 1) ? 2'b01 : 2'b10;
    end
    return r;
  endfunction
  function automatic logic [N-1:0] ctl_for(input int f);
    logic [N-1:0] r = '0;
    if (f > 0) for (int k = f; k <= N; k++) r[k-1] = 1'b1;
    return r;
  endfunction

  task automatic check_sum(input string tag);
    bit canon = 1;
    bit split_ok = 1;    // w_k + 2 c_k = a_k + b_k at every position
    for (int k = 0; k < N; k++) begin
      if (z[2*k+1 -: 2] == 2'b11) canon = 0;
      if (v(w[2*k+1 -: 2]) + 2 * v(c[2*k+1 -: 2]) != v(a[2*k+1 -: 2]) + v(b[2*k+1 -: 2]))
        split_ok = 0;
    end
    checks++;
    if (!split_ok) begin
      failures++;
      $display("FAIL %s ctl=%b: w/c per position do not match the operand digits", tag, ctl);
    end
    checks++;
    if (sdv(z) + v(c_out) * (longint'(1) << N) != sdv(a) + sdv(b) || !canon || c_out == 2'b11) begin
      failures++;
      $display("FAIL %s ctl=%b a=%0d b=%0d got=%0d", tag, ctl, sdv(a), sdv(b),
               sdv(z) + v(c_out) * (longint'(1) << N));
    end
  endtask

  task automatic run_random(input int f, input int count, input string tag);
    ctl = ctl_for(f);
    for (int i = 0; i < count; i++) begin
      a = rnd_op();
      b = rnd_op();
      #1;
      check_sum(tag);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f <= N; f++) run_random(f, 300, "cfg");

    force dut.g_unit[1].u_unit.z = 2'b01;
    force dut.g_unit[1].u_unit.c = 2'b10;
    force dut.g_unit[1].u_unit.w = 2'b01;
    run_random(1, 300, "bypass1");
    release dut.g_unit[1].u_unit.z;
    release dut.g_unit[1].u_unit.c;
    release dut.g_unit[1].u_unit.w;

    force dut.g_unit[4].u_unit.z = 2'b10;
    force dut.g_unit[4].u_unit.c = 2'b01;
    force dut.g_unit[4].u_unit.w = 2'b10;
    run_random(4, 300, "bypass4");
    release dut.g_unit[4].u_unit.z;
    release dut.g_unit[4].u_unit.c;
    release dut.g_unit[4].u_unit.w;

    force dut.g_unit[8].u_unit.z = 2'b01;
    force dut.g_unit[8].u_unit.c = 2'b01;
    force dut.g_unit[8].u_unit.w = 2'b01;
    run_random(8, 300, "bypass8");
    release dut.g_unit[8].u_unit.z;
    release dut.g_unit[8].u_unit.c;
    release dut.g_unit[8].u_unit.w;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
