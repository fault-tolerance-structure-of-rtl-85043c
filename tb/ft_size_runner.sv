// ft_size_runner: test driver used by tb_ft_sd_adder_sizes. It instantiates
// one ft_sd_adder_top of N digits and, on its own clock, runs 300 random
// additions, then makes ADD2 of unit 3 permanently faulty, expects the
// repair (result 3 cycles after acceptance, fault status = position 3),
// and runs 300 more additions with the fault still present. Every result is
// compared with A + B computed from the operands' SD values. It reports its
// check and failure counts and raises `done` at the end.
module ft_size_runner #(
  parameter int N = 8
) (
  output int   checks,
  output int   failures,
  output logic done
);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [2*N-1:0] a = '0, b = '0, z;
  logic [N-1:0] pa = '0, pb = '0, fault_status;
  logic in_ready, out_valid, result_err, reconfigured, ft_fail;
  logic [1:0] c_out, err_rail;
  logic ev_error, ev_transient, ev_rediag, ev_permanent, ev_ft_ok, ev_ft_fail;

  ft_sd_adder_top #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  typedef logic signed [N+7:0] val_t;
  function automatic int v(input logic [1:0] d);
    return (d == 2'b01) ? 1 : (d == 2'b10) ? -1 : 0;
  endfunction
  function automatic val_t sdv(input logic [2*N-1:0] x);
    val_t r = '0;
    for (int k = N - 1; k >= 0; k--) r = 2 * r + val_t'(v(x[2*k+1 -: 2]));
    return r;
  endfunction
  function automatic logic [N-1:0] par(input logic [2*N-1:0] x);
    logic [N-1:0] r;
    for (int k = 0; k < N; k++) r[k] = x[2*k+1] ^ x[2*k];
    return r;
  endfunction
  function automatic logic [2*N-1:0] rnd_op(input int zero_pos);
    logic [2*N-1:0] r;
    int t;
    for (int k = 0; k < N; k++) begin
      t = int'($urandom_range(2));
      r[2*k+1 -: 2] = (k + 1 == zero_pos || t == 0) ? 2'b00 : (t == 1) ? 2'b01 : 2'b10;
    end
    return r;
  endfunction

  // one addition; returns the latency from acceptance to out_valid
  task automatic add(input int zero_pos, output int lat);
    logic [2*N-1:0] oa, ob;
    val_t got;
    int t0;
    oa = rnd_op(zero_pos);
    ob = rnd_op(zero_pos);
    @(negedge clk);
    a = oa; b = ob; pa = par(oa); pb = par(ob); in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 0;
    t0 = 0;
    do begin
      @(posedge clk);
      #1 t0++;
    end while (!out_valid && t0 < 20);
    lat = t0;
    got = sdv(z) + (val_t'(v(c_out)) <<< N);
    checks++;
    if (!out_valid || result_err || got != sdv(oa) + sdv(ob)) begin
      failures++;
      $display("FAIL N=%0d: got %0d expected %0d", N, got, sdv(oa) + sdv(ob));
    end
  endtask

  initial begin
    int lat;
    checks = 0;
    failures = 0;
    done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      add(0, lat);
      checks++;
      if (lat != 1) begin
        failures++;
        $display("FAIL N=%0d: clean latency %0d", N, lat);
      end
    end
    force dut.u_array.g_unit[3].u_unit.u_add2.u_msb.z_bit = 1'b1;
    add(3, lat);
    checks++;
    if (lat != 3 || fault_status != N'(4) || !reconfigured || ft_fail) begin
      failures++;
      $display("FAIL N=%0d: repair latency %0d status %b", N, lat, fault_status);
    end
    for (int i = 0; i < 300; i++) add(0, lat);
    release dut.u_array.g_unit[3].u_unit.u_add2.u_msb.z_bit;
    done = 1;
  end
endmodule
