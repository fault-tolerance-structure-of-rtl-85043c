// tb_ft_sd_adder_top: end-to-end self-checking test of the fault-tolerant SD
// adder at its default size (N = 64 digits, one spare unit).
//
// A monitor compares every delivered result with A + B computed here from
// the operands' SD values (z + c_out * 2^N) and checks the result_err flag
// the scenario expects. Faults are injected by forcing single wires inside
// units (a stuck ADD1 or ADD2 slice output) or in the unprotected carry
// parity predictor. A one-cycle transient ends by forcing the wire back to
// its fault-free value (0, the operand digits there being zero) before the
// release, since a released variable keeps its value until its always_comb
// block runs again.
// Operands used to expose a fault have zero digits at the faulty position so
// that the stuck wire really changes the digit. Scenarios:
//   clean random additions, one by one and back to back (one per cycle);
//   a transient fault (recompute, result after 2 cycles);
//   two differing diagnoses followed by a permanent fault;
//   permanent faults in units 1, 37 and 64, each repaired by the spare
//   (result after 3 cycles), then random traffic with the fault still there;
//   a second permanent fault with the spare in use (fault tolerance fails);
//   a diagnosis flagging two adjacent units, the lower one being retired;
//   a stuck carry parity predictor, whose error survives reconfiguration;
//   delivery without correction after the failure.
// Each mechanism is counted; one that never happened is a failure.
module tb_ft_sd_adder_top;
  localparam int N = 64;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [2*N-1:0] a = '0, b = '0, z;
  logic [N-1:0] pa = '0, pb = '0, fault_status;
  logic in_ready, out_valid, result_err, reconfigured, ft_fail;
  logic [1:0] c_out, err_rail;
  logic ev_error, ev_transient, ev_rediag, ev_permanent, ev_ft_ok, ev_ft_fail;

  ft_sd_adder_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference arithmetic ----------------
  typedef logic signed [71:0] val_t;
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
  // random canonical operand; digit positions (1-based) in zmask are zero
  function automatic logic [2*N-1:0] rnd_op(input logic [N-1:0] zmask);
    logic [2*N-1:0] r;
    int t;
    for (int k = 0; k < N; k++) begin
      t = int'($urandom_range(2));
      r[2*k+1 -: 2] = zmask[k] ? 2'b00 : (t == 0) ? 2'b00 : (t == 1) ? 2'b01 : 2'b10;
    end
    return r;
  endfunction

  // ---------------- expected results and monitor ----------------
  typedef struct { val_t sum; logic rerr; } exp_t;
  exp_t exp_q[$];
  logic next_rerr = 0;     // result_err expected for the next accepted op
  int   n_delivered = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      val_t got;
      checks++;
      n_delivered++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at cycle %0d", cyc);
      end else begin
        e   = exp_q.pop_front();
        got = sdv(z) + (val_t'(v(c_out)) <<< N);
        if (result_err !== e.rerr || (!e.rerr && got != e.sum)) begin
          failures++;
          $display("FAIL cycle %0d: got %0d (err %b) expected %0d (err %b)",
                   cyc, got, result_err, e.sum, e.rerr);
        end
      end
    end
  end

  // mechanism counters
  int n_error = 0, n_transient = 0, n_rediag = 0, n_permanent = 0, n_ft_ok = 0, n_ft_fail = 0;
  int n_clean = 0, n_burst = 0, n_bypass_ops = 0, n_spare_top = 0, n_nospare = 0,
      n_verify_fail = 0, n_unchecked = 0, n_two_bit = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      n_error     += int'(ev_error);
      n_transient += int'(ev_transient);
      n_rediag    += int'(ev_rediag);
      n_permanent += int'(ev_permanent);
      n_ft_ok     += int'(ev_ft_ok);
      n_ft_fail   += int'(ev_ft_fail);
    end
  end

  // ---------------- driver ----------------
  longint t_acc;

  task automatic start_op(input logic [2*N-1:0] oa, input logic [2*N-1:0] ob);
    logic acc;
    acc = 0;
    while (!acc) begin
      @(negedge clk);
      a = oa; b = ob; pa = par(oa); pb = par(ob); in_valid = 1;
      #1 acc = in_ready;
      @(posedge clk);
    end
    exp_q.push_back('{sum: sdv(oa) + sdv(ob), rerr: next_rerr});
    #1;
    t_acc = cyc;
    in_valid = 0;
  endtask

  // waits for the result of the last accepted operation; returns its latency
  task automatic finish_op(output int lat);
    do begin
      @(posedge clk);
      #1;
    end while (!out_valid);
    lat = int'(cyc - t_acc);
  endtask

  task automatic check_lat(input int lat, input int want, input string tag);
    checks++;
    if (lat != want) begin
      failures++;
      $display("FAIL %s: latency %0d expected %0d", tag, lat, want);
    end
  endtask

  task automatic check_status(input logic [N-1:0] fs, input logic fail, input string tag);
    checks++;
    if (fault_status !== fs || ft_fail !== fail || reconfigured !== (fs != '0)) begin
      failures++;
      $display("FAIL %s: fault_status=%h ft_fail=%b", tag, fault_status, ft_fail);
    end
  endtask

  task automatic do_reset();
    while (exp_q.size() != 0) @(posedge clk);
    @(negedge clk);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    next_rerr = 0;
  endtask

  task automatic clean_ops(input int count, input string tag, input bit bypass);
    int lat;
    for (int i = 0; i < count; i++) begin
      start_op(rnd_op('0), rnd_op('0));
      finish_op(lat);
      check_lat(lat, 1, tag);
      n_clean++;
      if (bypass) n_bypass_ops++;
    end
  endtask

  function automatic logic [N-1:0] bit_at(input int pos);   // pos 1-based
    logic [N-1:0] r = '0;
    r[pos-1] = 1'b1;
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    do_reset();
    check_status('0, 0, "after reset");

    // 1. clean operations
    clean_ops(200, "clean", 0);

    // 2. back-to-back burst: one operation per cycle
    begin
      longint t0;
      int d0;
      repeat (2) @(posedge clk);
      d0 = n_delivered;
      @(negedge clk);
      in_valid = 1;
      t0 = cyc;
      for (int i = 0; i < 100; i++) begin
        logic [2*N-1:0] oa, ob;
        oa = rnd_op('0); ob = rnd_op('0);
        a = oa; b = ob; pa = par(oa); pb = par(ob);
        #1;
        if (!in_ready) begin
          failures++;
          $display("FAIL burst: not ready");
        end
        @(posedge clk);
        exp_q.push_back('{sum: sdv(oa) + sdv(ob), rerr: 1'b0});
        @(negedge clk);
      end
      in_valid = 0;
      while (exp_q.size() != 0) @(posedge clk);
      checks++;
      if (n_delivered - d0 != 100 || cyc - t0 > 102) begin
        failures++;
        $display("FAIL burst: %0d results in %0d cycles", n_delivered - d0, cyc - t0);
      end else n_burst++;
    end

    // 3. transient fault during the first evaluation: unit 5, ADD1 LSB slice
    start_op(rnd_op(bit_at(5)), rnd_op(bit_at(5)));
    force dut.u_array.g_unit[5].u_unit.u_add1.u_lsb.w_bit = 1'b1;
    @(posedge clk); #1;
    force dut.u_array.g_unit[5].u_unit.u_add1.u_lsb.w_bit = 1'b0;
    release dut.u_array.g_unit[5].u_unit.u_add1.u_lsb.w_bit;
    finish_op(lat);
    check_lat(lat, 2, "transient");
    check_status('0, 0, "transient leaves no fault");

    // 4. differing diagnoses (transient in unit 9, then permanent in 20)
    start_op(rnd_op(bit_at(9) | bit_at(20)), rnd_op(bit_at(9) | bit_at(20)));
    force dut.u_array.g_unit[9].u_unit.u_add1.u_lsb.w_bit = 1'b1;
    @(posedge clk); #1;
    force dut.u_array.g_unit[9].u_unit.u_add1.u_lsb.w_bit = 1'b0;
    release dut.u_array.g_unit[9].u_unit.u_add1.u_lsb.w_bit;
    force dut.u_array.g_unit[20].u_unit.u_add2.u_msb.z_bit = 1'b1;
    finish_op(lat);
    check_lat(lat, 4, "rediagnosis then reconfiguration");
    check_status(bit_at(20), 0, "unit 20 retired");
    clean_ops(100, "bypass 20", 1);
    release dut.u_array.g_unit[20].u_unit.u_add2.u_msb.z_bit;

    // 5. permanent fault in unit 37: carry MSB stuck at 1
    do_reset();
    force dut.u_array.g_unit[37].u_unit.u_add1.u_msb.c_bit = 1'b1;
    start_op(rnd_op(bit_at(37)), rnd_op(bit_at(37)));
    finish_op(lat);
    check_lat(lat, 3, "permanent 37");
    check_status(bit_at(37), 0, "unit 37 retired");
    clean_ops(100, "bypass 37", 1);

    // 6. second permanent fault, spare already used: unit 51 now serves
    //    position 50
    force dut.u_array.g_unit[51].u_unit.u_add1.u_lsb.w_bit = 1'b1;
    next_rerr = 1;
    start_op(rnd_op(bit_at(50)), rnd_op(bit_at(50)));
    finish_op(lat);
    check_lat(lat, 2, "no spare left");
    check_status(bit_at(37), 1, "failure with spare in use");
    if (ft_fail) n_nospare++;
    // unchecked delivery after the failure (the fault is still there)
    start_op(rnd_op(bit_at(50)), rnd_op(bit_at(50)));
    finish_op(lat);
    check_lat(lat, 1, "unchecked delivery");
    n_unchecked++;
    release dut.u_array.g_unit[37].u_unit.u_add1.u_msb.c_bit;
    release dut.u_array.g_unit[51].u_unit.u_add1.u_lsb.w_bit;

    // 7. permanent fault in unit 1 and in unit 64 (the spare takes the
    //    most significant position and drives the carry out)
    do_reset();
    force dut.u_array.g_unit[1].u_unit.u_add1.u_msb.w_bit = 1'b1;
    start_op(rnd_op(bit_at(1)), rnd_op(bit_at(1)));
    finish_op(lat);
    check_lat(lat, 3, "permanent 1");
    check_status(bit_at(1), 0, "unit 1 retired");
    clean_ops(100, "bypass 1", 1);
    release dut.u_array.g_unit[1].u_unit.u_add1.u_msb.w_bit;

    do_reset();
    force dut.u_array.g_unit[64].u_unit.u_add2.u_lsb.z_bit = 1'b1;
    start_op(rnd_op(bit_at(64)), rnd_op(bit_at(64)));
    finish_op(lat);
    check_lat(lat, 3, "permanent 64");
    check_status(bit_at(64), 0, "unit 64 retired");
    begin
      int c0;
      c0 = 0;     // results whose carry out (now from the spare) is non-zero
      for (int i = 0; i < 100; i++) begin
        start_op(rnd_op('0), rnd_op('0));
        finish_op(lat);
        check_lat(lat, 1, "bypass 64");
        if (c_out !== 2'b00) c0++;
        n_bypass_ops++;
      end
      if (c0 > 0) n_spare_top++;
    end
    release dut.u_array.g_unit[64].u_unit.u_add2.u_lsb.z_bit;

    // 7b. a diagnosis with two adjacent bits, as when one fault disturbs
    //     positions i and i+1: units 24 and 25 both misbehave during the
    //     two diagnoses, unit 25 recovers once the status register is
    //     loaded. The lowest set bit decides the shift, so unit 24 is
    //     discarded and unit 25, now serving position 24, must be correct.
    do_reset();
    force dut.u_array.g_unit[24].u_unit.u_add1.u_lsb.w_bit = 1'b1;
    force dut.u_array.g_unit[25].u_unit.u_add1.u_lsb.w_bit = 1'b1;
    fork
      begin
        wait (fault_status != '0);
        #1;
        force dut.u_array.g_unit[25].u_unit.u_add1.u_lsb.w_bit = 1'b0;
        release dut.u_array.g_unit[25].u_unit.u_add1.u_lsb.w_bit;
      end
    join_none
    start_op(rnd_op(bit_at(24) | bit_at(25)), rnd_op(bit_at(24) | bit_at(25)));
    finish_op(lat);
    check_lat(lat, 3, "two-bit diagnosis");
    check_status(bit_at(24) | bit_at(25), 0, "units 24 and 25 flagged");
    if (fault_status == (bit_at(24) | bit_at(25)) && !ft_fail) n_two_bit++;
    clean_ops(100, "bypass 24", 1);
    release dut.u_array.g_unit[24].u_unit.u_add1.u_lsb.w_bit;

    // 8. fault in the unprotected carry parity predictor: the error stays
    //    after reconfiguration
    do_reset();
    force dut.ppc[10] = 1'b1;      // position 11
    next_rerr = 1;
    start_op(rnd_op(bit_at(11)), rnd_op(bit_at(11)));
    finish_op(lat);
    check_lat(lat, 3, "verify fails");
    check_status(bit_at(11), 1, "checker fault");
    if (ft_fail) n_verify_fail++;
    release dut.ppc[10];

    do_reset();
    clean_ops(20, "clean after reset", 0);

    // every mechanism must have happened
    begin
      int counts[14];
      string names[14];
      counts = '{n_clean, n_burst, n_error, n_transient, n_rediag, n_permanent, n_ft_ok,
                 n_ft_fail, n_bypass_ops, n_spare_top, n_nospare, n_verify_fail, n_unchecked,
                 n_two_bit};
      names  = '{"clean", "burst", "error", "transient", "rediagnosis", "permanent",
                 "reconfig ok", "ft fail", "bypass ops", "spare at top", "no spare",
                 "verify fail", "unchecked", "two-bit diag"};
      for (int i = 0; i < 14; i++) begin
        $display("mechanism %-13s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
