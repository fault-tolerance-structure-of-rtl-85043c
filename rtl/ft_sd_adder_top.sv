// ft_sd_adder_top: fault-tolerant N-digit radix-2 signed-digit adder.
//
// Two SD operands A and B (N digits of two wires each, digit i at bits
// [2i-1:2i-2]) arrive with the parity of each of their digits, P(A) and P(B),
// computed where the operands were produced. They are held in operand
// registers so that they can be reloaded for recomputation. The datapath is a
// carry-free SD adder made of N+1 reconfigurable units, one of them a spare.
// Three on-line parity checks guard every digit position i:
//   checker 1  P(w_i) = P(a_i) ^ P(b_i)              property (5)
//   checker 2  P(z_i) = P(w_i) ^ P(c_{i-1})          property (4)
//   checker 3  P(c_i) = Prediction_P(c_i)            property (6), from an
//                                                    independent predictor
// Their two-rail outputs are combined by a two-rail checker into the 2-bit
// Error pair (01/10 fine, 00/11 error); their per-position mismatches,
// ORed, locate the faulty position. The controller recomputes once on an
// error, and if the second diagnosis equals the first it writes the vector
// into the fault status register, whose running OR drives the unit
// multiplexers so the faulty unit is bypassed by the spare, then checks the
// operation again.
//
// Interface: valid/ready operand handshake (in_valid, in_ready); the result
// z, c_out comes with a one-cycle out_valid pulse, 1 cycle after acceptance
// when clean, 2 after a transient error, 3 after a reconfiguration. The sum
// is z + c_out * 2^N in SD value. Status and one-cycle event outputs expose
// the fault-tolerance mechanism. Asynchronous active-low reset clears the
// fault status register.
// The blocks and their connections follow the original description; the
// operand and result registers, the handshake and the status and event
// outputs are this implementation's.
module ft_sd_adder_top
  import sd_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [2*N-1:0] a,
  input  logic [2*N-1:0] b,
  input  logic [N-1:0]   pa,
  input  logic [N-1:0]   pb,
  output logic           out_valid,
  output logic [2*N-1:0] z,
  output sd_digit_t      c_out,
  output logic           result_err,
  output logic [1:0]     err_rail,
  output logic [N-1:0]   fault_status,
  output logic           reconfigured,
  output logic           ft_fail,
  output logic           ev_error,
  output logic           ev_transient,
  output logic           ev_rediag,
  output logic           ev_permanent,
  output logic           ev_ft_ok,
  output logic           ev_ft_fail
);

  // Operand registers
  logic [2*N-1:0] a_q, b_q;
  logic [N-1:0]   pa_q, pb_q;
  logic           load_ops;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      pa_q <= '0;
      pb_q <= '0;
    end else if (load_ops) begin
      a_q  <= a;
      b_q  <= b;
      pa_q <= pa;
      pb_q <= pb;
    end
  end

  // Datapath
  logic [N-1:0]   ctl;
  logic [2*N-1:0] zs, ws, cs;
  sd_digit_t      cout_s;

  ft_sd_array #(.N(N)) u_array (
    .a(a_q), .b(b_q), .ctl(ctl), .z(zs), .w(ws), .c(cs), .c_out(cout_s)
  );

  // Checking logic
  logic [N-1:0] pw, pc, pz, ppc;
  logic [N-1:0] mm1, mm2, mm3, err_vec;
  logic [1:0]   rail1, rail2, rail3;
  logic         err;

  parity_gen #(.N(N)) u_pgen (.w(ws), .c(cs), .z(zs), .pw(pw), .pc(pc), .pz(pz));
  carry_pred #(.N(N)) u_cpred (.a(a_q), .b(b_q), .ppc(ppc));

  // checker 1: property (5), checker 2: property (4), checker 3: property (6)
  parity_checker #(.N(N)) u_chk1 (.x(pw), .y(pa_q ^ pb_q),              .mismatch(mm1), .rail(rail1));
  parity_checker #(.N(N)) u_chk2 (.x(pz), .y(pw ^ {pc[N-2:0], 1'b0}), .mismatch(mm2), .rail(rail2));
  parity_checker #(.N(N)) u_chk3 (.x(pc), .y(ppc),                      .mismatch(mm3), .rail(rail3));

  two_rail_checker #(.M(3)) u_trc (.rails({rail3, rail2, rail1}), .err_rail(err_rail));

  assign err     = (err_rail[1] == err_rail[0]);
  assign err_vec = mm1 | mm2 | mm3;

  // Diagnosis and reconfiguration
  logic         fsr_load, deliver, res_err;
  logic [N-1:0] diag;

  fault_status_reg #(.N(N)) u_fsr (
    .clk(clk), .rst_n(rst_n), .load(fsr_load), .diag(diag), .status(fault_status), .ctl(ctl)
  );

  assign reconfigured = |fault_status;

  ft_controller #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .err(err), .err_vec(err_vec), .spare_used(reconfigured),
    .load_ops(load_ops), .fsr_load(fsr_load), .diag(diag),
    .deliver(deliver), .result_err(res_err), .ft_fail(ft_fail),
    .ev_error(ev_error), .ev_transient(ev_transient), .ev_rediag(ev_rediag),
    .ev_permanent(ev_permanent), .ev_ft_ok(ev_ft_ok), .ev_ft_fail(ev_ft_fail)
  );

  // Result registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      z          <= '0;
      c_out      <= SD_ZERO;
      result_err <= 1'b0;
    end else begin
      out_valid <= deliver;
      if (deliver) begin
        z          <= zs;
        c_out      <= cout_s;
        result_err <= res_err;
      end
    end
  end

endmodule
