// ft_controller: sequencer of the fault-tolerant flow.
//
// It runs the detect / recompute / reconfigure flow around the combinational
// adder and its checkers:
//   IDLE    waits for operands (in_ready = 1) and loads them (load_ops).
//   EVAL    the adder has evaluated the loaded operands. No error: the
//           result is delivered and, if new operands are offered, they are
//           loaded in the same cycle (one operation per cycle when fault
//           free). Error: the per-position mismatch vector is kept as the
//           first diagnosis and the same operands are evaluated again.
//   RECOMP  second diagnosis on the reloaded operands. No error: the fault
//           was transient, the (now correct) result is delivered. Same
//           vector as the first diagnosis: the fault is permanent, the vector
//           is written into the fault status register, which switches the
//           unit array to the spare. A different non-zero vector means a
//           transient upset corrupted one of the diagnoses: the new vector
//           replaces the first and the diagnosis is repeated.
//   VERIFY  the operands are evaluated once more on the reconfigured array.
//           No error: fault tolerance succeeded, result delivered. Error:
//           the fault lies in the unprotected checking logic (or no spare is
//           left), ft_fail is set and stays set.
// Once ft_fail is set the checking ability is considered lost: results are
// delivered after one evaluation, with result_err showing the checker output.
// A permanent diagnosis when the spare is already in use goes straight to
// ft_fail, since there is only one spare unit.
//
// The states and their order follow the fault-tolerant flow of the design;
// the handshake (valid/ready), the one-cycle evaluation per state, the
// repeated diagnosis on differing vectors and the behaviour after ft_fail
// are this implementation's choices.
// Timing: a result comes 1 cycle after its operands were accepted when no
// error is seen, 2 cycles after a transient error and 3 cycles after a
// reconfiguration. `deliver` and the ev_* outputs are single-cycle pulses.
module ft_controller #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         err,
  input  logic [N-1:0] err_vec,
  input  logic         spare_used,
  output logic         load_ops,
  output logic         fsr_load,
  output logic [N-1:0] diag,
  output logic         deliver,
  output logic         result_err,
  output logic         ft_fail,
  output logic         ev_error,
  output logic         ev_transient,
  output logic         ev_rediag,
  output logic         ev_permanent,
  output logic         ev_ft_ok,
  output logic         ev_ft_fail
);

  typedef enum logic [1:0] {S_IDLE, S_EVAL, S_RECOMP, S_VERIFY} state_t;

  state_t       state_q, state_d;
  logic [N-1:0] diag_q, diag_d;
  logic         fail_q, fail_d;

  always_comb begin
    state_d      = state_q;
    diag_d       = diag_q;
    fail_d       = fail_q;
    in_ready     = 1'b0;
    load_ops     = 1'b0;
    fsr_load     = 1'b0;
    deliver      = 1'b0;
    result_err   = 1'b0;
    ev_error     = 1'b0;
    ev_transient = 1'b0;
    ev_rediag    = 1'b0;
    ev_permanent = 1'b0;
    ev_ft_ok     = 1'b0;
    ev_ft_fail   = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        in_ready = 1'b1;
        if (in_valid) begin
          load_ops = 1'b1;
          state_d  = S_EVAL;
        end
      end

      S_EVAL: begin
        if (!err || fail_q) begin
          deliver    = 1'b1;
          result_err = err;
          in_ready   = 1'b1;
          if (in_valid) load_ops = 1'b1;
          else          state_d  = S_IDLE;
        end else begin
          ev_error = 1'b1;
          diag_d   = err_vec;
          state_d  = S_RECOMP;
        end
      end

      S_RECOMP: begin
        if (!err) begin
          ev_transient = 1'b1;
          deliver      = 1'b1;
          state_d      = S_IDLE;
        end else if (err_vec == diag_q) begin
          if (spare_used) begin
            ev_ft_fail = 1'b1;
            fail_d     = 1'b1;
            deliver    = 1'b1;
            result_err = 1'b1;
            state_d    = S_IDLE;
          end else begin
            ev_permanent = 1'b1;
            fsr_load     = 1'b1;
            state_d      = S_VERIFY;
          end
        end else begin
          ev_rediag = 1'b1;
          diag_d    = err_vec;
        end
      end

      S_VERIFY: begin
        deliver = 1'b1;
        state_d = S_IDLE;
        if (!err) begin
          ev_ft_ok = 1'b1;
        end else begin
          ev_ft_fail = 1'b1;
          fail_d     = 1'b1;
          result_err = 1'b1;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  assign diag    = diag_q;
  assign ft_fail = fail_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      diag_q  <= '0;
      fail_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      diag_q  <= diag_d;
      fail_q  <= fail_d;
    end
  end

  // A permanent diagnosis can only be stored once two diagnoses agreed
  // (fsr_load is low in reset, so the property needs no reset qualifier).
  a_fsr_after_match: assert property (@(posedge clk)
      fsr_load |-> (state_q == S_RECOMP && err_vec == diag_q && err));

endmodule
