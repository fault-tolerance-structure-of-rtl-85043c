// ft_sd_array: the N-digit fault-tolerant SD adder datapath with one spare
// unit.
//
// Physical units 1..N+1 (unit N+1 is the spare at the most significant end)
// are ft_sd_unit instances. The multiplexer controls C_1..C_N come from the
// fault status register (C_i = b_1 | ... | b_i). Unit j takes the operands of
// position j-1 when C_j is 1 (the spare uses C_N), so every unit from the
// faulty one upward moves its work one place up and the faulty unit is left
// without a use. The carry multiplexer of unit j selects the carry of unit
// j-2 exactly when unit j-1 is the first shifted unit (C_{j-1} & ~C_{j-2}):
// the carry of the unit below the faulty one goes around it. With all C = 0
// the spare adds two zero digits and its outputs are not used.
//
// Output multiplexers put the results back in operand order: logical digit k
// is read from unit k+1 when C_k is 1 and from unit k otherwise; c_out is the
// carry of unit N+1 or of unit N likewise. w and c are returned per logical
// position for the parity checks, which therefore check whichever unit
// currently does the work of each position.
//
// Digit k of a bus occupies bits [2k-1 : 2k-2] (digit 1 is the least
// significant). Purely combinational.
// The units, the spare and the carry-out multiplexer follow the original
// description; the output multiplexers that restore operand order, the
// carry-skip select and the zero inputs of the idle spare are this
// implementation's.
module ft_sd_array
  import sd_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [2*N-1:0] a,
  input  logic [2*N-1:0] b,
  input  logic [N-1:0]   ctl,     // C_1..C_N at bits 0..N-1
  output logic [2*N-1:0] z,
  output logic [2*N-1:0] w,
  output logic [2*N-1:0] c,
  output sd_digit_t      c_out
);

  // Index 0 of these arrays is the (absent) position 0 and index -1 is
  // handled as zero as well; physical units are 1..N+1.
  sd_digit_t  ad [0:N+1];
  sd_digit_t  bd [0:N+1];
  logic       cc [0:N+1];           // C per physical unit, cc[0] = 0
  sd_digit_t  pc [0:N+1];           // carry of each physical unit, pc[0] = 0
  sd_digit_t  pw [1:N+1];
  sd_digit_t  pz [1:N+1];

  always_comb begin
    ad[0] = SD_ZERO;
    bd[0] = SD_ZERO;
    cc[0] = 1'b0;
    for (int k = 1; k <= N; k++) begin
      ad[k] = a[2*k-1 -: 2];
      bd[k] = b[2*k-1 -: 2];
      cc[k] = ctl[k-1];
    end
    ad[N+1] = SD_ZERO;
    bd[N+1] = SD_ZERO;
    cc[N+1] = ctl[N-1];
  end

  assign pc[0] = SD_ZERO;

  for (genvar j = 1; j <= N + 1; j++) begin : g_unit
    logic [1:0] sgn_cur, sgn_prv;
    sd_digit_t  cin_prv;
    logic       cskip;

    assign sgn_cur = {ad[j-1][1], bd[j-1][1]};
    if (j >= 2) begin : g_prv
      assign sgn_prv = {ad[j-2][1], bd[j-2][1]};
      assign cin_prv = pc[j-2];
      assign cskip   = cc[j-1] & ~cc[j-2];
    end else begin : g_first
      assign sgn_prv = 2'b00;
      assign cin_prv = SD_ZERO;
      assign cskip   = 1'b0;
    end

    ft_sd_unit u_unit (
      .a_cur  (ad[j]),
      .a_prv  (ad[j-1]),
      .b_cur  (bd[j]),
      .b_prv  (bd[j-1]),
      .sgn_cur(sgn_cur),
      .sgn_prv(sgn_prv),
      .cin_cur(pc[j-1]),
      .cin_prv(cin_prv),
      .shift  (cc[j]),
      .cskip  (cskip),
      .c      (pc[j]),
      .w      (pw[j]),
      .z      (pz[j])
    );
  end

  always_comb begin
    for (int k = 1; k <= N; k++) begin
      z[2*k-1 -: 2] = cc[k] ? pz[k+1] : pz[k];
      w[2*k-1 -: 2] = cc[k] ? pw[k+1] : pw[k];
      c[2*k-1 -: 2] = cc[k] ? pc[k+1] : pc[k];
    end
    c_out = cc[N] ? pc[N+1] : pc[N];
  end

endmodule
