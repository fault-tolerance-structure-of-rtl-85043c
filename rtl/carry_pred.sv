// carry_pred: carry parity prediction, Prediction_P(c_i).
//
// Computes, independently of ADD1, whether the carry c_i of each position
// will be non-zero, from the same six wires ADD1 sees: a_i[1:0], b_i[1:0],
// a_{i-1}[1] and b_{i-1}[1]. The carry is non-zero when a_i and b_i are both
// non-zero with the same sign (sum +-2), or when exactly one of them is
// non-zero and the rule for a sum of +-1 takes the carry: a positive digit
// with no negative MSB below, or a negative digit with one below. Comparing
// this with P(c_i) from the adder catches a wrong carry at the position that
// produced it rather than at the position that consumes it.
// Bit i-1 of ppc is position i. Purely combinational.
// The six inputs and the function follow the original description; the
// sum-of-products form is this implementation's.
module carry_pred #(
  parameter int unsigned N = 64
) (
  input  logic [2*N-1:0] a,
  input  logic [2*N-1:0] b,
  output logic [N-1:0]   ppc
);

  logic na, nb, sa, sb, below_neg, one_neg;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      na = a[2*i+1] ^ a[2*i];          // a_i non-zero
      nb = b[2*i+1] ^ b[2*i];
      sa = a[2*i+1] & ~a[2*i];         // a_i = -1
      sb = b[2*i+1] & ~b[2*i];
      below_neg = (i == 0) ? 1'b0 : (a[2*i-1] | b[2*i-1]);
      one_neg   = (na & sa) | (nb & sb);
      ppc[i] = (na & nb & ~(sa ^ sb)) | ((na ^ nb) & ~(one_neg ^ below_neg));
    end
  end

endmodule
