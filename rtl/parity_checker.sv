// parity_checker: position-by-position comparison of two parity vectors.
//
// For every position i the pair {x_i, ~y_i} is formed; it is a two-rail code
// word exactly when x_i == y_i. The N pairs go through a two-rail checker
// tree, so `rail` is 01/10 when all positions agree and 00/11 otherwise. The
// per-position result `mismatch` (x_i ^ y_i) is brought out as well: it is
// what the fault status register stores to locate the faulty unit.
// Three instances check the adder: P(w) against P(a)^P(b), P(z) against
// P(w)^P(c_{i-1}), and P(c) against the predicted carry parity.
// Purely combinational.
// The three checkers and their equations follow the original description;
// the {x_i, ~y_i} pair coding and the mismatch output are this
// implementation's.
module parity_checker #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] mismatch,
  output logic [1:0]   rail
);

  logic [2*N-1:0] pairs;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pairs[2*i+1] = x[i];
      pairs[2*i]   = ~y[i];
    end
    mismatch = x ^ y;
  end

  two_rail_checker #(.M(N)) u_tree (.rails(pairs), .err_rail(rail));

endmodule
