// parity_gen: the parallel XOR gates of the checking logic.
//
// Forms, for every digit position i = 1..N, the parities P(w_i), P(c_i) and
// P(z_i) of the intermediate sum, the carry and the result. With the
// two-wire digit code the parity of a digit is the XOR of its two wires and
// is 1 for a non-zero digit. One XOR gate per digit, no trees, so the delay
// does not grow with N. Bit i-1 of each output is position i.
// Purely combinational.
// Follows the original description (parallel XOR gates).
module parity_gen #(
  parameter int unsigned N = 64
) (
  input  logic [2*N-1:0] w,
  input  logic [2*N-1:0] c,
  input  logic [2*N-1:0] z,
  output logic [N-1:0]   pw,
  output logic [N-1:0]   pc,
  output logic [N-1:0]   pz
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pw[i] = w[2*i+1] ^ w[2*i];
      pc[i] = c[2*i+1] ^ c[2*i];
      pz[i] = z[2*i+1] ^ z[2*i];
    end
  end

endmodule
