// sd_add1: ADD1, the first step of radix-2 signed-digit addition.
//
// Computes the intermediate carry c_i and intermediate sum w_i of one digit
// position so that w_i + 2*c_i = a_i + b_i, choosing between the two possible
// splits of a_i + b_i = +-1 by the sign of position i-1 (see sd_add1_slice).
// The carry therefore ripples at most one position, which makes the whole
// adder carry-free. The block is made of two independent bit-slices, one for
// the MSBs and one for the LSBs of c and w, so that a single internal fault
// can corrupt at most one wire of each output digit and is always visible to
// the parity checks.
//
// Interface: a = a_i, b = b_i, sgn = {a_{i-1}[1], b_{i-1}[1]} (six input
// wires in all); c = c_i, w = w_i. Purely combinational.
// The rule, the six-input form and the MSB/LSB split follow the original
// description; the slices' internal logic is written behaviourally here.
module sd_add1
  import sd_pkg::*;
(
  input  sd_digit_t  a,
  input  sd_digit_t  b,
  input  logic [1:0] sgn,
  output sd_digit_t  c,
  output sd_digit_t  w
);

  sd_add1_slice #(.BIT(1)) u_msb (.a(a), .b(b), .sgn(sgn), .c_bit(c[1]), .w_bit(w[1]));
  sd_add1_slice #(.BIT(0)) u_lsb (.a(a), .b(b), .sgn(sgn), .c_bit(c[0]), .w_bit(w[0]));

endmodule
