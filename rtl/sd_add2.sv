// sd_add2: ADD2, the second step of radix-2 signed-digit addition.
//
// Adds the intermediate sum w_i of a position to the carry c_{i-1} coming
// from the position below: z_i = w_i + c_{i-1}. The result is one SD digit in
// canonical code (zero as 2'b00). Like ADD1 it is split into two independent
// bit-slices so that a single fault inside it changes one wire of z_i only,
// which always flips the digit's parity.
//
// Interface: w = w_i, cin = c_{i-1}, z = z_i. Purely combinational.
// The function and the split into slices follow the original description;
// the output for the two impossible input pairs is this design's choice.
module sd_add2
  import sd_pkg::*;
(
  input  sd_digit_t w,
  input  sd_digit_t cin,
  output sd_digit_t z
);

  sd_add2_slice #(.BIT(1)) u_msb (.w(w), .cin(cin), .z_bit(z[1]));
  sd_add2_slice #(.BIT(0)) u_lsb (.w(w), .cin(cin), .z_bit(z[0]));

endmodule
