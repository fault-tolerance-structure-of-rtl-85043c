// sd_add2_slice: one bit-slice of ADD2, the second step of radix-2 SD
// addition, z_i = w_i + c_{i-1}.
//
// ADD1 guarantees that w_i and c_{i-1} are never both +1 or both -1, so the
// sum always fits one digit. BIT=1 computes only z[1] (z = -1), BIT=0 only
// z[0] (z = +1); the two slices share no logic, so one internal fault can
// change only one wire of z. For the two impossible input pairs (+1,+1) and
// (-1,-1) the slices give zero. Purely combinational.
module sd_add2_slice
  import sd_pkg::*;
#(
  parameter int unsigned BIT = 0   // 1: MSB slice, 0: LSB slice
) (
  input  sd_digit_t w,
  input  sd_digit_t cin,
  output logic      z_bit
);

  int s;

  always_comb begin
    s = sd_val(w) + sd_val(cin);
    if (BIT == 1) z_bit = (s == -1);
    else          z_bit = (s == 1);
  end

endmodule
