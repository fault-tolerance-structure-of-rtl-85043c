// sd_pkg: shared types and helpers of the fault-tolerant radix-2 signed-digit
// (SD) adder.
//
// A radix-2 SD digit takes the values -1, 0 and +1 and is carried on two wires
// {neg, pos}: 2'b01 is +1, 2'b10 is -1, and 2'b00 or 2'b11 are 0. The value
// of a digit d is therefore d[0] - d[1], and its parity P(d) = d[1] ^ d[0] is 1
// exactly when the digit is non-zero. This coding (zero as 00/11, +1 as 01,
// -1 as 10) is the one the design is built around; every block in this design
// produces 2'b00 for zero, the 2'b11 form is only accepted.
// The code comes from the original description of the adder; always
// producing 2'b00 is this implementation's choice.
package sd_pkg;

  typedef logic [1:0] sd_digit_t;

  localparam sd_digit_t SD_ZERO = 2'b00;
  localparam sd_digit_t SD_POS  = 2'b01;
  localparam sd_digit_t SD_NEG  = 2'b10;

  // Integer value of one digit: -1, 0 or +1.
  function automatic int sd_val(input sd_digit_t d);
    return int'(d[0]) - int'(d[1]);
  endfunction

  // Canonical code of a value in -1..+1 (anything else maps to zero).
  function automatic sd_digit_t sd_enc(input int v);
    case (v)
      1:       return SD_POS;
      -1:      return SD_NEG;
      default: return SD_ZERO;
    endcase
  endfunction

  // Parity of a digit: 1 for a non-zero digit.
  function automatic logic sd_par(input sd_digit_t d);
    return d[1] ^ d[0];
  endfunction

endpackage
