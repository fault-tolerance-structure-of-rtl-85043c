// sd_add1_slice: one bit-slice of ADD1, the first step of radix-2 SD addition.
//
// ADD1 of position i forms the intermediate carry c_i and sum w_i with
// w_i + 2*c_i = a_i + b_i. Whenever a_i + b_i = +-1 there are two choices, and
// the one taken looks at the sign of position i-1 so that ADD2 of position i+1
// never sees w and c of the same non-zero sign. With the two-wire coding only
// the MSBs (the "negative" wires) of a_{i-1} and b_{i-1} are needed:
//   a_i+b_i = +1: neither a_{i-1} nor b_{i-1} negative -> c=+1, w=-1,
//                 otherwise                              -> c= 0, w=+1
//   a_i+b_i = -1: a_{i-1} or b_{i-1} negative           -> c=-1, w=+1,
//                 otherwise                              -> c= 0, w=-1
//   a_i+b_i = +-2 -> c=+-1, w=0;  a_i+b_i = 0 -> c=0, w=0.
// For a stuck-at fault to change at most one wire of a digit, ADD1 is built
// from two independent slices: BIT=1 computes only c[1] and w[1] (the MSBs),
// BIT=0 only c[0] and w[0]. Each slice decodes the six inputs on its own and
// shares no logic with the other.
//
// Interface: a, b = a_i, b_i; sgn = {a_{i-1}[1], b_{i-1}[1]}. Purely
// combinational. Digits at the inputs are expected in the canonical form
// (zero as 2'b00): a zero coded 2'b11 at position i-1 would read as negative.
module sd_add1_slice
  import sd_pkg::*;
#(
  parameter int unsigned BIT = 0   // 1: MSB slice, 0: LSB slice
) (
  input  sd_digit_t a,
  input  sd_digit_t b,
  input  logic [1:0] sgn,
  output logic      c_bit,
  output logic      w_bit
);

  int   s;
  logic neg_prev;
  int   cv, wv;

  always_comb begin
    s        = sd_val(a) + sd_val(b);
    neg_prev = sgn[1] | sgn[0];
    cv = 0;
    wv = 0;
    case (s)
      2:  begin cv = 1;  wv = 0; end
      1:  if (!neg_prev) begin cv = 1; wv = -1; end
          else           begin cv = 0; wv = 1;  end
      -1: if (neg_prev)  begin cv = -1; wv = 1;  end
          else           begin cv = 0;  wv = -1; end
      -2: begin cv = -1; wv = 0; end
      default: begin cv = 0; wv = 0; end
    endcase
    if (BIT == 1) begin
      c_bit = (cv == -1);
      w_bit = (wv == -1);
    end else begin
      c_bit = (cv == 1);
      w_bit = (wv == 1);
    end
  end

endmodule
