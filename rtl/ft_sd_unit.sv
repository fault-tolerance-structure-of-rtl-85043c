// ft_sd_unit: one reconfigurable unit of the fault-tolerant SD adder.
//
// A unit is an ADD1/ADD2 pair with 2:1 multiplexers in front of it. When
// `shift` is 0 the unit adds the digits of its own position i: a_i, b_i, the
// sign wires {a_{i-1}[1], b_{i-1}[1]}. When `shift` is 1 it takes everything
// from one position lower: a_{i-1}, b_{i-1} and {a_{i-2}[1], b_{i-2}[1]}, so
// that the units above a faulty one can take over its work, the spare unit at
// the top absorbing the last position. The carry multiplexer normally feeds
// ADD2 with c_{i-1} from the unit just below; `cskip` selects c_{i-2} instead,
// which bridges the carry across a discarded unit.
//
// The unit's three operand multiplexers and its carry multiplexer follow the
// structure of the design; the separate `cskip` select for the carry is this
// implementation's reading of how the carry of unit i-1 reaches unit i+1.
// Purely combinational.
module ft_sd_unit
  import sd_pkg::*;
(
  input  sd_digit_t  a_cur,
  input  sd_digit_t  a_prv,
  input  sd_digit_t  b_cur,
  input  sd_digit_t  b_prv,
  input  logic [1:0] sgn_cur,
  input  logic [1:0] sgn_prv,
  input  sd_digit_t  cin_cur,
  input  sd_digit_t  cin_prv,
  input  logic       shift,
  input  logic       cskip,
  output sd_digit_t  c,
  output sd_digit_t  w,
  output sd_digit_t  z
);

  sd_digit_t  a_m, b_m, cin_m;
  logic [1:0] sgn_m;

  always_comb begin
    a_m   = shift ? a_prv   : a_cur;
    b_m   = shift ? b_prv   : b_cur;
    sgn_m = shift ? sgn_prv : sgn_cur;
    cin_m = cskip ? cin_prv : cin_cur;
  end

  sd_add1 u_add1 (.a(a_m), .b(b_m), .sgn(sgn_m), .c(c), .w(w));
  sd_add2 u_add2 (.w(w), .cin(cin_m), .z(z));

endmodule
