// trc_cell: the basic two-rail checker cell.
//
// A two-rail pair (r1, r0) is a code word when r1 != r0. The cell combines
// two pairs x and y into one: f = x1&y1 | x0&y0 and g = x1&y0 | x0&y1. The
// output is a code word exactly when both inputs are, so a tree of cells
// reduces any number of pairs to a single pair while staying self-checking
// (a fault inside a cell also turns the output into a non-code word for some
// input). Purely combinational.
module trc_cell (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic [1:0] o
);

  assign o[1] = (x[1] & y[1]) | (x[0] & y[0]);
  assign o[0] = (x[1] & y[0]) | (x[0] & y[1]);

endmodule
