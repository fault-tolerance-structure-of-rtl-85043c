// two_rail_checker: reduces M two-rail pairs to one two-rail Error pair.
//
// Each input pair {rails[2m+1], rails[2m]} is a code word (01 or 10) when the
// checker that drives it saw no error. A balanced tree of trc_cell instances
// combines them; the output err_rail is 01 or 10 when every input pair is a
// code word and 00 or 11 as soon as one is not (an error). The pairs are
// padded with the code word 01 up to a power of two. The default M = 3 takes
// the outputs of the three parity checkers; parity_checker reuses the same
// tree with M = N to summarise its per-position comparisons.
// Purely combinational, depth ceil(log2 M) cells.
// The original description names a two-rail checker; the cell used is the
// standard one, and the padding is this implementation's.
module two_rail_checker #(
  parameter int unsigned M = 3
) (
  input  logic [2*M-1:0] rails,
  output logic [1:0]     err_rail
);

  localparam int unsigned L = (M > 1) ? $clog2(M) : 0;
  localparam int unsigned P = 1 << L;

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [1:0] v [P >> l];
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < P; i++) begin : g_in
        if (i < M) begin : g_real
          assign v[i] = rails[2*i+1 -: 2];
        end else begin : g_pad
          assign v[i] = 2'b01;
        end
      end
    end else begin : g_node
      for (genvar i = 0; i < (P >> l); i++) begin : g_cell
        trc_cell u_cell (.x(g_lvl[l-1].v[2*i]), .y(g_lvl[l-1].v[2*i+1]), .o(v[i]));
      end
    end
  end

  assign err_rail = g_lvl[L].v[0];

endmodule
