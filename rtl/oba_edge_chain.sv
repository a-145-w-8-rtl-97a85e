// oba_edge_chain: carry recovery on the right edge of the OBA multiplier.
//
// Row i's first cell (column 0, a TDBA) absorbs its incoming carry C(i-1, 0)
// only when it evaluates, i.e. when x[i] & y[0] = 1. Otherwise that carry,
// which has the weight of product bit i, would be lost. For every row
// i = 2..N-1 a gate picks it out,
//   lost(i) = C(i-1, 0) & ~(x[i] & y[0]),
// and a "+" adder adds it to S(i, 0) and to the carry of the previous row's
// adder, giving product bit i. The carry of row N-1's adder feeds the final
// adder row. Row 1 needs no recovery since row 0 produces no carry.
//
// The gates and the rippling "+" adders are drawn on the right edge of the
// document's overall structure; the exact gate function above is this design's
// reading of them, chosen so that the product is exact for every input.
//
// Interface: x[i] = row operand bit i (rows 2..N-1), first_s[i] = S(i, 0), first_c[i] = C(i, 0) from oba_array;
// p[i] = product bit i for i = 2..N-1; co = carry into the final adder.
// Purely combinational. Requires N >= 4.
module oba_edge_chain #(
  parameter int N = 8
) (
  input  logic [N-1:2] x,
  input  logic         y0,
  input  logic [N-1:2] first_s,
  input  logic [N-2:1] first_c,
  output logic [N-1:2] p,
  output logic         co
);

  logic [N-1:2] lost;     // carry not absorbed by row i's first cell
  logic [N-1:1] chain;    // chain[i] = carry out of row i's adder (chain[1] = 0)

  assign chain[1] = 1'b0;

  for (genvar i = 2; i < N; i++) begin : g_row
    assign lost[i] = first_c[i-1] & ~(x[i] & y0);
    oba_fa u_add (
      .a (first_s[i]),
      .b (lost[i]),
      .ci(chain[i-1]),
      .s (p[i]),
      .co(chain[i])
    );
  end

  assign co = chain[N-1];

endmodule
