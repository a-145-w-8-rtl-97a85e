// oba_final_adder: the bottom row of "+" adders of the OBA multiplier, a
// ripple-carry adder that merges the last array row.
//
// Product bit N+k (k = 0..N-2) is S(N-1, k+1) + C(N-1, k) + the carry of the
// adder to its right; the rightmost adder takes the carry of the edge recovery
// chain, and the last carry out is product bit 2N-1. The document draws this
// row as a chain of "+" boxes; rippling full adders are this design's reading.
//
// Interface: last_s[j] = S(N-1, j) for j = 1..N-1, last_c[j] = C(N-1, j) for
// j = 0..N-2, ci = carry from oba_edge_chain, p = product bits 2N-1..N.
// Purely combinational.
module oba_final_adder #(
  parameter int N = 8
) (
  input  logic [N-1:1] last_s,
  input  logic [N-2:0] last_c,
  input  logic         ci,
  output logic [N-1:0] p
);

  logic [N-1:0] carry;    // carry[k] = carry into the adder of bit N+k

  assign carry[0] = ci;

  for (genvar k = 0; k < N - 1; k++) begin : g_bit
    oba_fa u_add (
      .a (last_s[k+1]),
      .b (last_c[k]),
      .ci(carry[k]),
      .s (p[k]),
      .co(carry[k+1])
    );
  end

  assign p[N-1] = carry[N-1];

endmodule
