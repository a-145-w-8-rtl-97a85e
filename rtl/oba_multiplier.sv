// oba_multiplier: N x N unsigned parallel multiplier on the optimized
// bypassing architecture (OBA); N = 8 is the document's design.
//
// Main idea: in an array multiplier, a row whose multiplier bit x[i] is 0 and
// a column whose multiplicand bit y[j] is 0 add nothing, so their adders can
// be skipped to save switching power. Skipping rows and columns at the same
// time can lose a carry that passed a skipped row and then meets a skipped
// column. The OBA therefore mixes two adder cells: the cheap TDBA (row and
// column bypassing) where that cannot happen - the first two rows and the
// first and last columns - and the MRBA (row bypassing only) everywhere else.
//
// Structure: oba_array (the cell array), oba_edge_chain (adds back carries
// not absorbed by the first column and forms product bits 2..N-1) and
// oba_final_adder (ripple adder forming bits N..2N-1). Product bit 0 is
// x[0] & y[0] and bit 1 is the first row's column-0 sum.
//
// Interface: p = x * y, both operands unsigned. Purely combinational: the
// product settles one array delay after the operands change (about 3 ns in
// the document's 0.13 um chip). The document gives no input or output
// registers, so none are added.
module oba_multiplier #(
  parameter int N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  if (N < 4) begin : g_bad_size
    $error("oba_multiplier needs N >= 4");
  end

  logic         p0;
  logic [N-1:1] first_s;
  logic [N-2:1] first_c;
  logic [N-1:1] last_s;
  logic [N-2:0] last_c;
  logic         edge_co;

  oba_array #(.N(N)) u_array (
    .x      (x),
    .y      (y),
    .p0     (p0),
    .first_s(first_s),
    .first_c(first_c),
    .last_s (last_s),
    .last_c (last_c)
  );

  oba_edge_chain #(.N(N)) u_edge (
    .x      (x[N-1:2]),
    .y0     (y[0]),
    .first_s(first_s[N-1:2]),
    .first_c(first_c),
    .p      (p[N-1:2]),
    .co     (edge_co)
  );

  oba_final_adder #(.N(N)) u_final (
    .last_s(last_s),
    .last_c(last_c),
    .ci    (edge_co),
    .p     (p[2*N-1:N])
  );

  assign p[0] = p0;
  assign p[1] = first_s[1];

endmodule
