// tdba: two-dimensional bypassing adder cell of the OBA multiplier.
//
// The cell adds the partial product x & y to the sum s_in and the carry c_in
// that come down from the row above, and bypasses itself in two ways:
//   x = 0        row bypass:    c_out = c (carry from the upper-left cell),
//                               s_out = s_in
//   x = 1, y = 0 column bypass: c_out = 0, s_out = s_in
//   x = 1, y = 1 evaluation:    c_out = c_in | s_in, s_out = ~(c_in ^ s_in)
// This truth table and the two output multiplexers (carry selected by x, sum
// selected by x & y) follow the document. The column bypass drops c_in, so the
// cell may only be placed where c_in is known to be 0 whenever y = 0, or where
// the dropped carry is recovered elsewhere (see oba_array).
//
// In silicon, internal tri-state buffers float the evaluation nodes while the
// cell is bypassed so that they do not switch. Here this is expressed as
// operand isolation: the evaluation logic sees s_in and c_in only while
// x & y = 1. That is a choice of this design; it does not change the function.
//
// Purely combinational; no clock.
module tdba (
  input  logic c,      // carry from the upper-left cell, C(i-1, j+1): row-bypass path
  input  logic x,      // row operand bit X(i)
  input  logic y,      // column operand bit Y(j)
  input  logic s_in,   // sum from above, S(i-1, j+1)
  input  logic c_in,   // carry from above, C(i-1, j)
  output logic c_out,  // C(i, j)
  output logic s_out   // S(i, j)
);

  logic pp;              // partial product, also the enable of the evaluation
  logic s_iso, c_iso;    // isolated operands of the evaluation logic
  logic c_eval, s_eval;

  always_comb begin
    pp     = x & y;
    s_iso  = s_in & pp;
    c_iso  = c_in & pp;
    c_eval = c_iso | s_iso;        // 0 while the column is bypassed
    s_eval = ~(c_iso ^ s_iso);
    c_out  = x  ? c_eval : c;
    s_out  = pp ? s_eval : s_in;
  end

endmodule
