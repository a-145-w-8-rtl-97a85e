// mrba: modified row-bypassing adder cell of the OBA multiplier.
//
// The cell adds the partial product x & y to the sum s_in and carry c_in from
// the row above, and bypasses itself only by row:
//   x = 0        row bypass:  c_out = c (carry from the upper-left cell),
//                             s_out = s_in
//   x = 1, y = 0 evaluation:  c_out = c_in & s_in, s_out = c_in ^ s_in
//   x = 1, y = 1 evaluation:  c_out = c_in | s_in, s_out = ~(c_in ^ s_in)
// Unlike the TDBA it never drops c_in, which is what makes it safe in the part
// of the array where a carry that passed a bypassed row can arrive at a
// column-bypassed cell. The truth table, the y-controlled choice between the
// AND/OR carry and the XOR/XNOR sum, and the x-controlled output multiplexers
// follow the document.
//
// The internal tri-state buffers of the silicon cell are expressed as operand
// isolation: the evaluation logic sees s_in and c_in only while x = 1. That is
// a choice of this design and does not change the function.
//
// Purely combinational; no clock.
module mrba (
  input  logic c,      // carry from the upper-left cell, C(i-1, j+1): row-bypass path
  input  logic x,      // row operand bit X(i)
  input  logic y,      // column operand bit Y(j)
  input  logic s_in,   // sum from above, S(i-1, j+1)
  input  logic c_in,   // carry from above, C(i-1, j)
  output logic c_out,  // C(i, j)
  output logic s_out   // S(i, j)
);

  logic s_iso, c_iso;    // isolated operands of the evaluation logic
  logic c_eval, s_eval;

  always_comb begin
    s_iso  = s_in & x;
    c_iso  = c_in & x;
    c_eval = y ? (c_iso | s_iso) : (c_iso & s_iso);
    s_eval = y ? ~(c_iso ^ s_iso) : (c_iso ^ s_iso);
    c_out  = x ? c_eval : c;
    s_out  = x ? s_eval : s_in;
  end

endmodule
