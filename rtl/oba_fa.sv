// oba_fa: one-bit full adder, the "+" element of the OBA multiplier's edge
// recovery chain and of its final adder row.
//
// s = a ^ b ^ ci, co = majority(a, b, ci). The document draws these adders
// only as boxes; a plain full adder is this design's reading of them.
// Purely combinational.
module oba_fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
