// fa_dstar: signed full adder FA**. p and q are negatively weighted, ci is
// positive; the carry co is negative and the sum s positive:
//   -2*co + s = -p - q + ci,   output value in {-2, -1, 0, +1}.
// It is a conventional full adder with ci and s inverted:
//   s = p xor q xor ci,  co = ((p or q) and not ci) or (p and q).
// Purely combinational.
module fa_dstar (
  input  logic p,   // -
  input  logic q,   // -
  input  logic ci,  // +
  output logic co,  // - (weight 2)
  output logic s    // + (weight 1)
);
  assign s  = p ^ q ^ ci;
  assign co = ((p | q) & ~ci) | (p & q);
endmodule
