// fa_star: signed full adder FA*. p and ci are positively weighted, q is
// negatively weighted; the carry co is positive and the sum s negative:
//   2*co - s = p - q + ci,   output value in {-1, 0, +1, +2}.
// It is a conventional full adder with q and s inverted:
//   s = p xor q xor ci,  co = ((p or ci) and not q) or (p and ci).
// Purely combinational.
module fa_star (
  input  logic p,   // +
  input  logic q,   // -
  input  logic ci,  // +
  output logic co,  // + (weight 2)
  output logic s    // - (weight 1)
);
  assign s  = p ^ q ^ ci;
  assign co = ((p | ci) & ~q) | (p & ci);
endmodule
