// ha_star: signed half adder HA*. Inputs p and q are positively weighted; the
// carry c is positive and the sum s is negatively weighted, so that
//   2*c - s = p + q,   output value in {0, +1, +2}.
// With every sign inverted (p, q, c negative and s positive) the same gates
// realise the dual HA*, -2*c + s = -p - q, output value in {-2, -1, 0}.
// Equations: s = p xor q, c = p or q. Purely combinational.
module ha_star (
  input  logic p,  // +
  input  logic q,  // +
  output logic c,  // + (weight 2)
  output logic s   // - (weight 1)
);
  assign s = p ^ q;
  assign c = p | q;
endmodule
