// ha_dstar: signed half adder HA**. Input p is negatively and q positively
// weighted; the carry c is positive and the sum s negative, so that
//   2*c - s = -p + q,   output value in {-1, 0, +1}.
// Equations: s = p xor q, c = (not p) and q. Purely combinational.
module ha_dstar (
  input  logic p,  // -
  input  logic q,  // +
  output logic c,  // + (weight 2)
  output logic s   // - (weight 1)
);
  assign s = p ^ q;
  assign c = ~p & q;
endmodule
