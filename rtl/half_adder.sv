// half_adder: conventional half adder, 2*c + s = p + q, all bits positively
// weighted. Used as the "HA" of the S-MB2 recoding cell. Purely combinational.
module half_adder (
  input  logic p,
  input  logic q,
  output logic c,
  output logic s
);
  assign s = p ^ q;
  assign c = p & q;
endmodule
