// full_adder: conventional full adder, 2*co + s = p + q + ci, all inputs and
// outputs positively weighted. Used as the "FA" of the S-MB recoding cells and
// as the 3:2 counter of the carry-save tree. Purely combinational.
module full_adder (
  input  logic p,
  input  logic q,
  input  logic ci,
  output logic co,
  output logic s
);
  assign s  = p ^ q ^ ci;
  assign co = (p & q) | (ci & (p ^ q));
endmodule
