// csa_row: one W-bit carry-save (3:2) adder, a row of full adders. Reduces
// three rows x, y, z to a sum row s and a carry row c, with
// s + c = x + y + z (mod 2^W); c is the full-adder carries shifted up one
// place. Purely combinational; building block of csa_tree.
module csa_row #(
  parameter int W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] co;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.p(x[i]), .q(y[i]), .ci(z[i]), .co(co[i]), .s(s[i]));
  end

  // The carry out of the top bit falls outside the modulo-2^W result.
  assign c = {co[W-2:0], 1'b0};
  logic unused_top;
  assign unused_top = co[W-1];
endmodule
