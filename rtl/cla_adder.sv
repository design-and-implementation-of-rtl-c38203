// cla_adder: carry-look-ahead adder, the final (carry-propagate) adder that
// turns the carry-save pair of the tree into the binary result.
//
// Bits are grouped by 4. Inside a group every carry is computed directly
// from the bit generate/propagate signals g_i = a_i & b_i, p_i = a_i ^ b_i
// and the group carry-in (two-level look-ahead equations); each group also
// forms a group generate G and propagate P, and the group carry-ins are found
// from them with the look-ahead recurrence C_g+1 = G_g | P_g & C_g.
// sum = a + b + cin (mod 2^W), cout the carry out of bit W-1.
// Purely combinational.
module cla_adder #(
  parameter int W = 40
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NG = (W + 3) / 4;
  localparam int WP = 4 * NG;

  logic [WP-1:0] g, p, c;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;

  assign g = WP'(a & b);
  assign p = WP'(a ^ b);

  // Group generate / propagate.
  for (genvar k = 0; k < NG; k++) begin : g_grp
    assign gg[k] = g[4*k+3] | (p[4*k+3] & g[4*k+2]) | (p[4*k+3] & p[4*k+2] & g[4*k+1])
                 | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
    assign gp[k] = &p[4*k +: 4];
  end

  // Group carries.
  assign gc[0] = cin;
  for (genvar k = 0; k < NG; k++) begin : g_gc
    assign gc[k+1] = gg[k] | (gp[k] & gc[k]);
  end

  // Carries inside each group, straight from the group carry-in.
  for (genvar k = 0; k < NG; k++) begin : g_in
    assign c[4*k]   = gc[k];
    assign c[4*k+1] = g[4*k] | (p[4*k] & gc[k]);
    assign c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k]) | (p[4*k+1] & p[4*k] & gc[k]);
    assign c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
                    | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
  end

  assign sum = p[W-1:0] ^ c[W-1:0];
  if (W == WP) begin : g_full
    assign cout = gc[NG];
  end else begin : g_part
    assign cout = g[W-1] | (p[W-1] & c[W-1]);
    // Carry out of the zero padding above bit W-1.
    logic unused_gc;
    assign unused_gc = gc[NG];
  end
endmodule
