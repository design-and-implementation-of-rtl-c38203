// pp_gen: Modified Booth partial-product row generator.
//
// Forms one row of the product X * y_j from the encoder selects. Bit i
// (0 <= i <= N) of the row is
//   p_i = (one and (x_i xor sign)) or (two and (x_i-1 xor sign)),
// with x_-1 = 0 and x_N = x_N-1 (sign extension of X). For a negative digit
// the row is the one's complement of |y_j|*X; the missing +1 is the encoder's
// cin, added elsewhere. The row's sign bit p_N is delivered inverted,
// pp[N] = not p_N, so that rows need no sign extension; the constant this
// costs is added once as the correction term of the fused adder tree.
// Row value therefore: not(p_N)*2^N + sum p_i*2^i = X*y_j - cin + 2^N.
// Purely combinational.
module pp_gen #(
  parameter int N = 16
) (
  input  logic [N-1:0]      x,
  input  smb_pkg::mb_sel_t  sel,
  output logic [N:0]        pp
);
  logic [N:0] x_one, x_two, p;

  assign x_one = {x[N-1], x};   // X, sign-extended to N+1 bits
  assign x_two = {x, 1'b0};     // 2X in N+1 bits

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      p[i] = (sel.one & (x_one[i] ^ sel.sign)) | (sel.two & (x_two[i] ^ sel.sign));
    end
    pp = {~p[N], p[N-1:0]};
  end

  // The encoder's cin is added as a row of its own, not here.
  logic unused_cin;
  assign unused_cin = sel.cin;
endmodule
