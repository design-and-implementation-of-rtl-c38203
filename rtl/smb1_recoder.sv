// smb1_recoder: S-MB1 sum-to-Modified-Booth recoder.
//
// Recodes the sum A+B of two N-bit two's complement numbers straight into
// radix-4 Modified Booth digits, without a carry-propagate adder. Both operands
// are sign-extended to SUM_W = sum_width(N) bits (even), giving K = SUM_W/2
// recoding cells. Cell j sees a_2j, b_2j, a_2j+1, b_2j+1 and two incoming
// carries c_2j,1 and c_2j,2 (both zero for cell 0) and produces
//   conventional FA(a_2j, b_2j, c_2j,1)        -> sum s_2j, carry c_2j+1
//   FA*(p = a_2j+1, q = b_2j+1 (-), ci = c_2j+1) -> sum s_2j+1 (-), carry c_2j+2,2
//   c_2j+2,1 = b_2j+1, passed on at twice its weight (b = 2b - b)
// and digit y_j = -2*s_2j+1 + s_2j + c_2j,2. No carry travels further than
// one cell, so the delay does not grow with N. The carries leaving the last
// cell are dropped; since the operands were sign-extended, the digit string
// still equals A+B exactly.
//
// The use of FA and FA* in the cell follows the description of the scheme;
// how b_2j+1 is split and which carry feeds the FA and which the digit is
// this design's own choice, made so that no carry ripples. In the most
// significant cell the odd-position adder is an FA** read with all signs
// inverted, which is the same function as the FA* of the other cells.
//
// Interface: a, b in, y[K] out (one mb_triplet_t per digit). Combinational.
module smb1_recoder #(
  parameter  int N = 16,
  localparam int K = smb_pkg::num_digits(N)
) (
  input  logic [N-1:0]                  a,
  input  logic [N-1:0]                  b,
  output smb_pkg::mb_triplet_t [K-1:0]  y
);
  localparam int W = 2 * K;

  logic [W-1:0] ax, bx;
  logic [K:0]   c1, c2;       // c_2j,1 and c_2j,2 entering cell j
  logic [K-1:0] s_even, s_odd, c_mid;

  assign ax = W'(signed'(a));
  assign bx = W'(signed'(b));
  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;

  for (genvar j = 0; j < K; j++) begin : g_cell
    full_adder u_fa (
      .p(ax[2*j]), .q(bx[2*j]), .ci(c1[j]), .co(c_mid[j]), .s(s_even[j])
    );
    if (j < K - 1) begin : g_star
      fa_star u_fas (
        .p(ax[2*j+1]), .q(bx[2*j+1]), .ci(c_mid[j]), .co(c2[j+1]), .s(s_odd[j])
      );
    end else begin : g_dstar
      // FA** in its sign-inverted reading: p, q positive, ci negative.
      fa_dstar u_fads (
        .p(ax[2*j+1]), .q(c_mid[j]), .ci(bx[2*j+1]), .co(c2[j+1]), .s(s_odd[j])
      );
    end
    assign c1[j+1] = bx[2*j+1];
    assign y[j] = '{hi: s_odd[j], mid: s_even[j], lo: c2[j]};
  end

  // Carries out of the last cell are beyond the sign-extended width.
  logic unused_carries;
  assign unused_carries = c1[K] ^ c2[K];
endmodule
