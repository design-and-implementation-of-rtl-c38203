// smb2_recoder: S-MB2 sum-to-Modified-Booth recoder.
//
// Recodes the sum A+B of two N-bit two's complement numbers straight into
// radix-4 Modified Booth digits. Both operands are sign-extended to
// SUM_W = sum_width(N) bits (even), giving K = SUM_W/2 recoding cells, each
// built from conventional and signed half/full adders:
//   HA(a_2j+1, b_2j+1)       -> sum h_j, carry c_2j+2,1 (to the next cell's FA)
//   FA(a_2j, b_2j, c_2j,1)   -> sum s_2j, carry c_2j+1
//   HA*(c_2j+1, h_j)         -> sum s_2j+1 (negatively weighted), carry c_2j+2,2
//   digit y_j = -2*s_2j+1 + s_2j + c_2j,2,    with c_0,1 = c_0,2 = 0.
// Each carry goes at most one cell up, so the delay is a few gates for any N.
// The carries leaving the last cell are dropped; because the operands were
// sign-extended the digits still equal A+B exactly.
//
// The cell structure follows the published S-MB2 scheme; handling signed
// operands by sign extension to an even width is this design's choice.
//
// Interface: a, b in, y[K] out (one mb_triplet_t per digit). Combinational.
module smb2_recoder #(
  parameter  int N = 16,
  localparam int K = smb_pkg::num_digits(N)
) (
  input  logic [N-1:0]                  a,
  input  logic [N-1:0]                  b,
  output smb_pkg::mb_triplet_t [K-1:0]  y
);
  localparam int W = 2 * K;

  logic [W-1:0] ax, bx;
  logic [K:0]   c1, c2;
  logic [K-1:0] s_even, s_odd, c_mid, h_sum;

  assign ax = W'(signed'(a));
  assign bx = W'(signed'(b));
  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;

  for (genvar j = 0; j < K; j++) begin : g_cell
    half_adder u_ha (
      .p(ax[2*j+1]), .q(bx[2*j+1]), .c(c1[j+1]), .s(h_sum[j])
    );
    full_adder u_fa (
      .p(ax[2*j]), .q(bx[2*j]), .ci(c1[j]), .co(c_mid[j]), .s(s_even[j])
    );
    ha_star u_has (
      .p(c_mid[j]), .q(h_sum[j]), .c(c2[j+1]), .s(s_odd[j])
    );
    assign y[j] = '{hi: s_odd[j], mid: s_even[j], lo: c2[j]};
  end

  logic unused_carries;
  assign unused_carries = c1[K] ^ c2[K];
endmodule
