// fam: fused add-multiply (FAM) datapath, Z = X * (A + B) + ADDEND.
//
// Instead of adding A and B with a carry-propagate adder and feeding the sum
// to a Modified Booth multiplier, the sum is recoded straight into radix-4
// MB digits by an S-MB recoder (scheme chosen by SCHEME). The rest is a
// conventional MB multiplier:
//   recoder    A, B -> K = num_digits(N) digit triplets
//   mb_encoder one per digit: sign / one / two / cin
//   pp_gen     one row per digit, X * y_j with inverted sign bit, at 2^(2j)
//   cin row    the +1 of every negative digit, bit 2j
//   CT row     correction term -sum_j 2^(N+2j), a constant that replaces the
//              sign extension of all partial products
//   ADDEND row an extra operand fused into the tree (the accumulator of a
//              MAC; tie to zero for a plain FAM)
//   csa_tree   Wallace tree of 3:2 counters down to two rows
//   cla_adder  final carry-look-ahead adder
// All arithmetic is modulo 2^OUT_W; the default OUT_W = 2N+1 holds the exact
// signed product of an N-bit X and the (N+1)-bit sum A+B.
//
// The structure (S-MB recoder, MB encoding, partial products with correction
// term, CSA tree, CLA) follows the fused design; the extra addend row, the
// separate cin row, the tree shape and the adder's grouping are this design's
// choices. Operands are two's complement. Purely combinational.
module fam #(
  parameter int                  N      = 16,
  parameter smb_pkg::smb_scheme_e SCHEME = smb_pkg::SMB2,
  parameter int                  OUT_W  = 2 * N + 1
) (
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  input  logic [N-1:0]     x,
  input  logic [OUT_W-1:0] addend,
  output logic [OUT_W-1:0] z
);
  import smb_pkg::*;

  localparam int K    = num_digits(N);
  localparam int ROWS = K + 3;

  // Correction term: minus one 2^N for every partial product whose sign bit
  // was inverted, modulo 2^OUT_W.
  function automatic logic [OUT_W-1:0] correction();
    logic [OUT_W-1:0] ct = '0;
    for (int j = 0; j < K; j++) begin
      if (N + 2 * j < OUT_W) ct = ct - (OUT_W'(1) << (N + 2 * j));
    end
    return ct;
  endfunction

  localparam logic [OUT_W-1:0] CT = correction();

  mb_triplet_t [K-1:0] y;
  mb_sel_t     [K-1:0] sel;
  logic [N:0]          pp [K];
  logic [OUT_W-1:0]    rows [ROWS];
  logic [OUT_W-1:0]    cin_row;
  logic [OUT_W-1:0]    t_sum, t_carry;

  if (SCHEME == SMB1) begin : g_smb1
    smb1_recoder #(.N(N)) u_rec (.a(a), .b(b), .y(y));
  end else if (SCHEME == SMB3) begin : g_smb3
    smb3_recoder #(.N(N)) u_rec (.a(a), .b(b), .y(y));
  end else begin : g_smb2
    smb2_recoder #(.N(N)) u_rec (.a(a), .b(b), .y(y));
  end

  for (genvar j = 0; j < K; j++) begin : g_digit
    mb_encoder u_enc (.y(y[j]), .sel(sel[j]));
    pp_gen #(.N(N)) u_pp (.x(x), .sel(sel[j]), .pp(pp[j]));
    assign rows[j] = OUT_W'({{(OUT_W){1'b0}}, pp[j]} << (2 * j));
  end

  always_comb begin
    cin_row = '0;
    for (int j = 0; j < K; j++) begin
      if (2 * j < OUT_W) cin_row[2*j] = sel[j].cin;
    end
  end

  assign rows[K]     = cin_row;
  assign rows[K + 1] = CT;
  assign rows[K + 2] = addend;

  csa_tree #(.ROWS(ROWS), .W(OUT_W)) u_tree (
    .rows(rows), .sum(t_sum), .carry(t_carry)
  );

  logic unused_cout;
  cla_adder #(.W(OUT_W)) u_cla (
    .a(t_sum), .b(t_carry), .cin(1'b0), .sum(z), .cout(unused_cout)
  );
endmodule
