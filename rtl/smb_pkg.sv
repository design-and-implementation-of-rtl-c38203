// smb_pkg: types and size helpers shared by the sum-to-Modified-Booth (S-MB)
// fused add-multiply datapath.
//
// A Modified Booth (radix-4) digit y_j in {-2,-1,0,+1,+2} is carried between
// blocks as the bit triplet (hi, mid, lo) with value -2*hi + mid + lo, the
// same triplet (y_2j+1, y_2j, y_2j-1) that the usual Booth encoding table
// reads. The S-MB recoders produce such triplets for the sum A+B directly; the
// MB encoder turns each one into sign/one/two selects.
//
// The sum of two N-bit two's complement operands needs N+1 bits. The recoders
// sign-extend both operands to the next even width, SUM_W, and emit
// SUM_W/2 digits, so the digit string always equals A+B exactly (a choice of
// this design; see the README).
package smb_pkg;

  // Which of the three sum-to-MB recoding schemes a datapath uses.
  typedef enum int {
    SMB1 = 1,
    SMB2 = 2,
    SMB3 = 3
  } smb_scheme_e;

  // One MB digit as a bit triplet: value = -2*hi + mid + lo.
  typedef struct packed {
    logic hi;   // negatively weighted bit (y_2j+1 / s_2j+1)
    logic mid;  // y_2j / s_2j
    logic lo;   // y_2j-1 / incoming carry c_2j,2
  } mb_triplet_t;

  // Encoder outputs for one digit (Booth encoding table).
  typedef struct packed {
    logic sign;  // digit is negative: invert the selected multiple
    logic one;   // |digit| == 1: select X
    logic two;   // |digit| == 2: select 2X
    logic cin;   // +1 to complete the two's complement of a negative multiple
  } mb_sel_t;

  // Width of the sign-extended sum, always even.
  function automatic int sum_width(input int n);
    return 2 * ((n + 2) / 2);
  endfunction

  // Number of MB digits of the sum A+B of two n-bit operands.
  function automatic int num_digits(input int n);
    return (n + 2) / 2;
  endfunction

  // Value of a digit triplet, for checking.
  function automatic int digit_value(input mb_triplet_t t);
    return -2 * int'(t.hi) + int'(t.mid) + int'(t.lo);
  endfunction

endpackage
