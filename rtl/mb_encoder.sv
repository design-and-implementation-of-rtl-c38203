// mb_encoder: radix-4 Modified Booth encoder for one digit.
//
// Takes the bit triplet (hi, mid, lo) = (y_2j+1, y_2j, y_2j-1), whose value
// is -2*hi + mid + lo, and produces the selects used by the partial-product
// generator, following the Booth encoding table:
//   sign = hi                                  (digit negative)
//   one  = mid xor lo                          (|digit| = 1)
//   two  = (hi xor mid) and not (mid xor lo)   (|digit| = 2)
//   cin  = hi and not (mid and lo)             (+1 completing -X or -2X;
//                                               0 for the triplet 111, digit 0)
// Purely combinational.
module mb_encoder (
  input  smb_pkg::mb_triplet_t y,
  output smb_pkg::mb_sel_t     sel
);
  logic x_ml;

  assign x_ml     = y.mid ^ y.lo;
  assign sel.sign = y.hi;
  assign sel.one  = x_ml;
  assign sel.two  = (y.hi ^ y.mid) & ~x_ml;
  assign sel.cin  = y.hi & ~(y.mid & y.lo);
endmodule
