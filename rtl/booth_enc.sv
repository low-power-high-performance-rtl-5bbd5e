// Radix-4 modified Booth encoder for one group of the multiplier.
//
// A group is three adjacent multiplier bits {B[2x+1], B[2x], B[2x-1]}, with
// B[-1] = 0 for the first group; neighbouring groups overlap by one bit. The
// group is recoded into one signed digit in {-2, -1, 0, +1, +2} following the
// standard recoding table:
//   000 -> 0   001 -> +1   010 -> +1   011 -> +2
//   100 -> -2  101 -> -1   110 -> -1   111 -> 0
// The digit leaves as three select lines (see booth_sel_t): select_m is the
// XOR of the two low bits, select_2m detects 011 and 100, and neg is the top
// bit except for 111, which is a zero digit. Giving a zero digit no sign is
// this design's choice, so that every zero row is all-zero. Purely combinational.
module booth_enc
  import spst_mult_pkg::*;
(
  input  logic [2:0]  grp,  // {B[2x+1], B[2x], B[2x-1]}
  output booth_sel_t  sel
);

  always_comb begin
    sel.select_m  = grp[1] ^ grp[0];
    sel.select_2m = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    sel.neg       = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
