// Partial-product candidates generator.
//
// Forms, once for all rows, the candidates a Booth row can select: +A, +2A,
// -A and -2A (the fifth, 0, needs no wire). Each candidate is a full two's
// complement value of PP_W = N + 2 bits, so -2A of the most negative A
// (+2^N) is representable. The published design names this generator and its
// five outputs; how they are formed (sign extension, a left shift and a
// negation per candidate) is this design's choice. Purely combinational.
module pp_candidates
  import spst_mult_pkg::*;
(
  input  logic signed [N-1:0] a,     // multiplicand
  output pp_cand_t            cand
);

  pp_t a_ext;

  always_comb begin
    a_ext     = pp_t'(a);
    cand.pos1 = a_ext;
    cand.pos2 = a_ext <<< 1;
    cand.neg1 = -a_ext;
    cand.neg2 = -(a_ext <<< 1);
  end

endmodule
