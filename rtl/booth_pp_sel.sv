// One partial-product row of the SPST-equipped Booth encoder: latch and mux.
//
// The candidate bus first passes the row's data-controlling "latch", which,
// as in the published SPST circuits, is a bank of AND gates: with enable high
// the candidates pass unchanged, with enable low they are forced to zero, so
// no transition reaches the multiplexer of a row that is known to be zero.
// The multiplexer then picks the candidate named by the row's Booth digit
// (AND-OR selection on select_m, select_2m and neg); a zero digit selects 0.
// Purely combinational.
module booth_pp_sel
  import spst_mult_pkg::*;
(
  input  pp_cand_t    cand,    // candidates from pp_candidates
  input  booth_sel_t  sel,     // digit from booth_enc
  input  logic        enable,  // 1: row in use, 0: row closed (inputs frozen at 0)
  output pp_t         pp
);

  pp_cand_t cand_l;

  always_comb begin
    cand_l = cand & {$bits(pp_cand_t){enable}};
    pp = ({PP_W{sel.select_m  & ~sel.neg}} & cand_l.pos1)
       | ({PP_W{sel.select_2m & ~sel.neg}} & cand_l.pos2)
       | ({PP_W{sel.select_m  &  sel.neg}} & cand_l.neg1)
       | ({PP_W{sel.select_2m &  sel.neg}} & cand_l.neg2);
  end

endmodule
