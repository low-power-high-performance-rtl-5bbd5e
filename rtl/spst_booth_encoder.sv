// SPST-equipped modified Booth encoder: produces the eight partial products.
//
// One candidates generator forms +-A and +-2A; eight Booth encoders recode
// the overlapping three-bit groups of B ({B[2x+1], B[2x], B[2x-1]}, B[-1] = 0)
// and eight latch+mux rows (booth_pp_sel) pick each row's partial product
// PPx = digit_x * A, to be weighted by 4^x in the adder tree. Rows 0-3 are
// always open; rows 4-5 take their latch enable from close2 and rows 6-7
// from close1, which the detection unit drops when those rows' digits are
// all zero, so their multiplexers see no input transitions. This structure
// follows the published SPST Booth encoder. Purely combinational.
module spst_booth_encoder
  import spst_mult_pkg::*;
(
  input  logic signed [N-1:0] a,       // multiplicand
  input  logic        [N-1:0] b,       // multiplier (Booth-recoded)
  input  logic                close1,  // 1: rows NPP-2..NPP-1 in use
  input  logic                close2,  // 1: rows NPP-4..NPP-3 in use
  output pp_t                 pp [NPP]
);

  pp_cand_t          cand;
  logic [N:0]        b_ext;   // {B, B[-1] = 0}
  logic [NPP-1:0]    row_en;

  assign b_ext = {b, 1'b0};

  pp_candidates u_cand (.a(a), .cand(cand));

  always_comb begin
    for (int unsigned x = 0; x < NPP; x++) begin
      if (x >= NPP - 2)      row_en[x] = close1;
      else if (x >= NPP - 4) row_en[x] = close2;
      else                   row_en[x] = 1'b1;
    end
  end

  for (genvar x = 0; x < NPP; x++) begin : g_row
    booth_sel_t sel;
    booth_enc    u_enc (.grp(b_ext[2*x+2 -: 3]), .sel(sel));
    booth_pp_sel u_sel (.cand(cand), .sel(sel), .enable(row_en[x]), .pp(pp[x]));
  end

endmodule
