// Shared sizes and types of the SPST radix-4 Booth multiplier.
//
// The multiplier takes two 16-bit two's-complement operands, A (multiplicand)
// and B (multiplier, Booth-recoded), and forms a 32-bit product from eight
// partial-product rows. These numbers follow the published 16x16 design.
// The row width is one bit wider than the 17 bits shown in the published
// block diagram: a 17-bit row cannot hold +65536 = -2 * (-32768), the one
// candidate that needs an 18th bit, so every row here is 18 bits wide. The
// widths of the adder tree (20, 24 and 32 bits) are unchanged by this.
//
// booth_sel_t is the output of one Booth encoder, in the form of the
// published partial-product selector: select_m picks +-A, select_2m picks +-2A,
// neg makes the row negative. A zero digit has all three bits low.
package spst_mult_pkg;

  parameter int unsigned N      = 16;          // operand width
  parameter int unsigned NPP    = N / 2;       // partial-product rows (radix 4)
  parameter int unsigned PP_W   = N + 2;       // width of one partial-product row
  parameter int unsigned S1_W   = PP_W + 2;    // first-level sums (20)
  parameter int unsigned S2_W   = S1_W + 4;    // second-level sums (24)
  parameter int unsigned P_W    = 2 * N;       // product (32)
  parameter int unsigned LSP_W  = 8;           // LSP width of every SPST adder

  typedef logic signed [PP_W-1:0] pp_t;

  typedef struct packed {
    logic neg;        // digit is negative (-1 or -2)
    logic select_m;   // |digit| == 1
    logic select_2m;  // |digit| == 2
  } booth_sel_t;

  // The non-zero partial-product candidates; the fifth candidate, 0, is what
  // a row selects when no select line is high.
  typedef struct packed {
    pp_t pos1;  // +A
    pp_t pos2;  // +2A
    pp_t neg1;  // -A
    pp_t neg2;  // -2A
  } pp_cand_t;

endpackage
