// Detection unit of the SPST-equipped Booth encoder.
//
// Looks only at the Booth-recoded operand B. A Booth digit is zero when its
// three bits are equal, so the two top rows (PP6, PP7) are zero exactly when
// B[15:11] are all ones or all zeros, and the four top rows (PP4..PP7) are
// zero when B[15:7] are. In those cases the detection unit closes the rows:
//   close1 = 0 : rows 6-7 closed     close2 = 0 : rows 4-5 closed
// (rows 6-7 close whenever rows 4-7 do, because B[15:7] uniform implies
// B[15:11] uniform). The published design names the unit, its single operand
// input and the two outputs Close 1 and Close 2, and says which rows each
// case freezes; the bit ranges above follow from the Booth grouping.
//
// Assertion: like the SPST detection logic, both outputs pass an AND gate
// with close_clk, so the rows are only opened once close_clk is high. A
// close signal is high (active) while the rows are in use, as with the
// AND-gate latches it drives. The whole of B enters the unit, as drawn in
// the published diagram, although only B[15:7] decide. Purely
// combinational; the product register downstream must sample while
// close_clk is high.
module booth_detect
  import spst_mult_pkg::*;
(
  input  logic [N-1:0] b,          // Booth-recoded operand
  input  logic         close_clk,  // assertion strobe
  output logic         close1,     // 1: rows NPP-2..NPP-1 in use
  output logic         close2      // 1: rows NPP-4..NPP-3 in use
);

  localparam int unsigned LO1 = 2 * (NPP - 2) - 1;  // 11 for N = 16
  localparam int unsigned LO2 = 2 * (NPP - 4) - 1;  //  7 for N = 16

  logic top2_zero, top4_zero;

  always_comb begin
    top2_zero = (&b[N-1:LO1]) | ~(|b[N-1:LO1]);
    top4_zero = (&b[N-1:LO2]) | ~(|b[N-1:LO2]);
    close1    = ~top2_zero & close_clk;
    close2    = ~top4_zero & close_clk;
  end

endmodule
