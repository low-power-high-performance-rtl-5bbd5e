// SPST detection logic with AND-gate assertion of the close signal.
//
// Given the most significant parts (MSPs) of the two adder operands and the
// carry out of the least significant part (LSP), it decides whether the MSP
// addition is predictable. With
//   a_and = &a_msp   a_nor = ~|a_msp   (likewise for b)
// the MSP result is predictable when each operand's MSP is all ones or all
// zeros: idle = (a_and | a_nor) & (b_and | b_nor). The MSP sum is then
// -a_and - b_and + c_lsp, a value in {-2, -1, 0, +1}, which is rebuilt from
//   carr_ctrl = (c_lsp ^ a_and ^ b_and) & (a_and | a_nor) & (b_and | b_nor)
//   sign      = ~c_lsp & (a_and | b_and) | c_lsp & a_and & b_and
// as {sign, ..., sign, carr_ctrl}. These equations are the published ones.
//
// close is the NAND of the idle condition, then ANDed with close_clk (the
// published "AND gate" assertion): close = 1 keeps the MSP adder's inputs,
// close = 0 zeroes them. Because close_clk is only an AND input, it may rise
// at any point before the result is sampled. carr_ctrl and sign pass without
// gating. a_and and b_and are also brought out for the adder's carry-out
// logic. Purely combinational.
module spst_detect #(
  parameter int unsigned MSP_W = 8
) (
  input  logic [MSP_W-1:0] a_msp,
  input  logic [MSP_W-1:0] b_msp,
  input  logic             c_lsp,      // carry out of the LSP adder
  input  logic             close_clk,  // assertion strobe
  output logic             close,      // 1: MSP adder in use
  output logic             carr_ctrl,  // LSB of the predicted MSP sum
  output logic             sign,       // upper bits of the predicted MSP sum
  output logic             a_and,
  output logic             b_and
);

  logic a_nor, b_nor, idle;

  always_comb begin
    a_and     = &a_msp;
    b_and     = &b_msp;
    a_nor     = ~(|a_msp);
    b_nor     = ~(|b_msp);
    idle      = (a_and | a_nor) & (b_and | b_nor);
    carr_ctrl = (c_lsp ^ a_and ^ b_and) & idle;
    sign      = (~c_lsp & (a_and | b_and)) | (c_lsp & a_and & b_and);
    close     = ~idle & close_clk;
  end

endmodule
