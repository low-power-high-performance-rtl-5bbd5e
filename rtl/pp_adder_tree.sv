// Partial-product adder tree of the SPST multiplier.
//
// Adds the eight Booth rows, PPx weighted by 4^x, in three levels, as in the
// published tree:
//   level 1: S1[k] = PP[2k] + 4*PP[2k+1]        k = 0..3, 20 bits each
//   level 2: S2[m] = S1[2m] + 16*S1[2m+1]       m = 0..1, 24 bits each
//   final:   P     = S2[0] + 256*S2[1]          32 bits
// Every operand is sign-extended to its adder's width before the add, so each
// adder is an ordinary two-operand adder. The adders on the PP4..PP7 side
// (S1[2], S1[3] and S2[1]) are SPST adders with an 8-bit LSP, because those
// rows are the ones that are zero or small when B is small; the other three
// are plain adders. Which adders carry SPST and the 8-bit LSPs follow the
// published tree; the published MSP widths (9 and 12) are the operand bits
// above the LSP, and here each MSP also covers the adder's sign-extension
// bits, which gives the same result.
//
// Timing: combinational; the sum is valid while close_clk is high.
// msp_open reports, per SPST adder (S1[2], S1[3], S2[1]), whether its MSP
// adder was in use.
module pp_adder_tree
  import spst_mult_pkg::*;
(
  input  pp_t              pp [NPP],
  input  logic             close_clk,
  output logic [P_W-1:0]   sum,
  output logic [2:0]       msp_open
);

  logic signed [S1_W-1:0] s1_x [4], s1_y [4], s1 [4];
  logic signed [S2_W-1:0] s2_x [2], s2_y [2], s2 [2];
  logic signed [P_W-1:0]  p_x, p_y;
  logic                   unused_cout [3];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      s1_x[k] = S1_W'(pp[2*k]);
      s1_y[k] = S1_W'(pp[2*k+1]) <<< 2;
    end
    for (int m = 0; m < 2; m++) begin
      s2_x[m] = S2_W'(s1[2*m]);
      s2_y[m] = S2_W'(s1[2*m+1]) <<< 4;
    end
    p_x = P_W'(s2[0]);
    p_y = P_W'(s2[1]) <<< 8;
  end

  // Plain first-level adders (PP0..PP3)
  assign s1[0] = s1_x[0] + s1_y[0];
  assign s1[1] = s1_x[1] + s1_y[1];

  // SPST first-level adders (PP4..PP7)
  spst_adder #(.W(S1_W), .LSP_W(LSP_W)) u_s1_2 (
    .a(s1_x[2]), .b(s1_y[2]), .cin(1'b0), .sub(1'b0), .close_clk(close_clk),
    .sum(s1[2]), .cout(unused_cout[0]), .close(msp_open[0])
  );
  spst_adder #(.W(S1_W), .LSP_W(LSP_W)) u_s1_3 (
    .a(s1_x[3]), .b(s1_y[3]), .cin(1'b0), .sub(1'b0), .close_clk(close_clk),
    .sum(s1[3]), .cout(unused_cout[1]), .close(msp_open[1])
  );

  // Second level: plain on the low side, SPST on the high side
  assign s2[0] = s2_x[0] + s2_y[0];
  spst_adder #(.W(S2_W), .LSP_W(LSP_W)) u_s2_1 (
    .a(s2_x[1]), .b(s2_y[1]), .cin(1'b0), .sub(1'b0), .close_clk(close_clk),
    .sum(s2[1]), .cout(unused_cout[2]), .close(msp_open[2])
  );

  // Final adder
  assign sum = p_x + p_y;

endmodule
