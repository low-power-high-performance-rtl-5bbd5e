// Low-power adder/subtractor using the spurious power suppression technique.
//
// The W-bit operation is split into an LSP of LSP_W bits, which always
// computes, and an MSP of the remaining W - LSP_W bits. spst_detect watches
// the MSPs: when both are all zeros or all ones the MSP sum can only be -2,
// -1, 0 or +1 (plus the LSP carry), so the MSP adder is closed: AND-gate
// "latches" force its operands and its carry-in to zero, and the sign-
// extension stage rebuilds the MSP of the result as {sign, ..., carr_ctrl}.
// Otherwise the MSP adder's pseudo-sum is used. The carry out comes from
// the MSP adder when it is open and, when closed, from a_and & b_and |
// (a_and | b_and) & c_lsp (the unsigned carry of two all-ones/all-zeros
// MSPs). The split, the gating, the sign extension and the detection
// equations follow the published 16-bit example (LSP and MSP of 8 bits each,
// which are the defaults here).
//
// Subtraction is this design's addition to the published adder: sub = 1
// inverts B and the carry-in, so the result is a + b + cin for sub = 0 and
// a - b - cin for sub = 1. The detection logic sees the inverted B.
//
// Timing: combinational. The result is valid only while close_clk is high;
// while it is low the MSP stays closed and the MSP of sum is the predicted
// sign extension, whether or not it is right.
module spst_adder #(
  parameter int unsigned W     = 16,
  parameter int unsigned LSP_W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         sub,
  input  logic         close_clk,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         close      // 1: MSP adder was in use
);

  localparam int unsigned MSP_W = W - LSP_W;

  logic [W-1:0]     b_eff;
  logic             c0, c_lsp, c_msp, cin_msp;
  logic [LSP_W-1:0] sum_lsp;
  logic [MSP_W-1:0] a_msp_g, b_msp_g, pseudo_sum, sum_msp;
  logic             carr_ctrl, sign, a_and, b_and;

  assign b_eff = b ^ {W{sub}};
  assign c0    = cin ^ sub;

  // LSP adder
  assign {c_lsp, sum_lsp} = a[LSP_W-1:0] + b_eff[LSP_W-1:0] + (LSP_W+1)'(c0);

  spst_detect #(.MSP_W(MSP_W)) u_detect (
    .a_msp(a[W-1:LSP_W]), .b_msp(b_eff[W-1:LSP_W]), .c_lsp(c_lsp),
    .close_clk(close_clk), .close(close), .carr_ctrl(carr_ctrl), .sign(sign),
    .a_and(a_and), .b_and(b_and)
  );

  // Data-controlling AND gates (Latch-A, Latch-B) and the gated MSP carry-in
  assign a_msp_g = a[W-1:LSP_W]     & {MSP_W{close}};
  assign b_msp_g = b_eff[W-1:LSP_W] & {MSP_W{close}};
  assign cin_msp = c_lsp & close;

  // MSP adder
  assign {c_msp, pseudo_sum} = a_msp_g + b_msp_g + (MSP_W+1)'(cin_msp);

  // Sign extension
  assign sum_msp = close ? pseudo_sum : {{(MSP_W-1){sign}}, carr_ctrl};
  assign sum     = {sum_msp, sum_lsp};
  assign cout    = close ? c_msp : ((a_and & b_and) | ((a_and | b_and) & c_lsp));

endmodule
