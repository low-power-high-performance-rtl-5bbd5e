// 16x16 signed low-power multiplier: SPST-equipped radix-4 Booth encoder,
// adder tree with SPST adders, and a 32-bit product register.
//
// Structure (following the published block diagram):
//   booth_detect        watches B and drops close1 / close2 when Booth rows
//                       6-7 / 4-7 are zero
//   spst_booth_encoder  candidates +-A, +-2A, eight Booth encoders, eight
//                       AND-gate latches + multiplexers -> PP0..PP7
//   pp_adder_tree       4 + 2 + 1 adders; the three on the PP4..PP7 side are
//                       SPST adders that close their MSP when it is predictable
//   product register    32 bits, on the rising edge of clk
//
// Interface and timing: a and b are two's-complement values applied after a
// rising clk edge; the product a*b appears on p after the next rising edge
// (one result per cycle, latency one cycle). close_clk is the assertion
// strobe of the SPST control: every close signal is ANDed with it, so the
// closed parts only open once close_clk is high. It may rise at any point
// after the inputs change, but must be high at the rising clk edge that
// samples the product. Driving close_clk constantly high gives a plain
// multiplier that still suppresses the predictable parts. rst_n is an
// asynchronous active-low reset of the product register (this design's
// choice; the published design does not describe reset).
//
// part_open is this design's addition, for power estimation and testing: it
// shows, combinationally for the current inputs, which suppressible parts
// are in use: {rows 6-7, rows 4-5, SPST adder S1[2], S1[3], S2[1]}, where 1
// means the part is computing and 0 that its inputs are held at zero.
module spst_booth_mult
  import spst_mult_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                close_clk,
  input  logic signed [N-1:0] a,
  input  logic signed [N-1:0] b,
  output logic signed [P_W-1:0] p,
  output logic [4:0]          part_open   // {close1, close2, msp_open[2:0]}
);

  logic             close1, close2;
  pp_t              pp [NPP];
  logic [P_W-1:0]   tree_sum;
  logic [2:0]       msp_open;

  booth_detect u_detect (
    .b(b), .close_clk(close_clk), .close1(close1), .close2(close2)
  );

  spst_booth_encoder u_encoder (
    .a(a), .b(b), .close1(close1), .close2(close2), .pp(pp)
  );

  pp_adder_tree u_tree (
    .pp(pp), .close_clk(close_clk), .sum(tree_sum), .msp_open(msp_open)
  );

  assign part_open = {close1, close2, msp_open};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= tree_sum;
  end

endmodule
