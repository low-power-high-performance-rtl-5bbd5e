// Switching-activity testbench for spst_booth_mult (default size).
//
// Runs two operand streams through the multiplier, one product per cycle,
// and checks every product:
//   small  - a slowly varying signal of amplitude below 200 multiplied by
//            coefficients below 100 in magnitude, the kind of data filters
//            and transforms see;
//   mixed  - full-range multiplicands with the same small coefficients
//            (the Booth-encoded operand small, the other one not);
//   random - full-range random operands.
// At every sampling edge it also takes the settled value of each net that
// SPST gates (the candidate buses of Booth rows 4-7 behind their AND-gate
// latches, and the MSP operands of the three SPST adders) and of the same
// net without gating, and counts the bits that changed since the previous
// operation. The ratio is a zero-delay estimate of the transitions the
// technique removes from those parts; glitches inside a cycle are not
// modelled. The test fails if a product is wrong, if the small or mixed
// stream shows no reduction, or if gating adds transitions on random data.
module tb_spst_activity;
  timeunit 1ns;
  timeprecision 100ps;
  import spst_mult_pkg::*;

  logic                  clk = 1'b0, rst_n = 1'b0, close_clk = 1'b1;
  logic signed [N-1:0]   a = '0, b = '0;
  logic signed [P_W-1:0] p;
  logic [4:0]            part_open;
  int                    checks = 0, failures = 0;

  spst_booth_mult dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gated nets and their ungated equivalents, as one wide vector each.
  localparam int unsigned ROWS_W = 4 * $bits(pp_cand_t);
  localparam int unsigned M1 = S1_W - LSP_W, M2 = S2_W - LSP_W;
  localparam int unsigned ACT_W = ROWS_W + 4 * M1 + 2 * M2;

  function automatic logic [ACT_W-1:0] gated_nets();
    return {dut.u_encoder.g_row[4].u_sel.cand_l, dut.u_encoder.g_row[5].u_sel.cand_l,
            dut.u_encoder.g_row[6].u_sel.cand_l, dut.u_encoder.g_row[7].u_sel.cand_l,
            dut.u_tree.u_s1_2.a_msp_g, dut.u_tree.u_s1_2.b_msp_g,
            dut.u_tree.u_s1_3.a_msp_g, dut.u_tree.u_s1_3.b_msp_g,
            dut.u_tree.u_s2_1.a_msp_g, dut.u_tree.u_s2_1.b_msp_g};
  endfunction

  function automatic logic [ACT_W-1:0] ungated_nets();
    return {dut.u_encoder.cand, dut.u_encoder.cand, dut.u_encoder.cand, dut.u_encoder.cand,
            dut.u_tree.u_s1_2.a[S1_W-1:LSP_W], dut.u_tree.u_s1_2.b_eff[S1_W-1:LSP_W],
            dut.u_tree.u_s1_3.a[S1_W-1:LSP_W], dut.u_tree.u_s1_3.b_eff[S1_W-1:LSP_W],
            dut.u_tree.u_s2_1.a[S2_W-1:LSP_W], dut.u_tree.u_s2_1.b_eff[S2_W-1:LSP_W]};
  endfunction

  task automatic run_stream(input string name, input int mode, input int n_ops,
                            output longint tg, output longint tu);
    logic [ACT_W-1:0] prev_g, prev_u, cur_g, cur_u;
    logic signed [N-1:0] pa, pb;
    int phase;
    tg = 0; tu = 0; prev_g = '0; prev_u = '0;
    phase = $urandom_range(0, 63);
    for (int i = 0; i < n_ops; i++) begin
      if (mode == 0) begin
        // triangle wave of amplitude 180 plus noise, coefficients within +-99
        int tri_v;
        tri_v = ((i + phase) % 64 < 32) ? ((i + phase) % 32) * 12 - 180
                                        : 192 - ((i + phase) % 32) * 12 - 180;
        pa = N'(tri_v + int'($urandom_range(0, 16)) - 8);
        pb = N'(int'($urandom_range(0, 198)) - 99);
      end else if (mode == 1) begin
        pa = N'($urandom);
        pb = N'(int'($urandom_range(0, 198)) - 99);
      end else begin
        pa = N'($urandom);
        pb = N'($urandom);
      end
      #1 a = pa; b = pb;
      @(posedge clk);
      cur_g = gated_nets();
      cur_u = ungated_nets();
      if (i > 0) begin
        tg += $countones(cur_g ^ prev_g);
        tu += $countones(cur_u ^ prev_u);
      end
      prev_g = cur_g; prev_u = cur_u;
      #0.5;
      checks++;
      if (p != P_W'(longint'(pa) * longint'(pb))) begin
        failures++;
        $display("FAIL %s %0d * %0d: p=%0d", name, pa, pb, p);
      end
    end
    $display("%-6s stream: %0d operations, transitions on gated nets %0d, without gating %0d (%0d%% removed)",
             name, n_ops, tg, tu, tu == 0 ? 0 : int'(100 * (tu - tg) / tu));
  endtask

  initial begin
    longint tg, tu;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    run_stream("small", 0, 4000, tg, tu);
    checks++;
    if (!(tg < tu)) begin
      failures++;
      $display("FAIL small stream shows no reduction");
    end
    run_stream("mixed", 1, 4000, tg, tu);
    checks++;
    if (!(tg < tu)) begin
      failures++;
      $display("FAIL mixed stream shows no reduction");
    end
    run_stream("random", 2, 4000, tg, tu);
    checks++;
    if (tg > tu) begin
      failures++;
      $display("FAIL gating added transitions on the random stream");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
