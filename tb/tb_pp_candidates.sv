// Self-checking testbench for pp_candidates: edge and random multiplicands;
// each candidate is compared with A, 2A, -A and -2A computed as integers.
module tb_pp_candidates;
  import spst_mult_pkg::*;

  logic               clk = 1'b0;
  logic signed [N-1:0] a;
  pp_cand_t           cand;
  int                 checks = 0, failures = 0;

  pp_candidates dut (.a(a), .cand(cand));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [N-1:0] val);
    int ai;
    a = val;
    @(posedge clk);
    ai = int'(val);
    checks++;
    if (int'(cand.pos1) != ai || int'(cand.pos2) != 2 * ai ||
        int'(cand.neg1) != -ai || int'(cand.neg2) != -2 * ai) begin
      failures++;
      $display("FAIL a=%0d cand=%p", ai, cand);
    end
  endtask

  initial begin
    check(16'sh0000); check(16'sh0001); check(-16'sh0001);
    check(16'sh7FFF); check(16'sh8000); check(16'sh2AC9);
    repeat (2000) check(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
