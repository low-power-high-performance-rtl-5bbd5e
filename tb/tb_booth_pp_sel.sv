// Self-checking testbench for booth_pp_sel: for random multiplicands, every
// Booth digit is applied with the row open and closed. An open row must give
// digit * A; a closed row must give 0.
module tb_booth_pp_sel;
  import spst_mult_pkg::*;

  logic        clk = 1'b0;
  pp_cand_t    cand;
  booth_sel_t  sel;
  logic        enable;
  pp_t         pp;
  int          checks = 0, failures = 0;

  booth_pp_sel dut (.cand(cand), .sel(sel), .enable(enable), .pp(pp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ai, expv;
    for (int t = 0; t < 1000; t++) begin
      ai = (t == 0) ? -32768 : int'($signed(N'($urandom)));
      cand.pos1 = pp_t'(ai);      cand.pos2 = pp_t'(2 * ai);
      cand.neg1 = pp_t'(-ai);     cand.neg2 = pp_t'(-2 * ai);
      for (int d = -2; d <= 2; d++) begin
        for (int e = 0; e < 2; e++) begin
          sel.neg       = (d < 0);
          sel.select_m  = (d == 1 || d == -1);
          sel.select_2m = (d == 2 || d == -2);
          enable        = e[0];
          @(posedge clk);
          expv = e ? d * ai : 0;
          checks++;
          if (int'(pp) != expv) begin
            failures++;
            $display("FAIL a=%0d d=%0d en=%0d pp=%0d", ai, d, e, pp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
