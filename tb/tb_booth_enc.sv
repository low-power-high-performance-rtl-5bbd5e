// Self-checking testbench for booth_enc: all eight three-bit groups are
// applied and the select lines are compared with the radix-4 digit
// -2*g[2] + g[1] + g[0], worked out here independently of the encoder.
module tb_booth_enc;
  import spst_mult_pkg::*;

  logic       clk = 1'b0;
  logic [2:0] grp;
  booth_sel_t sel;
  int         checks = 0, failures = 0;

  booth_enc dut (.grp(grp), .sel(sel));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int digit, got;
    for (int g = 0; g < 8; g++) begin
      grp = 3'(g);
      @(posedge clk);
      digit = -2 * g[2] + g[1] + g[0];
      got = (sel.select_m ? 1 : 0) + (sel.select_2m ? 2 : 0);
      if (sel.neg) got = -got;
      checks++;
      if (got != digit || (sel.select_m && sel.select_2m) || (digit == 0 && sel.neg)) begin
        failures++;
        $display("FAIL grp=%b digit=%0d sel=%p", grp, digit, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
