// Self-checking testbench for booth_detect. Random and directed B values
// (small positive and negative values as well as full-range ones) are
// applied; the testbench recodes B into Booth digits itself and expects
// close1 low exactly when digits 6 and 7 are both zero, close2 low exactly
// when digits 4 to 7 are all zero, and both low whenever close_clk is low.
module tb_booth_detect;
  import spst_mult_pkg::*;

  logic         clk = 1'b0;
  logic [N-1:0] b;
  logic         close_clk, close1, close2;
  int           checks = 0, failures = 0;
  int           n_c1 = 0, n_c2 = 0, n_open = 0;

  booth_detect dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(logic [N-1:0] bv, int x);
    logic [N:0] be;
    be = {bv, 1'b0};
    return -2 * int'(be[2*x+2]) + int'(be[2*x+1]) + int'(be[2*x]);
  endfunction

  task automatic apply(input logic [N-1:0] tb_, input logic strobe);
    bit z67, z4567;
    b = tb_; close_clk = strobe;
    @(posedge clk);
    z67   = digit(tb_, 6) == 0 && digit(tb_, 7) == 0;
    z4567 = z67 && digit(tb_, 4) == 0 && digit(tb_, 5) == 0;
    checks++;
    if (close1 != (strobe && !z67) || close2 != (strobe && !z4567)) begin
      failures++;
      $display("FAIL b=%h strobe=%b close1=%b close2=%b", tb_, strobe, close1, close2);
    end
    if (strobe) begin
      if (!close1) n_c1++;
      if (!close2) n_c2++;
      if (close1 && close2) n_open++;
    end
  endtask

  initial begin
    apply(16'h006A, 1'b1);   // rows 4-7 zero
    apply(16'hFF80, 1'b1);   // -128: rows 4-7 zero
    apply(16'h0080, 1'b1);   // 128: row 4 non-zero
    apply(16'h0400, 1'b1);   // rows 6-7 zero, row 5 non-zero
    apply(16'h0800, 1'b1);   // row 6 non-zero
    apply(16'h8000, 1'b1);
    apply(16'h8000, 1'b0);
    for (int t = 0; t < 6000; t++) begin
      logic [N-1:0] bb;
      case (t % 3)
        0:       bb = N'($urandom);
        1:       bb = N'($signed(N'($urandom_range(0, 511))) - 256);
        default: bb = N'($signed(N'($urandom_range(0, 4095))) - 2048);
      endcase
      apply(bb, (t % 7 != 0));
    end
    $display("close1 low=%0d close2 low=%0d both open=%0d", n_c1, n_c2, n_open);
    if (n_c1 == 0 || n_c2 == 0 || n_open == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
