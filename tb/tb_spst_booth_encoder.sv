// Self-checking testbench for spst_booth_encoder. For random and directed
// operands it recodes B here (digit x = -2*B[2x+1] + B[2x] + B[2x-1]) and
// checks PPx = digit x * A for every row, with close1 / close2 driven as the
// detection unit would (low exactly when the rows they govern are zero). It
// then forces the rows closed while their digits are non-zero and checks
// that rows 4-7 are zero and rows 0-3 unaffected.
module tb_spst_booth_encoder;
  import spst_mult_pkg::*;

  logic                clk = 1'b0;
  logic signed [N-1:0] a;
  logic        [N-1:0] b;
  logic                close1, close2;
  pp_t                 pp [NPP];
  int                  checks = 0, failures = 0;
  int                  n_c1 = 0, n_c2 = 0;

  spst_booth_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(logic [N-1:0] bv, int x);
    logic [N:0] be = {bv, 1'b0};
    return -2 * int'(be[2*x+2]) + int'(be[2*x+1]) + int'(be[2*x]);
  endfunction

  task automatic apply(input logic signed [N-1:0] ta, input logic [N-1:0] tb_, input bit force_close);
    int d [NPP];
    for (int x = 0; x < NPP; x++) d[x] = digit(tb_, x);
    a = ta; b = tb_;
    close1 = force_close ? 1'b0 : (d[6] != 0 || d[7] != 0);
    close2 = force_close ? 1'b0 : (d[4] != 0 || d[5] != 0 || d[6] != 0 || d[7] != 0);
    if (!close1) n_c1++;
    if (!close2) n_c2++;
    @(posedge clk);
    for (int x = 0; x < NPP; x++) begin
      int expv = (force_close && x >= 4) ? 0 : d[x] * int'(ta);
      checks++;
      if (int'(pp[x]) != expv) begin
        failures++;
        $display("FAIL a=%h b=%h row=%0d pp=%0d exp=%0d", ta, tb_, x, pp[x], expv);
      end
    end
  endtask

  initial begin
    apply(16'sh2AC9, 16'h006A, 1'b0);
    apply(16'sh8000, 16'h5555, 1'b0);
    apply(16'sh8000, 16'hAAAA, 1'b0);
    apply(16'sh7FFF, 16'h8000, 1'b0);
    apply(16'sh1234, 16'hFFF3, 1'b0);
    apply(16'sh1234, 16'h0400, 1'b0);
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] bb;
      bb = N'($urandom);
      if (t % 3 == 1) bb = N'($signed(N'($urandom_range(0, 255))) - 128);
      if (t % 3 == 2) bb = N'($signed(N'($urandom_range(0, 4095))) - 2048);
      apply(N'($urandom), bb, 1'b0);
    end
    for (int t = 0; t < 200; t++) apply(N'($urandom), N'($urandom) | 16'h2000, 1'b1);
    $display("close1 low=%0d close2 low=%0d", n_c1, n_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
