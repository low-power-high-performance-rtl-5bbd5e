// Self-checking testbench for pp_adder_tree. Random partial products in the
// range a Booth row can take (|PP| <= 65536) are applied, with the upper
// rows often zero or small so that the SPST adders close. The 32-bit sum is
// compared with sum(PPx * 4^x) computed with 64-bit integers. The testbench
// counts, per SPST adder, how often its MSP was closed and open.
module tb_pp_adder_tree;
  import spst_mult_pkg::*;

  logic            clk = 1'b0;
  pp_t             pp [NPP];
  logic            close_clk;
  logic [P_W-1:0]  sum;
  logic [2:0]      msp_open;
  int              checks = 0, failures = 0;
  int              n_closed [3] = '{0, 0, 0};
  int              n_open   [3] = '{0, 0, 0};

  pp_adder_tree dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_pp(int mode);
    case (mode)
      0: return 0;
      1: return $urandom_range(0, 100) - 50;
      default: return int'($urandom_range(0, 131072)) - 65536;
    endcase
  endfunction

  initial begin
    longint expv;
    close_clk = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      int mode_hi;
      mode_hi = $urandom_range(0, 2);
      expv = 0;
      for (int x = 0; x < NPP; x++) begin
        int v;
        v = (x >= 4) ? rnd_pp(mode_hi) : rnd_pp(2);
        if (t == 0) v = (x % 2) ? 65536 : -65536;
        pp[x] = pp_t'(v);
        expv += longint'(v) <<< (2 * x);
      end
      @(posedge clk);
      checks++;
      if (sum != P_W'(expv)) begin
        failures++;
        $display("FAIL t=%0d sum=%h exp=%h", t, sum, P_W'(expv));
      end
      for (int k = 0; k < 3; k++) if (msp_open[k]) n_open[k]++; else n_closed[k]++;
    end
    for (int k = 0; k < 3; k++) begin
      $display("SPST adder %0d: closed=%0d open=%0d", k, n_closed[k], n_open[k]);
      if (n_closed[k] == 0 || n_open[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
