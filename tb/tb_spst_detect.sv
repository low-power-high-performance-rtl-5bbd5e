// Self-checking testbench for spst_detect at its default 8-bit MSP width.
// Operand MSPs are drawn from all-zeros, all-ones and random values.
// Expected outputs are derived from the arithmetic meaning, not the gate
// equations: the MSP is closable when both MSPs are uniform, the predicted
// MSP sum is -(a all ones) - (b all ones) + c_lsp, carr_ctrl is its LSB and
// sign tells whether it is negative. close must follow close_clk.
module tb_spst_detect;

  localparam int unsigned M = 8;

  logic         clk = 1'b0;
  logic [M-1:0] a_msp, b_msp;
  logic         c_lsp, close_clk;
  logic         close, carr_ctrl, sign, a_and, b_and;
  int           checks = 0, failures = 0;
  int           n_closed = 0, n_open = 0;

  spst_detect dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] pick(int k);
    case (k)
      0:       return '0;
      1:       return '1;
      default: return M'($urandom);
    endcase
  endfunction

  initial begin
    bit uni_a, uni_b, idle;
    int v;
    for (int t = 0; t < 4000; t++) begin
      a_msp = pick($urandom_range(0, 2));
      b_msp = pick($urandom_range(0, 2));
      c_lsp = 1'($urandom);
      close_clk = (t % 5 != 0);
      @(posedge clk);
      uni_a = (a_msp == '0) || (a_msp == '1);
      uni_b = (b_msp == '0) || (b_msp == '1);
      idle  = uni_a && uni_b;
      checks++;
      if (close != (!idle && close_clk)) begin
        failures++; $display("FAIL close a=%h b=%h clk=%b", a_msp, b_msp, close_clk);
      end
      if (idle) begin
        n_closed++;
        v = -(a_msp == '1 ? 1 : 0) - (b_msp == '1 ? 1 : 0) + int'(c_lsp);
        checks++;
        if (carr_ctrl != v[0] || sign != (v < 0)) begin
          failures++;
          $display("FAIL pred a=%h b=%h c=%b v=%0d cc=%b s=%b", a_msp, b_msp, c_lsp, v, carr_ctrl, sign);
        end
      end else begin
        n_open++;
      end
    end
    if (n_closed == 0 || n_open == 0) failures++;
    $display("closed=%0d open=%0d", n_closed, n_open);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
