// Self-checking testbench for spst_adder at its default 16-bit size (8-bit
// LSP, 8-bit MSP). It applies the five spurious-transition cases of the SPST
// analysis (e.g. -61 + 51, -196 + 204, -61 + -205), then random operands
// biased towards small magnitudes so that the MSP closes often, both for
// addition and subtraction. sum and cout are compared with integer
// arithmetic. It also checks that with close_clk low the MSP adder's inputs
// are held at zero, and counts how often the MSP was closed and open.
module tb_spst_adder;

  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, sum;
  logic         cin, sub, close_clk, cout, close;
  int           checks = 0, failures = 0;
  int           n_closed = 0, n_open = 0, n_gated = 0;

  spst_adder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    case ($urandom_range(0, 3))
      0:       return W'($urandom_range(0, 255));
      1:       return W'(-$urandom_range(1, 256));
      default: return W'($urandom);
    endcase
  endfunction

  task automatic apply(input logic [W-1:0] ta, tb_, input logic tcin, tsub);
    longint ua, ub, r;
    a = ta; b = tb_; cin = tcin; sub = tsub; close_clk = 1'b1;
    @(posedge clk);
    ua = longint'(ta); ub = longint'(tb_);
    r  = tsub ? ua + ((~ub) & 'hFFFF) + (tcin ? 0 : 1) : ua + ub + tcin;
    checks++;
    if (sum != W'(r) || cout != r[W]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b sub=%b sum=%h cout=%b exp=%h", ta, tb_, tcin, tsub, sum, cout, r);
    end
    if (close) n_open++; else n_closed++;
    // The same operands with the strobe low: the MSP must see only zeros.
    close_clk = 1'b0;
    @(posedge clk);
    checks++;
    if (close !== 1'b0 || dut.a_msp_g != '0 || dut.b_msp_g != '0) begin
      failures++;
      $display("FAIL gating a=%h b=%h", ta, tb_);
    end else n_gated++;
  endtask

  initial begin
    // The five cases: MSPs uniform, results predictable
    apply(16'd128, 16'd64, 1'b0, 1'b0);           // case 1 (128 + 64)
    apply(-16'sd128, 16'd192, 1'b0, 1'b0);        // case 1 after the transient
    apply(-16'sd61, 16'd51, 1'b0, 1'b0);          // case 2
    apply(-16'sd196, 16'd204, 1'b0, 1'b0);        // case 3
    apply(-16'sd61, -16'sd205, 1'b0, 1'b0);       // case 4
    apply(-16'sd196, -16'sd52, 1'b0, 1'b0);       // case 5
    apply(16'd200, 16'd100, 1'b0, 1'b0);          // positive with LSP carry
    apply(16'hFFFF, 16'hFFFF, 1'b1, 1'b0);
    apply(16'h1234, 16'h0FFF, 1'b0, 1'b1);
    for (int t = 0; t < 5000; t++) apply(rnd(), rnd(), 1'($urandom), 1'($urandom));
    $display("closed=%0d open=%0d gated=%0d", n_closed, n_open, n_gated);
    if (n_closed == 0 || n_open == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
