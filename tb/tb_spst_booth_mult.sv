// End-to-end testbench for spst_booth_mult at its default (full) size.
//
// Every clock cycle a new operand pair is applied just after the rising edge
// with close_clk low; close_clk rises 3 ns later, well before the next
// rising edge, like a delayed copy of the clock. The product of each pair
// must appear on p after exactly one rising edge, one result per cycle.
// Operands: the worked example 0x2AC9 * 0x006A = 0x0011B73A, the small
// example 3 * 3 = 9, the extreme values, and random pairs whose multiplier
// B is often small (positive or negative) so that the Booth rows and the
// SPST adders close. While close_clk is low every suppressible part must be
// closed. The testbench counts how often each part (rows 6-7, rows 4-5 and
// the three SPST adders) was closed and open at a sampling edge and fails
// if any of these never happened.
module tb_spst_booth_mult;
  timeunit 1ns;
  timeprecision 100ps;

  import spst_mult_pkg::*;

  logic                  clk = 1'b0, rst_n = 1'b0, close_clk = 1'b0;
  logic signed [N-1:0]   a = '0, b = '0;
  logic signed [P_W-1:0] p;
  logic [4:0]            part_open;
  int                    checks = 0, failures = 0;
  int                    n_closed [5] = '{0, 0, 0, 0, 0};
  int                    n_open   [5] = '{0, 0, 0, 0, 0};
  int                    n_strobe_low = 0, n_products = 0;

  spst_booth_mult dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [N-1:0] qa [$], qb [$];

  // Drive one operand pair in the cycle that follows the current rising edge.
  task automatic drive(input logic signed [N-1:0] ta, tb_);
    #1;
    a = ta; b = tb_; close_clk = 1'b0;
    #1;
    checks++;
    if (part_open != 5'b0) begin
      failures++; $display("FAIL part open while close_clk low: %b", part_open);
    end else n_strobe_low++;
    #1;
    close_clk = 1'b1;
    qa.push_back(ta); qb.push_back(tb_);
    @(posedge clk);
    for (int k = 0; k < 5; k++) if (part_open[4-k]) n_open[k]++; else n_closed[k]++;
  endtask

  // Checker: after each rising edge, p must hold the product of the pair
  // driven in the cycle before that edge.
  always @(posedge clk) begin
    if (rst_n && qa.size() > 0) begin
      logic signed [N-1:0] ea, eb;
      longint expv;
      #0.5;
      ea = qa.pop_front(); eb = qb.pop_front();
      expv = longint'(ea) * longint'(eb);
      checks++; n_products++;
      if (p != P_W'(expv)) begin
        failures++;
        $display("FAIL %0d * %0d: p=%0d exp=%0d", ea, eb, p, expv);
      end
    end
  end

  function automatic logic signed [N-1:0] rnd_b();
    case ($urandom_range(0, 3))
      0:       return N'($signed(N'($urandom_range(0, 127))) - 64);    // rows 4-7 zero
      1:       return N'($signed(N'($urandom_range(0, 2047))) - 1024); // rows 6-7 zero
      default: return N'($urandom);
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (p != '0) begin failures++; $display("FAIL reset value %h", p); end
    #1 rst_n = 1'b1;
    @(posedge clk);
    drive(16'sh2AC9, 16'sh006A);
    drive(16'sd3, 16'sd3);
    drive(-16'sd32768, -16'sd32768);
    drive(-16'sd32768, 16'sd32767);
    drive(16'sd32767, 16'sd32767);
    drive(-16'sd1, -16'sd1);
    drive(16'sd0, 16'sh5A5A);
    for (int t = 0; t < 20000; t++) begin
      logic signed [N-1:0] ra;
      ra = N'($urandom);
      if (t % 4 == 1) ra = N'($signed(N'($urandom_range(0, 63))) - 32);
      drive(ra, rnd_b());
    end
    @(posedge clk);
    #1;
    checks++;
    if (qa.size() != 0 || n_products != 20007) begin
      failures++; $display("FAIL throughput: %0d products, %0d pending", n_products, qa.size());
    end
    begin
      string names [5] = '{"rows 6-7", "rows 4-5", "SPST adder S1[2]", "SPST adder S1[3]", "SPST adder S2[1]"};
      for (int k = 0; k < 5; k++) begin
        $display("%-18s closed=%0d open=%0d", names[k], n_closed[k], n_open[k]);
        if (n_closed[k] == 0 || n_open[k] == 0) failures++;
      end
    end
    $display("strobe-low checks=%0d products=%0d", n_strobe_low, n_products);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
