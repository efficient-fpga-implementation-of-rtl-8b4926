// tb_carrier_nco: checks the carrier phase accumulator against an integer
// model acc = (acc + inc) mod 2^24, phase = acc >> 13 (two's complement).
// Random increments of both signs with random gaps in in_valid, then a
// constant increment of 2^24/100 turn per sample, whose phase must come
// back to its start after 100 samples (unit DC gain, no drift).
module tb_carrier_nco;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [23:0] inc = '0;
  logic signed [10:0] phase;

  carrier_nco dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int acc = 0;

  task automatic step(int i, bit vld);
    int e;
    @(negedge clk);
    in_valid = vld; inc = 24'(i);
    if (vld) acc = (acc + i) & 24'hFFFFFF;
    @(posedge clk); #1;
    e = acc >> 13;
    if (e >= 1024) e -= 2048;
    checks++;
    if (int'(phase) != e) begin
      failures++; $display("FAIL phase=%0d expected %0d", phase, e);
    end
  endtask

  initial begin
    int p0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (phase != 0) begin failures++; $display("FAIL phase not zero after reset"); end
    for (int k = 0; k < 3000; k++)
      step($urandom_range(16777215) - 8388608, $urandom_range(2) != 0);
    step(0, 1'b0);
    p0 = acc;
    for (int k = 0; k < 100; k++) step(167772, 1'b1);
    checks++;
    if (((acc - p0) & 24'hFFFFFF) != ((167772 * 100) & 24'hFFFFFF)) begin
      failures++; $display("FAIL accumulated %0d", (acc - p0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
