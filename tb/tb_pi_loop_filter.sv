// tb_pi_loop_filter: checks the PI filter at its default gains (KP = 64,
// KI = 1, SHIFT = 8) against an integer model
//   I += KI*e;  v = (KP*e + I) >>> SHIFT, saturated to 16 bits.
// Random errors with random gaps in in_valid, then a constant error that
// ramps the integrator until the output saturates, then the opposite sign to
// bring it back (integral path tracks, proportional path steps). v must
// match the model one cycle after each valid error, with out_valid, and
// hold in between.
module tb_pi_loop_filter;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] err = '0;
  logic out_valid;
  logic signed [15:0] v;

  pi_loop_filter dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint integ = 0;
  longint expv = 0;
  int n_sat = 0;

  task automatic apply(int e);
    longint t;
    @(negedge clk);
    in_valid = 1'b1; err = 16'(e);
    integ = integ + longint'(e) * 1;
    t = (longint'(e) * 64 + integ) >>> 8;
    if (t > 32767) begin t = 32767; n_sat++; end
    if (t < -32768) begin t = -32768; n_sat++; end
    expv = t;
    @(posedge clk); #1;
    checks++;
    if (!out_valid || longint'(v) != expv) begin
      failures++;
      $display("FAIL v=%0d expected %0d valid=%0b", v, expv, out_valid);
    end
    @(negedge clk); in_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid || longint'(v) != expv) begin
      failures++; $display("FAIL output did not hold");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) apply($urandom_range(65535) - 32768);
    for (int k = 0; k < 600; k++) apply(20000);
    for (int k = 0; k < 1200; k++) apply(-20000);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
