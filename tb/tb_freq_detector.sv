// tb_freq_detector: checks phase compensation, differencing, unwrap and time
// scaling against an integer model. Random phases and correction phases
// (full 11-bit range, so the difference wraps often) are applied with random
// dup and gap flags and random gaps in in_valid. Expected:
//   d = wrap11(p(n) - p(k) - g*(c(n) - c(n-1))),
//   k = n-1, or n-2 when dup;  g = 1, or 2 when gap,
//   freq = d * 4, or d * 2 when gap,
// exactly, two clock cycles after the input.
module tb_freq_detector;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [10:0] phase = '0, phase_corr = '0;
  logic dup = 1'b0, gap = 1'b0;
  logic out_valid;
  logic signed [12:0] freq;

  freq_detector dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int exp_q[$], due_q[$];
  int p1 = 0, p2 = 0, c1 = 0;   // raw phases one and two back, correction one back

  function automatic int wrap11(int v);
    v = v & 2047;
    return (v >= 1024) ? v - 2048 : v;
  endfunction

  task automatic push(int p, int c, bit du, bit ga);
    int pc, d;
    @(negedge clk);
    in_valid = 1'b1; phase = 11'(p); phase_corr = 11'(c); dup = du; gap = ga;
    pc = wrap11(c - c1);                       // correction step
    d  = wrap11(p - (du ? p2 : p1) - (ga ? 2 * pc : pc));
    exp_q.push_back(ga ? d * 2 : d * 4);
    due_q.push_back(cyc + 2);
    p2 = p1; p1 = p; c1 = c;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int e, d;
    checks++;
    e = exp_q.pop_front(); d = due_q.pop_front();
    if (int'(freq) != e || d != cyc) begin
      failures++;
      $display("FAIL freq=%0d expected %0d (cycle %0d due %0d)", freq, e, cyc, d);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      push($urandom_range(2047) - 1024, $urandom_range(2047) - 1024,
           ($urandom_range(7) == 0), ($urandom_range(7) == 1));
      repeat ($urandom_range(1)) @(negedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
