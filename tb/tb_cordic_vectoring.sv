// tb_cordic_vectoring: checks the phase detector against atan2 in real
// arithmetic. Random vectors of magnitude 60..1000 in all four quadrants
// (so the range extension is exercised), then the axes and the four
// diagonals. A five-stage CORDIC leaves at most atan(2^-4) = 3.58 degrees
// of residual angle, about 20 LSB of an 11-bit phase; the tolerance is 22
// LSB, modulo a full turn. The magnitude must be within 6 % of 1.6457 |v|.
// Each result must appear exactly 7 cycles after its input, at one vector
// per clock.
module tb_cordic_vectoring;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [10:0] i_in = '0, q_in = '0;
  logic               out_valid;
  logic signed [10:0] phase;
  logic        [12:0] mag;

  cordic_vectoring dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real ph_q[$], mg_q[$];
  int  due_q[$];

  task automatic push(int i, int q);
    @(negedge clk);
    in_valid = 1'b1; i_in = 11'(i); q_in = 11'(q);
    ph_q.push_back($atan2(real'(q), real'(i)) / (2.0 * PI) * 2048.0);
    mg_q.push_back(1.6457 * $sqrt(real'(i*i + q*q)));
    due_q.push_back(cyc + 7);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    real p, m, d; int du;
    checks++;
    p = ph_q.pop_front(); m = mg_q.pop_front(); du = due_q.pop_front();
    d = real'(phase) - p;
    while (d > 1024.0)  d -= 2048.0;
    while (d < -1024.0) d += 2048.0;
    if (rabs(d) > 22.0 || rabs(real'(mag) - m) > 0.06 * m + 2.0 || du != cyc) begin
      failures++;
      $display("FAIL phase=%0d exp=%f mag=%0d exp=%f cycle=%0d due=%0d", phase, p, mag, m, cyc, du);
    end
  end

  initial begin
    real a, r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      a = ($urandom_range(65535) / 65536.0) * 2.0 * PI;
      r = 60.0 + $urandom_range(940);
      push($rtoi(r * $cos(a)), $rtoi(r * $sin(a)));
    end
    push(1000, 0); push(-1000, 0); push(0, 1000); push(0, -1000);
    push(700, 700); push(-700, 700); push(-700, -700); push(700, -700);
    push(-1000, 1); push(-1000, -1);
    @(negedge clk) in_valid = 1'b0;
    repeat (12) @(posedge clk);
    checks++;
    if (ph_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
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
