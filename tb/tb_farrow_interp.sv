// tb_farrow_interp: checks the cubic Farrow interpolator against a direct
// evaluation of the four Lagrange filters in real arithmetic.
// Random samples (|x| < 450) and a random fractional delay per sample are
// applied, with random gaps in in_valid. For every output the reference is
//   y = sum_i x(m-i) * h_i(mu),  i = -2..1,
// computed from the Lagrange polynomials as written in the table of
// coefficients, not from the Horner form. The output must match within
// 1.5 LSB (fixed-point rounding) and arrive exactly 5 clock cycles after its
// input. A cubic ramp is then applied, which cubic interpolation must
// reproduce exactly apart from rounding.
module tb_farrow_interp;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [9:0]  x_in = '0;
  logic        [9:0]  mu = '0;
  logic               out_valid;
  logic signed [10:0] y_out;

  farrow_interp dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected outputs, queued with their due cycle
  real exp_q[$];
  int  due_q[$];
  int  hist[4];   // x(n) .. x(n-3)

  function automatic real lag(real m, int xm2, int xm1, int x0, int x1);
    real hm2, hm1, h0, h1;
    hm2 = (m*m*m - m) / 6.0;
    hm1 = (-m*m*m + m*m) / 2.0 + m;
    h0  = (m*m*m - m) / 2.0 - m*m + 1.0;
    h1  = -m*m*m / 6.0 + m*m / 2.0 - m / 3.0;
    return xm2*hm2 + xm1*hm1 + x0*h0 + x1*h1;
  endfunction

  task automatic push(int x, int m);
    @(negedge clk);
    in_valid = 1'b1; x_in = 10'(x); mu = 10'(m);
    for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    exp_q.push_back(lag(real'(m) / 1024.0, hist[0], hist[1], hist[2], hist[3]));
    due_q.push_back(cyc + 5);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    real e; int d;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      e = exp_q.pop_front(); d = due_q.pop_front();
      if (rabs(real'(y_out) - e) > 1.5 || d != cyc) begin
        failures++;
        $display("FAIL y=%0d expected %f (cycle %0d, due %0d)", y_out, e, cyc, d);
      end
    end
  end

  initial begin
    for (int i = 0; i < 4; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      push($urandom_range(900) - 450, $urandom_range(1023));
      repeat ($urandom_range(2)) @(negedge clk);
    end
    // cubic ramp x(n) = (n-10)^3 / 8 : reproduced exactly by the cubic
    for (int n = 0; n < 21; n++) push(((n - 10) * (n - 10) * (n - 10)) / 8, 512);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
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
