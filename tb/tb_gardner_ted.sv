// tb_gardner_ted: checks the Gardner detector against an integer model.
// A random frequency stream is applied with a strobe every 3 to 5 valid
// samples (flagged gap / dup accordingly) and random gaps in
// in_valid. For each strobed sample the model forms
//   e = (y(n) - y(n-4-s)) * y(n-2-s) >>> 10,  s = +1 long, -1 short, else 0,
// saturated to 16 bits, from its own history of the inputs; err must equal
// it and out_valid must pulse exactly two cycles after the strobed input.
// Outputs without a strobe are errors.
module tb_gardner_ted;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [12:0] y = '0;
  logic strobe = 1'b0, dup = 1'b0, gap = 1'b0;
  logic out_valid;
  logic signed [15:0] err;

  gardner_ted dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int h[8];          // h[0] = newest input
  int exp_q[$], due_q[$];

  always @(posedge clk) if (rst_n && out_valid) begin
    int e, d;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL spurious output"); end
    else begin
      e = exp_q.pop_front(); d = due_q.pop_front();
      if (int'(err) != e || d != cyc) begin
        failures++;
        $display("FAIL err=%0d expected %0d (cycle %0d due %0d)", err, e, cyc, d);
      end
    end
  end

  initial begin
    int per, cnt, v, s;
    longint p;
    for (int i = 0; i < 8; i++) h[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    per = 4; cnt = 0;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      v = (k % 17 == 0) ? 4095 : (k % 19 == 0) ? -4096 : $urandom_range(8191) - 4096;
      y = 13'(v);
      cnt++;
      strobe = (cnt == per);
      dup = strobe && per == 5;
      gap = strobe && per == 3;
      if (strobe) begin
        s = per - 4;
        p = (longint'(v) - longint'(h[3 + s])) * longint'(h[1 + s]);
        p = p >>> 10;
        if (p > 32767) p = 32767;
        if (p < -32768) p = -32768;
        exp_q.push_back(int'(p));
        due_q.push_back(cyc + 2);
        cnt = 0;
        per = 3 + $urandom_range(2);
      end
      for (int i = 7; i > 0; i--) h[i] = h[i-1];
      h[0] = v;
      @(negedge clk);
      in_valid = 1'b0; strobe = 1'b0; dup = 1'b0; gap = 1'b0;
      repeat ($urandom_range(1)) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
