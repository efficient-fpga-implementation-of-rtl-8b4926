// tb_timing_nco: checks the interpolation control against an integer model
// of the count-down accumulator:
//   W = 2^14 + v;  if eta < W: strobe, mu = (4*eta) >> 6 (clipped);
//   eta = (eta - W) mod 2^16.
// First with v = 0 (a strobe every 4 samples exactly, constant mu), then
// with constant and random v, under which mu must wrap in both directions:
// dup is expected when mu falls by more than half a sample at a strobe,
// gap when it rises by more than half, and each must occur. Every output
// cycle is compared, and for constant v the strobe rate is checked against
// (2^14 + v) / 2^16 strobes per sample.
module tb_timing_nco;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] v = '0;
  logic out_valid, strobe, dup, gap;
  logic [9:0] mu;

  timing_nco dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  int checks = 0, failures = 0;
  int eta = 0, m_mu = 0;
  int n_long = 0, n_short = 0, n_strobe = 0;

  task automatic step(int vv);
    int w, d; bit s, l, sh;
    @(negedge clk);
    in_valid = 1'b1; v = 16'(vv);
    w = 16384 + vv;
    d = eta - w;
    s = (d < 0); l = 0; sh = 0;
    if (s) begin
      int nm;
      nm = ((eta * 4) >= 65536) ? 1023 : ((eta * 4) >> 6);
      l  = (m_mu - nm > 512);
      sh = (nm - m_mu > 512);
      m_mu = nm;
    end
    eta = d & 65535;
    @(posedge clk); #1;
    checks++;
    if (strobe != s || dup != l || gap != sh || int'(mu) != m_mu || !out_valid) begin
      failures++;
      $display("FAIL strobe=%0b/%0b long=%0b/%0b short=%0b/%0b mu=%0d/%0d",
               strobe, s, dup, l, gap, sh, mu, m_mu);
    end
    if (s) n_strobe++;
    if (l) n_long++;
    if (sh) n_short++;
    @(negedge clk); in_valid = 1'b0;
  endtask

  initial begin
    int ns0;
    real rate;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) step(0);
    checks++;
    if (n_strobe != 100) begin failures++; $display("FAIL %0d strobes in 400 samples", n_strobe); end
    // constant v: strobe rate
    ns0 = n_strobe;
    for (int k = 0; k < 8000; k++) step(200);
    rate = real'(n_strobe - ns0) / 8000.0;
    checks++;
    if (rabs(rate - (16384.0 + 200.0) / 65536.0) > 0.001) begin
      failures++; $display("FAIL strobe rate %f", rate);
    end
    for (int k = 0; k < 8000; k++) step(-300);
    for (int k = 0; k < 4000; k++) step($urandom_range(2000) - 1000);
    checks++;
    if (n_long == 0 || n_short == 0) begin
      failures++; $display("FAIL long=%0d short=%0d", n_long, n_short);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
