// tb_cpfsk_demod: end-to-end test of the CP-FSK demodulator at its default
// parameters.
//
// A behavioural transmitter and channel produce the baseband I/Q that a
// down-converter and ADC would deliver: binary CP-FSK with modulation index
// h = 0.7 carrying a PN11 sequence (x^11 + x^9 + 1), rectangular frequency
// pulses, amplitude 400 LSB of a 10-bit ADC, a carrier offset, a start
// timing offset and a sampling clock that runs slightly off four samples per
// symbol, so that the fractional delay drifts and wraps. Samples arrive on
// every clock cycle, every second or every tenth one, depending on the
// scenario. Scenarios: carrier offsets of +-225 kHz at 200 kbit/s (1.125 / T)
// combined with +-0.25 % clock drift; timing ramps of +-1 % of the symbol
// period alone; a timing step alone; a carrier step of 70 % of the largest
// trackable offset (0.7 * 1.65 / T) alone.
// Checks, per scenario:
//  * the decided bits obey the PN11 recurrence b(n) = b(n-9) xor b(n-11) over
//    the last symbols, as a BER tester would check them (no errors allowed,
//    the channel has no noise);
//  * the carrier loop's frequency word matches the injected offset to within
//    1/16 of the symbol rate (the lock criterion) at the end;
//  * one bit comes out per symbol: the bit count matches the symbol count.
// Mechanisms counted, each must occur: symbol strobes, strobe periods of
// three and of five samples (the timing loop absorbing clock drift), mu
// wrap-arounds, carrier lock, and a non-zero timing error being corrected.
module tb_cpfsk_demod;
  import cpfsk_pkg::*;

  localparam real PI   = 3.14159265358979;
  localparam real H    = 0.7;
  localparam real AMP  = 400.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [ADC_W-1:0] i_in = '0, q_in = '0;
  logic bit_valid, bit_out, bit_clk, smp_valid, sym_strobe;
  logic signed [SMP_W-1:0]  i_interp;
  logic signed [FREQ_W-1:0] freq;
  logic [SMP_W+1:0] magnitude;
  logic [MU_W-1:0] mu;
  logic signed [15:0] ted_err;
  logic signed [23:0] carrier_inc;

  cpfsk_demod dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_strobe = 0, n_p3 = 0, n_p5 = 0, n_wrap = 0, n_lock = 0, n_ted_nz = 0;

  // ---- decided bit history -------------------------------------------------
  logic [10:0] hist;
  int  nbits = 0, check_from = 0, bit_err = 0, bit_chk = 0;
  always @(posedge clk) if (rst_n && bit_valid) begin
    if (nbits >= check_from + 11) begin
      bit_chk++;
      if (bit_out != (hist[8] ^ hist[10])) begin bit_err++; if ($test$plusargs("trace")) $display("E %0d", nbits); end
    end
    hist  <= {hist[9:0], bit_out};
    nbits <= nbits + 1;
  end

  // ---- mechanism counters ----------------------------------------------------
  int since = 0;
  logic [MU_W-1:0] mu_prev = '0;
  always @(posedge clk) if (rst_n && smp_valid) begin
    since <= since + 1;
    if (sym_strobe) begin
      n_strobe++;
      if (n_strobe > 50 && since == 2) n_p3++;   // strobe period 3 samples
      if (n_strobe > 50 && since == 4) n_p5++;   // strobe period 5 samples
      since <= 0;
      if (n_strobe > 50 && ((mu > mu_prev) ? (mu - mu_prev) : (mu_prev - mu)) > 10'd700)
        n_wrap++;
      mu_prev <= mu;
      if (ted_err != 0) n_ted_nz++;
    end
  end

  always @(posedge clk) if (rst_n && sym_strobe && $test$plusargs("trace")) $display("T %0d mu=%0d err=%0d f=%0d v=%0d", n_strobe, mu, ted_err, freq, dut.t_v);
  // ---- behavioural transmitter + channel ---------------------------------
  logic [10:0] lfsr;
  int   sym_idx;
  real  sym_phase;  // phase at the start of the current symbol
  int   sym_a;

  function automatic int next_bit(ref logic [10:0] s);
    logic b;
    b = s[8] ^ s[10];        // s(n) = s(n-9) xor s(n-11)
    s = {s[9:0], b};
    return int'(b);
  endfunction

  task automatic run(input real df, input real eps, input real tau0,
                     input int nsym, input int check_last, input int stride);
    real t, ts, ph, fr;
    int  n;
    // reset
    rst_n = 1'b0; in_valid = 1'b0;
    repeat (4) @(posedge clk);
    lfsr = 11'h5A3; sym_idx = 0; sym_phase = 0.0;
    sym_a = 2 * next_bit(lfsr) - 1;
    nbits = 0; check_from = nsym - check_last; bit_err = 0; bit_chk = 0;
    n_strobe = 0;
    @(negedge clk); rst_n = 1'b1;
    ts = 0.25 * (1.0 + eps);
    n = 0;
    while (sym_idx < nsym) begin
      t = tau0 + n * ts;
      while (t >= real'(sym_idx + 1)) begin
        sym_phase = sym_phase + PI * H * sym_a;
        sym_idx++;
        sym_a = 2 * next_bit(lfsr) - 1;
      end
      ph = sym_phase + PI * H * sym_a * (t - sym_idx) + 2.0 * PI * df * t + 0.3;
      @(negedge clk);
      in_valid = 1'b1;
      i_in = ADC_W'($rtoi(AMP * $cos(ph) + (AMP * $cos(ph) >= 0 ? 0.5 : -0.5)));
      q_in = ADC_W'($rtoi(AMP * $sin(ph) + (AMP * $sin(ph) >= 0 ? 0.5 : -0.5)));
      if (stride > 1) begin
        @(negedge clk);
        in_valid = 1'b0;
        repeat (stride - 2) @(negedge clk);
      end
      n++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (40) @(posedge clk);
    // bit count: one decision per received symbol, within the pipeline delay
    // and the few symbols that may slip while the timing loop pulls in
    checks++;
    if (nbits < nsym - 12 - nsym / 100 || nbits > nsym + 2 + nsym / 100) begin
      failures++;
      $display("FAIL bits=%0d symbols=%0d", nbits, nsym);
    end
    // BER check on the last symbols
    checks++;
    if (bit_chk < check_last - 20 || bit_err != 0) begin
      failures++;
      $display("FAIL df=%f: %0d errors in %0d checked bits", df, bit_err, bit_chk);
    end
    // carrier lock: residual offset below 1/16 of the symbol rate
    fr = real'(carrier_inc) / real'(1 << 13);   // turns/sample -> f*T (x4 / 2^24 * ...)
    fr = fr * 4.0 / 2048.0;
    checks++;
    if (fr - df > 1.0 / 16 || df - fr > 1.0 / 16) begin
      failures++;
      $display("FAIL carrier estimate %f for offset %f", fr, df);
    end else n_lock++;
    $display("scenario df=%f eps=%f: bits=%0d checked=%0d errors=%0d f_est=%f mu=%0d",
             df, eps, nbits, bit_chk, bit_err, fr, mu);
  endtask

  initial begin
    // combined carrier offset (225 kHz at 200 kbit/s) and clock drift
    run( 1.125,  0.0025, 0.37, 3000, 1000, 2);
    run(-1.125, -0.0025, 0.81, 3000, 1000, 2);
    run( 0.3,   -0.0025, 0.55, 2000, 1000, 2);
    // timing ramp of +-1 % of the symbol period, no carrier offset, one
    // sample per clock (the highest input rate)
    run( 0.0,    0.01,   0.15, 2000, 1000, 1);
    run( 0.0,   -0.01,   0.65, 2000, 1000, 1);
    // carrier step of 70 % of the largest trackable offset (1.65 / T), no
    // timing drift, one sample every 10 clocks
    run( 1.155,  0.0,    0.6,  3000, 1000, 10);
    // timing step only
    run( 0.0,    0.0,    0.4,  1500, 1000, 4);
    $display("mechanisms: strobes=%0d p3=%0d p5=%0d mu_wraps=%0d locks=%0d ted_nonzero=%0d",
             n_strobe, n_p3, n_p5, n_wrap, n_lock, n_ted_nz);
    checks++; if (n_p3 == 0)     begin failures++; $display("FAIL no 3-sample strobe period"); end
    checks++; if (n_p5 == 0)     begin failures++; $display("FAIL no 5-sample strobe period"); end
    checks++; if (n_wrap == 0)   begin failures++; $display("FAIL mu never wrapped"); end
    checks++; if (n_lock == 0)   begin failures++; $display("FAIL carrier never locked"); end
    checks++; if (n_ted_nz == 0) begin failures++; $display("FAIL timing error always zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
