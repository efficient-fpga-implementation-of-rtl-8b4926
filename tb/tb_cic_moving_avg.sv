// tb_cic_moving_avg: checks the moving average at its default size (R = 16,
// M = 64, a window of 1024 samples). The model keeps every input and, at
// every 16th valid sample, forms the sum of the last 1024 inputs (missing
// ones count as zero) and shifts it right by 10 (floor). Random inputs over
// the full 13-bit range exercise the modulo arithmetic of the integrator;
// a constant input must then average to itself and a balanced +-717
// pattern plus an offset of 150 to the offset. Output timing: out_valid one
// cycle after each 16th valid input, avg held otherwise.
module tb_cic_moving_avg;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [12:0] x = '0;
  logic out_valid;
  logic signed [12:0] avg;

  cic_moving_avg dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xs[$];
  longint run_sum = 0;
  int nin = 0;

  task automatic push(int val);
    longint e;
    bit due;
    @(negedge clk);
    in_valid = 1'b1; x = 13'(val);
    xs.push_back(val);
    run_sum += val;
    if (xs.size() > 1024) run_sum -= xs.pop_front();
    nin++;
    due = (nin % 16 == 0);
    e = run_sum >>> 10;
    @(posedge clk); #1;
    checks++;
    if (out_valid != due || (due && longint'(avg) != e)) begin
      failures++;
      $display("FAIL sample %0d valid=%0b avg=%0d expected %0d", nin, out_valid, avg, e);
    end
    @(negedge clk); in_valid = 1'b0;
    repeat ($urandom_range(1)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) push($urandom_range(8191) - 4096);
    for (int k = 0; k < 1100; k++) push(-1234);
    checks++;
    if (avg != -1234) begin failures++; $display("FAIL constant average %0d", avg); end
    for (int k = 0; k < 1100; k++) push(150 + ((k % 3 == 0 || k % 5 == 0) ? 717 : -717) * ((k / 7) % 2 == 0 ? 1 : -1));
    checks++;
    if (avg < 140 || avg > 160) begin failures++; $display("FAIL balanced average %0d", avg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
