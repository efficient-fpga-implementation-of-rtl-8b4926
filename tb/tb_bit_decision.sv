// tb_bit_decision: checks the zero-threshold decision. Random frequency words
// (including zero and both extremes) with random strobes and random gaps in
// in_valid. On every strobed sample bit_valid must pulse one cycle later with
// bit_out = (freq > 0); there must be no bit_valid without a strobe; bit_clk
// must rise with each decision and be low again after two further samples
// when the next strobe is far enough away.
module tb_bit_decision;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [12:0] freq = '0;
  logic strobe = 1'b0;
  logic bit_valid, bit_out, bit_clk;

  bit_decision dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int since = -1;   // valid samples since the last strobe, -1 before the first

  initial begin
    int f;
    bit exp_v, exp_b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      case ($urandom_range(9))
        0: f = 0;
        1: f = 4095;
        2: f = -4096;
        3: f = 1;
        4: f = -1;
        default: f = $urandom_range(8191) - 4096;
      endcase
      in_valid = ($urandom_range(3) != 0);
      strobe   = ($urandom_range(4) == 0);
      freq     = 13'(f);
      exp_v    = in_valid && strobe;
      exp_b    = (f > 0);
      if (exp_v) since = 0;
      else if (in_valid && since >= 0) since++;
      @(posedge clk);
      #1;
      checks++;
      if (bit_valid != exp_v || (exp_v && bit_out != exp_b)) begin
        failures++;
        $display("FAIL valid=%0b bit=%0b expected %0b/%0b", bit_valid, bit_out, exp_v, exp_b);
      end
      if (since >= 0) begin
        checks++;
        if (bit_clk != (since < 2)) begin
          failures++;
          $display("FAIL bit_clk=%0b after %0d samples", bit_clk, since);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
