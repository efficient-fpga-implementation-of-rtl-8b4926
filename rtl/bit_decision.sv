// bit_decision: symbol decision for binary CP-FSK.
//
// The demodulated frequency ideally takes the two opposite values +-h/(2T),
// so the decision is a comparison with a zero threshold, made once per
// symbol on the sample marked by the timing recovery strobe. A positive
// frequency is decided as bit 1, a negative (or zero) one as bit 0; the
// polarity is this design's choice.
//
// Interface: in_valid qualifies freq and strobe; on a valid sample with strobe
// set, bit_out is updated and bit_valid pulses one clock cycle later. bit_clk
// is a symbol-rate clock for a bit error rate tester: it rises with each
// decision and falls after HALF further valid samples, so data is stable
// around its rising edge.
module bit_decision #(
  parameter int unsigned IN_W = 13,  // frequency word width
  parameter int unsigned HALF = 2    // valid samples in the high phase of bit_clk
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] freq,
  input  logic                   strobe,
  output logic                   bit_valid,
  output logic                   bit_out,
  output logic                   bit_clk
);

  logic [$clog2(HALF+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      bit_clk   <= 1'b0;
      cnt       <= '0;
    end else begin
      bit_valid <= in_valid && strobe;
      if (in_valid && strobe) begin
        bit_out <= (freq > 0);
        bit_clk <= 1'b1;
        cnt     <= '0;
      end else if (in_valid && bit_clk) begin
        if (cnt == ($bits(cnt))'(HALF - 1)) bit_clk <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
