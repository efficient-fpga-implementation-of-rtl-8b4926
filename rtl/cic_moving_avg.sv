// cic_moving_avg: moving average of the demodulated frequency, built as a
// single-stage Cascaded Integrator-Comb filter.
//
// For a random, balanced bit stream the symbol frequencies +-h/2T average
// out, so the mean of the frequency samples over a long window is the
// residual carrier offset; the carrier loop drives it to zero. The integrator
// adds every input sample (modulo 2**AW, which the comb undoes exactly); its
// value is taken every R samples (decimation) and the comb subtracts the value
// taken M decimated steps earlier, giving the sum of the last R*M samples. A
// shift by log2(R*M) turns the sum into the average. The comb's M past values
// sit in a circular buffer memory, so the register count is set by M while
// the window is R*M samples: R trades update rate against storage. The CIC
// realisation and the window of 256 symbols (1024 samples at four samples per
// symbol) follow the published design; the split R = 16, M = 64 is this
// design's own. Until M comb values have been stored the missing old values
// count as zero, so the first outputs average over a partly empty window.
//
// Interface: in_valid qualifies x. Every R-th valid sample produces, one
// clock cycle later, a one-cycle out_valid pulse with the new avg, which then
// holds. R*M must be a power of two.
module cic_moving_avg #(
  parameter int unsigned IN_W = 13,
  parameter int unsigned R    = 16,
  parameter int unsigned M    = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                   out_valid,
  output logic signed [IN_W-1:0] avg
);

  localparam int unsigned LW = $clog2(R * M);
  localparam int unsigned AW = IN_W + LW;
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1;
  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;

  typedef logic signed [AW-1:0] acc_t;

  acc_t integ, integ_n;
  acc_t comb_mem [M];
  acc_t old_val, sum;
  logic [RW-1:0] rcnt;
  logic [PW-1:0] wptr;
  logic [PW:0]   filled;

  always_comb begin
    integ_n = integ + acc_t'(x);
    old_val = (filled == (PW+1)'(M)) ? comb_mem[wptr] : '0;
    sum     = integ_n - old_val;
  end

  always_ff @(posedge clk) begin
    if (in_valid && rcnt == RW'(R - 1)) comb_mem[wptr] <= integ_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      rcnt      <= '0;
      wptr      <= '0;
      filled    <= '0;
      avg       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ <= integ_n;
        if (rcnt == RW'(R - 1)) begin
          rcnt      <= '0;
          wptr      <= (wptr == PW'(M - 1)) ? '0 : wptr + 1'b1;
          if (filled != (PW+1)'(M)) filled <= filled + 1'b1;
          avg       <= IN_W'(sum >>> LW);
          out_valid <= 1'b1;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end

endmodule
