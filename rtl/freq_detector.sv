// freq_detector: carrier-compensated frequency detector.
//
// Takes the phase of every sample from the phase detector and
//  1. subtracts the carrier NCO phase phase_corr (the carrier recovery
//     correction, a ramp when a frequency offset is being removed),
//  2. differences consecutive compensated phases,
//  3. unwraps the difference: phases are two's complement fractions of a full
//     turn, so keeping the difference to PHASE_W bits folds it into [-pi, pi),
//     which removes the 2*pi jumps of the phase,
//  4. scales time from the sample period to the symbol period by multiplying
//     by SPS (a shift, as SPS is a power of two).
// Around a wrap of the fractional delay the interpolated samples are not
// evenly spaced. A sample flagged dup follows a near-duplicate of itself, so
// its raw phase is differenced against the sample two back instead; a sample
// flagged gap lies two sample periods after its predecessor, so two steps of
// the correction are removed and the result is scaled by SPS/2 instead of
// SPS. The correction phase, which advances by one step per sample whatever
// the spacing, is therefore differenced separately from the raw phase (the
// two orders are equivalent for evenly spaced samples). This handling is
// this design's own.
// The result freq means f*T = freq / 2**PHASE_W; ideally it is +-h/2 for the
// two symbols (+-717 for h = 0.7). Steps 2-4 follow the published structure;
// the placement of the carrier correction in front of the difference and the
// number formats are this design's own.
//
// Interface: in_valid qualifies phase, phase_corr, dup and gap; freq appears two clock
// cycles later with out_valid. The first output after reset differences
// against a zero phase.
module freq_detector #(
  parameter int unsigned PHASE_W  = 11,
  parameter int unsigned SPS_LOG2 = 2    // log2 of the samples per symbol
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic signed [PHASE_W-1:0]          phase,
  input  logic signed [PHASE_W-1:0]          phase_corr,
  input  logic                               dup,
  input  logic                               gap,
  output logic                               out_valid,
  output logic signed [PHASE_W+SPS_LOG2-1:0] freq
);

  logic signed [PHASE_W-1:0] p1, p_prev, p_prev2;   // raw phases
  logic signed [PHASE_W-1:0] c1, c_prev;            // correction phases
  logic signed [PHASE_W-1:0] dp, dc, dphi;          // wrapped differences
  logic v1, dup1, gap1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1   <= '0;
      c1   <= '0;
      v1   <= 1'b0;
      dup1 <= 1'b0;
      gap1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        p1   <= phase;
        c1   <= phase_corr;
        dup1 <= dup;
        gap1 <= gap;
      end
    end
  end

  // the correction advances by dc per sample; remove it once per sample
  // period spanned by the phase difference (twice across a gap)
  always_comb begin
    dp   = dup1 ? p1 - p_prev2 : p1 - p_prev;
    dc   = c1 - c_prev;
    dphi = gap1 ? dp - (dc <<< 1) : dp - dc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_prev    <= '0;
      p_prev2   <= '0;
      c_prev    <= '0;
      freq      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        p_prev  <= p1;
        p_prev2 <= p_prev;
        c_prev  <= c1;
        if (gap1) freq <= (PHASE_W+SPS_LOG2)'(dphi) <<< (SPS_LOG2 - 1);
        else      freq <= (PHASE_W+SPS_LOG2)'(dphi) <<< SPS_LOG2;
      end
    end
  end

endmodule
