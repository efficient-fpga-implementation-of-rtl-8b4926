// timing_nco: interpolation control of the timing recovery loop.
//
// A modulo-1 accumulator eta, ACC_W bits of fraction, runs at the sample rate
// and steps down by W = 1/SPS + v every valid sample, where v is the timing
// loop filter output. With v = 0 it wraps every SPS samples. The wrap is the
// base-point trigger: the sample on which it happens is flagged with strobe.
// On that sample the fractional delay is taken from the content before the
// step as
//     mu = SPS * eta        (the first-order approximation of eta / W),
// which for SPS a power of two is a left shift; mu is then held for the
// whole symbol, i.e. it is updated at the symbol rate. Accumulator, overflow
// trigger and mu = N*eta follow the published design; counting down (so that
// eta before the wrap measures the distance to the symbol instant, as in
// Gardner's form of this controller) and the word widths are this design's
// own.
//
// When the receiver clock is not exactly SPS times the symbol rate, mu
// drifts and at some point wraps, and the base point moves by one sample.
// Since mu changes only at a strobe, the strobed sample and the sample before
// it are then interpolated with very different delays: when mu drops by more
// than one half (it wrapped from near 1 to near 0) the two lie almost on the
// same instant, and the strobe is flagged dup; when mu rises by more than one
// half they lie almost two sample periods apart, and it is flagged gap. The
// frequency detector and the timing error detector use the flags to pick
// the right neighbours. The flags are this design's addition.
//
// Interface: in_valid qualifies v. strobe, dup, gap and mu for that sample
// are registered and valid from the next clock cycle (the flags are
// one-cycle pulses with out_valid); mu keeps its value until the next strobe.
// A positive v shortens the strobe period. An assertion checks that dup and
// gap only appear on a strobe and never together.
module timing_nco #(
  parameter int unsigned ACC_W    = 16,
  parameter int unsigned MU_W     = 10,
  parameter int unsigned V_W      = 16,
  parameter int unsigned SPS_LOG2 = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [V_W-1:0] v,
  output logic                  out_valid,
  output logic                  strobe,
  output logic                  dup,   // predecessor nearly on the same instant
  output logic                  gap,   // predecessor nearly two samples back
  output logic [MU_W-1:0]       mu
);

  localparam int unsigned DW = ACC_W + 2;
  typedef logic signed [DW-1:0] d_t;

  logic [ACC_W-1:0] eta;
  d_t w, diff;
  logic [ACC_W+SPS_LOG2-1:0] eta_n;

  always_comb begin
    w     = d_t'(1 <<< (ACC_W - SPS_LOG2)) + d_t'(v);
    diff  = d_t'({2'b00, eta}) - w;
    eta_n = (ACC_W+SPS_LOG2)'(eta) << SPS_LOG2;
  end

  // mu of this sample: SPS*eta, clipped just below 1 when W exceeds 1/SPS
  logic [MU_W-1:0] mu_new;
  always_comb begin
    if (|eta_n[ACC_W+SPS_LOG2-1:ACC_W]) mu_new = '1;
    else mu_new = eta_n[ACC_W-1 -: MU_W];
  end

  localparam logic [MU_W-1:0] HALF = {1'b1, {(MU_W-1){1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eta       <= '0;
      strobe    <= 1'b0;
      dup       <= 1'b0;
      gap       <= 1'b0;
      out_valid <= 1'b0;
      mu        <= '0;
    end else begin
      out_valid <= in_valid;
      strobe    <= 1'b0;
      dup       <= 1'b0;
      gap       <= 1'b0;
      if (in_valid) begin
        eta <= diff[ACC_W-1:0];             // modulo-1 wrap
        if (diff < 0) begin
          strobe <= 1'b1;
          mu     <= mu_new;
          dup    <= (mu > mu_new) && (mu - mu_new > HALF);
          gap    <= (mu_new > mu) && (mu_new - mu > HALF);
        end
      end
    end
  end

  // a wrap flag only ever marks a strobe, and the two flags exclude each other
  a_flags : assert property (@(posedge clk) disable iff (!rst_n)
                             (dup || gap) |-> (strobe && !(dup && gap)));

endmodule
