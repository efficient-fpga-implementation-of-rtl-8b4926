// carrier_nco: numerically controlled oscillator of the carrier recovery loop.
//
// A phase accumulator of ACC_W bits (one full turn = 2**ACC_W) adds the signed
// frequency word inc on every valid sample. This is an integrator with unit
// DC gain; it starts at zero phase and, with the loop filter integrator also
// cleared at reset, with no initial frequency offset. Its top PHASE_W bits
// are the correction phase that the frequency detector subtracts from the
// phase of each sample, so a constant inc removes a constant frequency
// offset of inc / 2**ACC_W turns per sample. Unit gain and zero start follow
// the published design; the widths are this design's own.
//
// Interface: in_valid qualifies inc; phase is registered and advances one
// clock cycle after each valid sample.
module carrier_nco #(
  parameter int unsigned ACC_W   = 24,
  parameter int unsigned INC_W   = 24,
  parameter int unsigned PHASE_W = 11
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [INC_W-1:0]   inc,
  output logic signed [PHASE_W-1:0] phase
);

  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (in_valid) acc <= acc + ACC_W'(inc);
  end

  always_comb phase = acc[ACC_W-1 -: PHASE_W];

endmodule
