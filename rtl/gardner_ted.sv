// gardner_ted: Gardner timing error detector, run at the sample rate and
// decimated to the symbol rate.
//
// With SPS samples per symbol, the sample SPS/2 back lies half a symbol before
// the current one and the sample SPS back one whole symbol before it, so for
// every input sample the block forms
//     e(n) = (y(n) - y(n-SPS)) * y(n-SPS/2)
// which at a symbol strobe is the Gardner error
//     e(kT) = (y(kT) - y((k-1)T)) * y((k-1/2)T).
// It is non-data-aided and relies on zero crossings between symbols, which the
// demodulated CP-FSK frequency has. The products of all samples are formed,
// and the one on the sample marked by strobe (the base point) is kept: that
// is the decimation. Across a wrap of the fractional delay the interpolated
// samples are unevenly spaced: on a strobe flagged dup the sample just
// before it duplicates it in time, on one flagged gap a sample is missing,
// so the mid and the previous-symbol samples are then taken one position
// further back or nearer; this correction is this design's own. SPS must be
// at least 4. Formula and decimation follow the published design; the
// scaling (an arithmetic shift right by SHIFT, then saturation to OUT_W) is
// this design's own.
//
// Interface: in_valid qualifies y, strobe, dup and gap. A strobed sample
// yields err two clock cycles later with a one-cycle out_valid pulse; err holds between
// strobes.
module gardner_ted #(
  parameter int unsigned IN_W     = 13,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned SPS_LOG2 = 2,
  parameter int unsigned SHIFT    = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  y,
  input  logic                    strobe,
  input  logic                    dup,
  input  logic                    gap,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] err
);

  localparam int unsigned SPS = 1 << SPS_LOG2;
  localparam int unsigned PW  = 2 * IN_W + 1;

  logic signed [IN_W-1:0] dl [SPS+1];   // y(n-1) .. y(n-SPS-1)
  logic signed [PW-1:0]   e_s;          // sample-rate error
  logic                   e_v, e_stb;

  logic signed [IN_W:0]   dy;
  logic signed [IN_W-1:0] y_mid, y_back;
  logic signed [PW-1:0]   prod;
  always_comb begin
    if (strobe && dup) begin
      y_mid  = dl[SPS/2];
      y_back = dl[SPS];
    end else if (strobe && gap) begin
      y_mid  = dl[SPS/2-2];
      y_back = dl[SPS-2];
    end else begin
      y_mid  = dl[SPS/2-1];
      y_back = dl[SPS-1];
    end
    dy   = (IN_W+1)'(y) - (IN_W+1)'(y_back);
    prod = dy * y_mid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= SPS; i++) dl[i] <= '0;
      e_s   <= '0;
      e_v   <= 1'b0;
      e_stb <= 1'b0;
    end else begin
      e_v   <= in_valid;
      e_stb <= in_valid && strobe;
      if (in_valid) begin
        dl[0] <= y;
        for (int i = 1; i <= SPS; i++) dl[i] <= dl[i-1];
        e_s <= prod;
      end
    end
  end

  // ---- decimation at the base point, scaling and saturation ---------------
  logic signed [PW-1:0] e_sc;
  localparam logic signed [PW-1:0] EMAX = PW'((1 <<< (OUT_W-1)) - 1);
  localparam logic signed [PW-1:0] EMIN = -PW'(1 <<< (OUT_W-1));
  always_comb e_sc = e_s >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= e_v && e_stb;
      if (e_v && e_stb) begin
        if (e_sc > EMAX)      err <= EMAX[OUT_W-1:0];
        else if (e_sc < EMIN) err <= EMIN[OUT_W-1:0];
        else                  err <= OUT_W'(e_sc);
      end
    end
  end

endmodule
