// farrow_interp: cubic Lagrange fractional-delay interpolator in Farrow form.
//
// For every input sample x(n) the block returns the signal value at the
// instant (n-2+mu)*Ts, interpolated from the four newest samples
// x(n)=x(m+2), x(n-1)=x(m+1), x(n-2)=x(m) and x(n-3)=x(m-1), where m is the
// base point and mu in [0,1) the fractional delay. The four Lagrange filters
//   h(-2) = ( mu^3 - mu)/6
//   h(-1) = (-mu^3 + mu^2)/2 + mu
//   h( 0) = ( mu^3 - mu)/2 - mu^2 + 1
//   h( 1) = -mu^3/6 + mu^2/2 - mu/3
// are evaluated as a cubic in mu with the Horner rule,
//   y = ((v3*mu + v2)*mu + v1)*mu + v0.
// The coefficient table holds only the values 1, 1/2, 1/3 and 1/6. Halves are
// shifts, 1/3 is twice 1/6, so the only constant multiplication is x/6. It is
// done once, as each sample enters, and the product travels down its own
// delay line next to the sample, so every tap that needs x/6 or x/3 reuses it
// instead of multiplying again. That sharing follows the published
// architecture; the fixed-point formats, the rounding and the pipelining are
// this design's own.
//
// Interface: in_valid qualifies x_in and mu (mu is sampled with the sample).
// The result appears LAT_INTERP = 5 clock cycles later with out_valid. y_out
// has the LSB weight of x_in and one extra bit for the overshoot of the cubic;
// it saturates.
module farrow_interp #(
  parameter int unsigned IN_W  = 10,  // input sample width
  parameter int unsigned OUT_W = 11,  // output sample width (same LSB as input)
  parameter int unsigned MU_W  = 10   // fractional delay width, unsigned fraction
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  input  logic        [MU_W-1:0]  mu,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y_out
);

  localparam int unsigned F  = 8;            // extra fraction bits inside
  localparam int unsigned IW = IN_W + F + 3; // internal word
  // x * 2^F / 6 = (x * 43691) >>> 10, since 43691 = round(2^18 / 6)
  localparam logic signed [17:0] SIXTH = 18'sd43691;

  typedef logic signed [IW-1:0] word_t;

  // ---- stage 1: sample and x/6 delay lines --------------------------------
  word_t xs [4];   // x(n), x(n-1), x(n-2), x(n-3) scaled by 2^F
  word_t ds [4];   // the same samples divided by 6
  logic [MU_W-1:0] mu_s1;
  logic v1;

  logic signed [IN_W+18-1:0] prod6;
  always_comb prod6 = x_in * SIXTH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        xs[i] <= '0;
        ds[i] <= '0;
      end
      mu_s1 <= '0;
      v1    <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        xs[0] <= word_t'(x_in) <<< F;
        ds[0] <= word_t'(prod6 >>> 10);
        for (int i = 1; i < 4; i++) begin
          xs[i] <= xs[i-1];
          ds[i] <= ds[i-1];
        end
        mu_s1 <= mu;
      end
    end
  end

  // ---- stage 2: Farrow branch sums -----------------------------------------
  // v3 =  x(m+2)/6 - x(m+1)/2 + x(m)/2 - x(m-1)/6
  // v2 =  x(m+1)/2 - x(m)     + x(m-1)/2
  // v1 = -x(m+2)/6 + x(m+1)   - x(m)/2 - x(m-1)/3
  // v0 =  x(m)
  word_t c3, c2, c1, c0;
  logic [MU_W-1:0] mu_s2;
  logic v2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c3, c2, c1, c0} <= '0;
      mu_s2 <= '0;
      v2    <= 1'b0;
    end else begin
      v2 <= v1;
      if (v1) begin
        c3 <= ds[0] - ds[3] + ((xs[2] - xs[1]) >>> 1);
        c2 <= ((xs[1] + xs[3]) >>> 1) - xs[2];
        c1 <= xs[1] - ds[0] - (xs[2] >>> 1) - (ds[3] <<< 1);
        c0 <= xs[2];
        mu_s2 <= mu_s1;
      end
    end
  end

  // ---- stages 3-5: Horner rule, one multiplication by mu per stage -------
  function automatic word_t mul_mu(word_t a, logic [MU_W-1:0] m);
    logic signed [IW+MU_W:0] p;
    p = a * $signed({1'b0, m});
    return word_t'(p >>> MU_W);
  endfunction

  word_t h3, h2, c1_d, c0_d, c0_dd;
  logic [MU_W-1:0] mu_s3, mu_s4;
  logic v3, v4;
  word_t y_full;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {h3, h2, c1_d, c0_d, c0_dd} <= '0;
      {mu_s3, mu_s4} <= '0;
      {v3, v4} <= '0;
    end else begin
      v3 <= v2;
      v4 <= v3;
      if (v2) begin
        h3    <= mul_mu(c3, mu_s2) + c2;
        c1_d  <= c1;
        c0_d  <= c0;
        mu_s3 <= mu_s2;
      end
      if (v3) begin
        h2    <= mul_mu(h3, mu_s3) + c1_d;
        c0_dd <= c0_d;
        mu_s4 <= mu_s3;
      end
    end
  end

  always_comb y_full = mul_mu(h2, mu_s4) + c0_dd + word_t'(1 <<< (F-1));

  localparam word_t YMAX = word_t'((1 <<< (OUT_W-1)) - 1);
  localparam word_t YMIN = -word_t'(1 <<< (OUT_W-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= v4;
      if (v4) begin
        if ((y_full >>> F) > YMAX)      y_out <= YMAX[OUT_W-1:0];
        else if ((y_full >>> F) < YMIN) y_out <= YMIN[OUT_W-1:0];
        else                            y_out <= OUT_W'(y_full >>> F);
      end
    end
  end

endmodule
