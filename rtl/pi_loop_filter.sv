// pi_loop_filter: second-order proportional-plus-integrator loop filter.
//
// Two paths act on each error sample e(k): the proportional path KP*e(k)
// tracks a phase step, the integral path accumulates KI*e(k) and so tracks a
// ramp (a frequency error) with zero steady-state error:
//     I(k) = I(k-1) + KI*e(k)
//     v(k) = (KP*e(k) + I(k)) / 2**SHIFT
// The structure follows the published design. The gains are integer
// parameters scaled by 2**-SHIFT (the document derives them from the damping
// factor and noise bandwidth, but gives no numbers), and the integrator and
// the output saturate instead of wrapping; both are this design's choices.
// The same module serves the timing and the carrier loop.
//
// Interface: in_valid qualifies err; v is updated one clock cycle later, with
// a one-cycle out_valid pulse, and holds in between. Reset clears the
// integrator, so the loop starts with no frequency offset.
module pi_loop_filter #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned ACC_W = 32,
  parameter int          KP    = 64,
  parameter int          KI    = 1,
  parameter int unsigned SHIFT = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  err,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] v
);

  typedef logic signed [ACC_W-1:0] acc_t;
  localparam acc_t AMAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam acc_t AMIN = {1'b1, {(ACC_W-1){1'b0}}};
  localparam acc_t VMAX = acc_t'((64'sd1 <<< (OUT_W-1)) - 1);
  localparam acc_t VMIN = -acc_t'(64'sd1 <<< (OUT_W-1));

  // saturating add
  function automatic acc_t sat_add(acc_t a, acc_t b);
    acc_t s;
    s = a + b;
    if (!a[ACC_W-1] && !b[ACC_W-1] && s[ACC_W-1]) return AMAX;
    if (a[ACC_W-1] && b[ACC_W-1] && !s[ACC_W-1])  return AMIN;
    return s;
  endfunction

  acc_t integ, integ_n, prop, isum, vsum;
  always_comb begin
    prop    = acc_t'(err) * acc_t'(KP);
    isum    = acc_t'(err) * acc_t'(KI);
    integ_n = sat_add(integ, isum);
    vsum    = sat_add(prop, integ_n) >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      v         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        integ <= integ_n;
        if (vsum > VMAX)      v <= VMAX[OUT_W-1:0];
        else if (vsum < VMIN) v <= VMIN[OUT_W-1:0];
        else                  v <= OUT_W'(vsum);
      end
    end
  end

endmodule
