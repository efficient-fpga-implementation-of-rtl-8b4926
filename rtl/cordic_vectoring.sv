// cordic_vectoring: phase detector, rectangular (I,Q) to polar (phase,
// magnitude) with an unfolded vectoring-mode CORDIC.
//
// Stage 0 extends the range: the micro-rotations only converge for angles up
// to about +-99 degrees, so a vector in the left half-plane is first turned
// by -90 degrees (Q >= 0) or +90 degrees (Q < 0) and the turn is preloaded
// into the angle accumulator. Then STAGES micro-rotations follow, one per
// pipeline stage: stage i rotates by -/+atan(2^-i) depending on the sign of
// Q, using only shifts and adds, and accumulates the angle from a small
// arctangent table. The five stages and the 11-bit precision follow the
// published design; the table entries are round(atan(2^-i) * 2^14 / (2*pi)),
// i.e. the angle is carried with three guard bits (a 14-bit turn) and rounded
// to PHASE_W bits at the output; x and y carry two fraction bits below the
// input LSB so that the shifted terms of small vectors keep their precision.
// The magnitude keeps the CORDIC gain
// (about 1.6457 for five stages) and is not corrected. Its top bit stays zero
// for any IN_W-bit input (the largest magnitude, 1.6457*sqrt(2)*2^(IN_W-1),
// is below 2^(IN_W+1)); it is kept so that the vector can never overflow.
//
// Interface: in_valid qualifies i_in/q_in; phase (two's complement fraction of
// a full turn, [-pi, pi)) and mag appear STAGES+2 clock cycles later with
// out_valid. Fully pipelined: one vector per clock.
module cordic_vectoring #(
  parameter int unsigned IN_W    = 11,  // I/Q input width
  parameter int unsigned PHASE_W = 11,  // phase output width
  parameter int unsigned STAGES  = 5    // micro-rotations, at most 12
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [IN_W-1:0]    i_in,
  input  logic signed [IN_W-1:0]    q_in,
  output logic                      out_valid,
  output logic signed [PHASE_W-1:0] phase,
  output logic        [IN_W+1:0]    mag
);

  localparam int unsigned FX = 2;          // fraction bits below the input LSB
  localparam int unsigned XW = IN_W + 2 + FX;  // room for the CORDIC gain
  localparam int unsigned ZW = 14;         // angle accumulator, one turn = 2^14
  localparam int unsigned GUARD = ZW - PHASE_W;

  typedef logic signed [XW-1:0] xy_t;
  typedef logic signed [ZW-1:0] z_t;

  // atan(2^-i) in units of 2^-14 turns
  function automatic z_t atan_tab(int unsigned i);
    case (i)
      0:  return z_t'(2048);
      1:  return z_t'(1209);
      2:  return z_t'(639);
      3:  return z_t'(324);
      4:  return z_t'(163);
      5:  return z_t'(81);
      6:  return z_t'(41);
      7:  return z_t'(20);
      8:  return z_t'(10);
      9:  return z_t'(5);
      10: return z_t'(3);
      default: return z_t'(1);
    endcase
  endfunction

  xy_t x [STAGES+1];
  xy_t y [STAGES+1];
  z_t  z [STAGES+1];
  logic [STAGES:0] v;

  // ---- stage 0: range extension --------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      if (in_valid) begin
        if (i_in < 0) begin
          if (q_in >= 0) begin           // second quadrant: turn by -90 deg
            x[0] <= xy_t'(q_in) <<< FX;
            y[0] <= -(xy_t'(i_in) <<< FX);
            z[0] <= z_t'(1 <<< (ZW-2));  // +90 deg
          end else begin                 // third quadrant: turn by +90 deg
            x[0] <= -(xy_t'(q_in) <<< FX);
            y[0] <= xy_t'(i_in) <<< FX;
            z[0] <= -z_t'(1 <<< (ZW-2)); // -90 deg
          end
        end else begin
          x[0] <= xy_t'(i_in) <<< FX;
          y[0] <= xy_t'(q_in) <<< FX;
          z[0] <= '0;
        end
      end
    end
  end

  // ---- stages 1..STAGES: micro-rotations driving y towards 0 --------------
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[s+1] <= '0; y[s+1] <= '0; z[s+1] <= '0; v[s+1] <= 1'b0;
      end else begin
        v[s+1] <= v[s];
        if (v[s]) begin
          if (y[s] >= 0) begin
            x[s+1] <= x[s] + (y[s] >>> s);
            y[s+1] <= y[s] - (x[s] >>> s);
            z[s+1] <= z[s] + atan_tab(s);
          end else begin
            x[s+1] <= x[s] - (y[s] >>> s);
            y[s+1] <= y[s] + (x[s] >>> s);
            z[s+1] <= z[s] - atan_tab(s);
          end
        end
      end
    end
  end : g_stage

  // ---- output: round the angle to PHASE_W bits (wraps at +-pi) ------------
  z_t z_rnd;
  always_comb z_rnd = z[STAGES] + z_t'(1 <<< (GUARD-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phase     <= '0;
      mag       <= '0;
    end else begin
      out_valid <= v[STAGES];
      if (v[STAGES]) begin
        phase <= z_rnd[ZW-1:GUARD];
        mag   <= x[STAGES][XW-1] ? '0 : x[STAGES][XW-1:FX];
      end
    end
  end

endmodule
