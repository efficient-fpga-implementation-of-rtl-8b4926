// cpfsk_demod: binary CP-FSK baseband demodulator with all-digital timing and
// carrier recovery.
//
// Data path (one sample per in_valid, SPS = 4 samples per symbol, any clock
// rate at or above the sample rate):
//   I/Q in -> input register -> two cubic Farrow interpolators (fractional
//   delay mu) -> vectoring CORDIC (phase) -> frequency detector (carrier
//   phase removed, phase difference, unwrap, time scaling) -> zero-threshold
//   bit decision on the strobed sample.
// Timing recovery loop (non-data-aided, feedback): the Gardner detector looks
// at the demodulated frequency at the sample rate and keeps the error of the
// strobed sample; a PI filter turns it into the step adjustment of the
// interpolation-control NCO, which produces the base-point strobe and mu.
// Carrier recovery loop (frequency-locked): a CIC moving average of the
// demodulated frequency over 256 symbols estimates the residual offset; a PI
// filter sets the increment of the carrier NCO, whose phase is subtracted
// from the CORDIC phase.
// This structure follows the published design. The loop gains, the widths
// beyond those of the ADC and the CORDIC, the placement of the loop taps and
// the pipeline alignment are this design's own; the timing loop has unit damping and
// a noise bandwidth near 1 % of the symbol rate (twice the published 0.5 %,
// which in this fixed-point loop does not pull in a 1 % clock error from a
// cold start), and the carrier loop settles in a few hundred symbols.
//
// Timing: the strobe for a sample is computed by the NCO in the cycle the
// sample arrives and travels with it through the pipeline, so the decision
// is made on the interpolated sample that the strobe marks. From an input
// sample to its frequency word takes 1 + LAT_INTERP + LAT_CORDIC + LAT_FD =
// 15 clock cycles; bit_valid pulses one cycle after that, once per symbol.
// The outputs other than the bits (interpolated I, mu, frequency, loop
// signals) are brought out for observation.
module cpfsk_demod
  import cpfsk_pkg::*;
#(
  // timing loop filter: v = (TKP*e + sum TKI*e) / 2**TSHIFT
  parameter int          TKP    = 2080,
  parameter int          TKI    = 16,
  parameter int unsigned TSHIFT = 14,
  // carrier loop filter: inc = CKP*avg + sum CKI*avg (2**-24 turn per sample)
  parameter int          CKP    = 512,
  parameter int          CKI    = 16,
  // moving average: window CIC_R * CIC_M samples
  parameter int unsigned CIC_R  = 16,
  parameter int unsigned CIC_M  = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [ADC_W-1:0]  i_in,
  input  logic signed [ADC_W-1:0]  q_in,
  output logic                     bit_valid,   // one pulse per decided bit
  output logic                     bit_out,     // decided bit
  output logic                     bit_clk,     // symbol-rate clock for the bits
  output logic                     smp_valid,   // observation outputs below
  output logic signed [SMP_W-1:0]  i_interp,    // interpolated I
  output logic signed [FREQ_W-1:0] freq,        // demodulated frequency
  output logic        [SMP_W+1:0]  magnitude,   // CORDIC magnitude (gain 1.646)
  output logic                     sym_strobe,  // strobe aligned with freq
  output logic        [MU_W-1:0]   mu,          // fractional delay
  output logic signed [15:0]       ted_err,     // decimated Gardner error
  output logic signed [23:0]       carrier_inc  // carrier NCO frequency word
);

  localparam int unsigned LAT_TAG = LAT_INTERP + LAT_CORDIC + LAT_FD;

  // ---- input register, aligned with the NCO outputs ---------------------
  logic                    s_valid;
  logic signed [ADC_W-1:0] s_i, s_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_i     <= '0;
      s_q     <= '0;
    end else begin
      s_valid <= in_valid;
      if (in_valid) begin
        s_i <= i_in;
        s_q <= q_in;
      end
    end
  end

  // ---- interpolation control ---------------------------------------------
  logic signed [15:0] t_v;
  logic               nco_valid, nco_strobe, nco_dup, nco_gap;
  logic [MU_W-1:0]    nco_mu;

  timing_nco #(.ACC_W(16), .MU_W(MU_W), .V_W(16), .SPS_LOG2(SPS_LOG2)) u_tnco (
    .clk, .rst_n, .in_valid(in_valid), .v(t_v),
    .out_valid(nco_valid), .strobe(nco_strobe),
    .dup(nco_dup), .gap(nco_gap), .mu(nco_mu)
  );

  // ---- interpolators ------------------------------------------------------
  logic                    ip_valid;
  logic signed [SMP_W-1:0] ip_i, ip_q;

  farrow_interp #(.IN_W(ADC_W), .OUT_W(SMP_W), .MU_W(MU_W)) u_interp_i (
    .clk, .rst_n, .in_valid(s_valid), .x_in(s_i), .mu(nco_mu),
    .out_valid(ip_valid), .y_out(ip_i)
  );
  farrow_interp #(.IN_W(ADC_W), .OUT_W(SMP_W), .MU_W(MU_W)) u_interp_q (
    .clk, .rst_n, .in_valid(s_valid), .x_in(s_q), .mu(nco_mu),
    .out_valid(), .y_out(ip_q)
  );

  // ---- strobe tags, delayed to meet their sample -------------------------
  // The strobe and the dup/gap flags travel with the sample they mark; dup and gap
  // are needed at the frequency detector input, the strobe at its output.
  typedef struct packed {
    logic strobe;
    logic dup;
    logic gap;
  } tag_t;
  localparam int unsigned LAT_PD = LAT_INTERP + LAT_CORDIC;
  tag_t tag [LAT_TAG];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT_TAG; i++) tag[i] <= '0;
    end else begin
      tag[0] <= '{strobe:    nco_valid && nco_strobe,
                  dup:  nco_valid && nco_dup,
                  gap:  nco_valid && nco_gap};
      for (int i = 1; i < LAT_TAG; i++) tag[i] <= tag[i-1];
    end
  end

  // ---- phase detector -----------------------------------------------------
  logic                      pd_valid;
  logic signed [PHASE_W-1:0] pd_phase;
  logic        [SMP_W+1:0]   pd_mag;

  cordic_vectoring #(.IN_W(SMP_W), .PHASE_W(PHASE_W), .STAGES(CORDIC_N)) u_cordic (
    .clk, .rst_n, .in_valid(ip_valid), .i_in(ip_i), .q_in(ip_q),
    .out_valid(pd_valid), .phase(pd_phase), .mag(pd_mag)
  );

  // ---- carrier NCO and frequency detector ----------------------------------
  logic signed [PHASE_W-1:0] c_phase;
  logic signed [23:0]        c_inc;
  logic                      fd_valid;
  logic signed [FREQ_W-1:0]  fd_freq;

  carrier_nco #(.ACC_W(24), .INC_W(24), .PHASE_W(PHASE_W)) u_cnco (
    .clk, .rst_n, .in_valid(pd_valid), .inc(c_inc), .phase(c_phase)
  );

  freq_detector #(.PHASE_W(PHASE_W), .SPS_LOG2(SPS_LOG2)) u_fd (
    .clk, .rst_n, .in_valid(pd_valid), .phase(pd_phase), .phase_corr(c_phase),
    .dup(tag[LAT_PD-1].dup), .gap(tag[LAT_PD-1].gap),
    .out_valid(fd_valid), .freq(fd_freq)
  );

  logic fd_strobe, fd_dup, fd_gap;
  always_comb begin
    fd_strobe = tag[LAT_TAG-1].strobe;
    fd_dup   = tag[LAT_TAG-1].dup;
    fd_gap  = tag[LAT_TAG-1].gap;
  end

  // ---- bit decision ---------------------------------------------------------
  bit_decision #(.IN_W(FREQ_W), .HALF(SPS/2)) u_dec (
    .clk, .rst_n, .in_valid(fd_valid), .freq(fd_freq), .strobe(fd_strobe),
    .bit_valid, .bit_out, .bit_clk
  );

  // ---- timing recovery loop -------------------------------------------------
  logic               ted_valid;
  logic signed [15:0] ted_e;

  gardner_ted #(.IN_W(FREQ_W), .OUT_W(16), .SPS_LOG2(SPS_LOG2), .SHIFT(10)) u_ted (
    .clk, .rst_n, .in_valid(fd_valid), .y(fd_freq), .strobe(fd_strobe),
    .dup(fd_dup), .gap(fd_gap),
    .out_valid(ted_valid), .err(ted_e)
  );

  pi_loop_filter #(.IN_W(16), .OUT_W(16), .ACC_W(32),
                   .KP(TKP), .KI(TKI), .SHIFT(TSHIFT)) u_tlf (
    .clk, .rst_n, .in_valid(ted_valid), .err(ted_e),
    .out_valid(), .v(t_v)
  );

  // ---- carrier recovery loop -------------------------------------------------
  logic                     ma_valid;
  logic signed [FREQ_W-1:0] ma_avg;

  cic_moving_avg #(.IN_W(FREQ_W), .R(CIC_R), .M(CIC_M)) u_ma (
    .clk, .rst_n, .in_valid(fd_valid), .x(fd_freq),
    .out_valid(ma_valid), .avg(ma_avg)
  );

  pi_loop_filter #(.IN_W(FREQ_W), .OUT_W(24), .ACC_W(32),
                   .KP(CKP), .KI(CKI), .SHIFT(0)) u_clf (
    .clk, .rst_n, .in_valid(ma_valid), .err(ma_avg),
    .out_valid(), .v(c_inc)
  );

  // ---- observation outputs ----------------------------------------------------
  always_comb begin
    smp_valid   = fd_valid;
    i_interp    = ip_i;
    freq        = fd_freq;
    magnitude   = pd_mag;
    sym_strobe  = fd_valid && fd_strobe;
    mu          = nco_mu;
    ted_err     = ted_e;
    carrier_inc = c_inc;
  end

endmodule
