// cpfsk_pkg: word widths, rates and pipeline latencies shared by the blocks of
// the binary CP-FSK baseband demodulator.
//
// Conventions used throughout:
//  * Phases are two's complement fractions of a full turn: a PHASE_W-bit word
//    spans [-pi, pi), so wrapping the word is the same as unwrapping modulo 2*pi.
//  * Frequencies leave the frequency detector in units of the symbol rate:
//    a value F means f*T = F / 2**PHASE_W.
//  * The datapath is a free-running pipeline; `valid` marks the clock cycles
//    that carry a new sample, so the sample rate may be any fraction of the
//    clock rate.
// ADC width (10 bits), CORDIC precision (11 bits, 5 stages) and the sample
// rate of four samples per symbol follow the published design; every other
// width here is this design's own choice.
package cpfsk_pkg;

  localparam int unsigned ADC_W      = 10;  // I/Q sample width from the ADC
  localparam int unsigned SMP_W      = 11;  // interpolated sample width = CORDIC precision
  localparam int unsigned PHASE_W    = 11;  // CORDIC phase output width
  localparam int unsigned CORDIC_N   = 5;   // CORDIC micro-rotation stages
  localparam int unsigned SPS        = 4;   // samples per symbol (N)
  localparam int unsigned SPS_LOG2   = 2;
  localparam int unsigned FREQ_W     = PHASE_W + SPS_LOG2;  // frequency detector output
  localparam int unsigned MU_W       = 10;  // fractional delay width

  // Clock-cycle latencies of the free-running pipelines.
  localparam int unsigned LAT_INTERP = 5;
  localparam int unsigned LAT_CORDIC = CORDIC_N + 2;
  localparam int unsigned LAT_FD     = 2;

endpackage
