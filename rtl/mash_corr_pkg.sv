// mash_corr_pkg: constants and small helpers shared by the digital
// correction logic of the adaptive 2-0 MASH ADC.
//
// The defaults follow the improved 2-0 MASH example (1.5-bit first stage,
// 10-bit pipelined second stage, six-tap adaptive filter with 16-bit
// coefficients, adaptation block of 2^16 samples). The test-signal LFSR size
// and the number of extra fraction bits kept on the output are this design's
// own choices.
package mash_corr_pkg;

  // Second-stage (pipelined ADC) resolution N2, also its latency in samples.
  localparam int unsigned N2_DEF      = 10;
  // Number of taps M of the adaptive filter L_C(z) (l0..l5).
  localparam int unsigned M_DEF       = 6;
  // Coefficient word length N_l; coefficients are fractions with N_l-1
  // fraction bits, so one step (gamma = 1 LSB) is 2^-(N_l-1).
  localparam int unsigned NL_DEF      = 16;
  // log2 of the adaptation block size K.
  localparam int unsigned LOG2K_DEF   = 16;
  // Digital gain m2 = 2^M2_SHIFT applied to the second-stage output.
  localparam int unsigned M2_SHIFT_DEF = 1;
  // Fraction bits kept below the second-stage LSB on v_L and v_m.
  localparam int unsigned VM_FRAC_DEF = 8;

  // Update direction produced by the correlator for one coefficient:
  // +1, 0 or -1 (sign of the block correlation).
  typedef logic signed [1:0] dir_t;

  // Tri-level output of the first-stage 1.5-bit quantizer: -1, 0 or +1.
  typedef logic signed [1:0] trilevel_t;

endpackage
