// mash_adaptive_correction: digital noise-cancellation logic of an adaptive
// 2-0 MASH ADC with on-line correction by test-signal injection.
//
// A 2-0 MASH converter (second-order delta-sigma first stage with a 1.5-bit
// quantizer, 10-bit pipelined second stage) cancels the first-stage
// quantization noise digitally. Finite op-amp gain and capacitor mismatch
// make the analog noise transfer function differ from the digital one, so
// part of that noise leaks to the output. This block removes the leak on
// line: it emits a pseudorandom two-level test signal (ts_out) that the
// analog side adds in front of the first-stage quantizer, finds the test
// signal's residue in the output by correlation, and adapts a six-tap FIR
// L_C(z) that adds a correction v_L to the output.
//
// Data path (every word an integer in second-stage LSBs, full scale +/-1):
//   v1d = z^-N2 v1                        (STF_2d, aligns v1 with v2)
//   v_e = m2*v2 + m1*v1d                  (m2 = 2, m1 = 1)
//   v_de = (1 - z^-1) v_e,  v_C = (1 - z^-1) v_de    (NTF_1d)
//   v_L = L_C(z) v_de
//   v_m = v1d + v_C + v_L                 (registered, VM_FRAC fraction bits)
// The correlator compares v_m with the test-signal replica as it appears
// in v_e. Since v_e ~ -(e1 + ts), that replica is -ts, delayed by the
// analog and pipeline latency: REF_DLY = N2 + TS_LAT clocks.
//
// Interface timing: ts_out changes on every clock. TS_LAT counts the clock
// edges from a change of ts_out to the edge on which v1_in carrying that
// test-signal sample is sampled (2 for a quantizer that samples ts_out and
// registers its decision on the following edge); it must match the analog
// interface exactly, since a replica one sample early or late makes the
// adaptation diverge. v2_in must carry the
// second-stage conversion of the same sample exactly N2 clocks after v1_in.
// vm_out is valid one clock after the v2_in it depends on. The coefficients
// change once every K = 2^LOG2K samples, one clock after upd_valid_out.
//
// From the document: structure, m1, m2, N2, six taps, 16-bit coefficients,
// gamma = 1 LSB, K = 2^16, the sign-sign block update and feeding L_C(z) with
// v_de. This design's choices: the integer number format, VM_FRAC, the LFSR
// behind ts, the latency alignment parameters and the reset values.
module mash_adaptive_correction
  import mash_corr_pkg::*;
#(
  parameter int unsigned N2       = N2_DEF,
  parameter int unsigned M        = M_DEF,
  parameter int unsigned NL       = NL_DEF,
  parameter int unsigned LOG2K    = LOG2K_DEF,
  parameter int unsigned M2_SHIFT = M2_SHIFT_DEF,
  parameter int          M1       = 1,
  parameter int unsigned VM_FRAC  = VM_FRAC_DEF,
  parameter int unsigned TS_LAT   = 2,
  parameter int unsigned LFSR_W   = 23,
  parameter int unsigned LFSR_TAP = 18,
  parameter logic [LFSR_W-1:0] LFSR_SEED = LFSR_W'(1),
  localparam int unsigned VE_W = N2 + M2_SHIFT + 2,
  localparam int unsigned VM_W = VE_W + 5 + VM_FRAC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Test signal to the analog injection node (1 = +A, 0 = -A).
  output logic                   ts_out,
  // First-stage quantizer output (-1, 0, +1) and second-stage ADC code.
  input  trilevel_t              v1_in,
  input  logic signed [N2-1:0]   v2_in,
  // Corrected converter output, VM_FRAC bits below the second-stage LSB.
  output logic signed [VM_W-1:0] vm_out,
  // Adaptive filter coefficients l0..l(M-1), NL-1 fraction bits.
  output logic signed [NL-1:0]   coeff_out [M],
  output logic                   upd_valid_out
);

  localparam int unsigned REF_DLY = N2 + TS_LAT;
  localparam int unsigned VL_W    = VE_W + 1 + NL + $clog2(M) - (NL - 1 - VM_FRAC);

  trilevel_t               v1d;
  logic signed [VE_W-1:0]  ve;
  logic signed [VE_W:0]    vde;
  logic signed [VE_W+1:0]  vc;
  logic signed [VL_W-1:0]  vl;
  logic signed [VM_W-1:0]  vm_next;
  logic [REF_DLY-1:0]      ts_hist;
  logic                    upd_valid;
  dir_t                    upd_dir [M];

  ts_gen #(.W(LFSR_W), .TAP(LFSR_TAP), .SEED(LFSR_SEED)) u_ts_gen (
    .clk, .rst_n, .en(1'b1), .ts_bit(ts_out)
  );

  stf2d_delay #(.N2(N2), .W(2)) u_stf2d (
    .clk, .rst_n, .v_in(v1_in), .v_out(v1d)
  );

  ve_combiner #(.N2(N2), .M2_SHIFT(M2_SHIFT), .M1(M1), .VE_W(VE_W)) u_ve (
    .v1(v1d), .v2(v2_in), .ve
  );

  ntf1d #(.VE_W(VE_W)) u_ntf1d (
    .clk, .rst_n, .ve, .vde, .vc
  );

  lc_filter #(.X_W(VE_W + 1), .M(M), .NL(NL), .GAMMA(1), .VL_FRAC(VM_FRAC),
              .VL_W(VL_W)) u_lc (
    .clk, .rst_n, .x(vde), .upd_valid, .upd_dir, .vl, .coeff(coeff_out)
  );

  // Output adder: STF_2d path + NTF_1d path + correction.
  always_comb begin
    vm_next = ((VM_W'(v1d) <<< (N2 - 1)) + VM_W'(vc)) <<< VM_FRAC;
    vm_next = vm_next + VM_W'(vl);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vm_out <= '0;
    else        vm_out <= vm_next;
  end

  // Test-signal history for the correlator reference.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ts_hist <= '0;
    else        ts_hist <= {ts_hist[REF_DLY-2:0], ts_out};
  end

  ssblms_correlator #(.VM_W(VM_W), .M(M), .LOG2K(LOG2K)) u_corr (
    .clk, .rst_n, .ref_bit(~ts_hist[REF_DLY-1]), .vm(vm_out), .upd_valid, .upd_dir
  );

  assign upd_valid_out = upd_valid;

endmodule
