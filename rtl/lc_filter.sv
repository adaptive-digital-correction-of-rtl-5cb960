// lc_filter: adaptive correction filter L_C(z) with its coefficient counters.
//
// L_C(z) = l0 + l1 z^-1 + ... + l(M-1) z^-(M-1) filters the differentiated
// second-stage error v_de and produces the correction term v_L, which is
// added to the MASH output to cancel the first-stage noise that leaks
// through the mismatched analog noise transfer function. The document's
// improved example uses M = 6 taps (l0..l5) and N_l = 16-bit coefficients.
//
// Each coefficient is an up/down counter: when the correlator signals the
// end of an adaptation block (upd_valid), l_k <= l_k - GAMMA * upd_dir[k],
// upd_dir[k] being the sign of the block correlation for tap k. GAMMA is one
// coefficient LSB, as in the document. Saturation at +/-(2^(NL-1)-1) and the
// reset value 0 are this design's choices.
//
// Formats: x is an integer in second-stage LSBs; coefficients are signed
// fractions with NL-1 fraction bits; v_L carries VL_FRAC fraction bits below
// the second-stage LSB (the products are truncated toward minus infinity
// beyond that). The tap delay line is a register chain, tap 0 being the
// current input, so v_L is combinational from x. The coefficient outputs are
// the registered counters.
module lc_filter
  import mash_corr_pkg::*;
#(
  parameter int unsigned X_W     = 14,
  parameter int unsigned M       = 6,
  parameter int unsigned NL      = 16,
  parameter int unsigned GAMMA   = 1,
  parameter int unsigned VL_FRAC = 8,
  parameter int unsigned VL_W    = X_W + NL + $clog2(M) - (NL - 1 - VL_FRAC)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [X_W-1:0]  x,
  input  logic                   upd_valid,
  input  dir_t                   upd_dir [M],
  output logic signed [VL_W-1:0] vl,
  output logic signed [NL-1:0]   coeff [M]
);

  localparam int unsigned SUM_W = X_W + NL + $clog2(M);
  localparam int unsigned SHIFT = NL - 1 - VL_FRAC;
  localparam logic signed [NL:0] LMAX = (NL+1)'((1 << (NL - 1)) - 1);

  logic signed [X_W-1:0] taps [M];
  logic signed [NL-1:0]  l    [M];
  logic signed [SUM_W-1:0] acc;

  // Tap delay line: taps[0] is the present input.
  always_comb taps[0] = x;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < int'(M); k++) taps[k] <= '0;
    end else begin
      for (int k = 1; k < int'(M); k++) taps[k] <= taps[k-1];
    end
  end

  // Sign-sign coefficient update: up/down counting by GAMMA LSB.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(M); k++) l[k] <= '0;
    end else if (upd_valid) begin
      for (int k = 0; k < int'(M); k++) begin
        logic signed [NL:0] nxt;
        nxt = (NL+1)'(l[k]) - (NL+1)'(GAMMA) * (NL+1)'(upd_dir[k]);
        if (nxt > LMAX)       l[k] <= NL'(LMAX);
        else if (nxt < -LMAX) l[k] <= NL'(-LMAX);
        else                  l[k] <= NL'(nxt);
      end
    end
  end

  // FIR sum.
  always_comb begin
    acc = '0;
    for (int k = 0; k < int'(M); k++)
      acc += SUM_W'(taps[k]) * SUM_W'(l[k]);
    vl = VL_W'(acc >>> SHIFT);
  end

  assign coeff = l;

  initial assert (VL_FRAC < NL) else $error("lc_filter: VL_FRAC must be below NL");

endmodule
