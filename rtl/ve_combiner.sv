// ve_combiner: forms the second-stage error estimate v_e = m2*v2 + m1*v1.
//
// In the 2-0 MASH the second stage converts a scaled copy of the first-stage
// quantization error; adding its scaled digital output v2 to the first-stage
// output v1 recovers v_e ~ -e1 (plus the amplified second-stage error). The
// document's improved example uses m2 = 2 and m1 = 1.
//
// Number format: all words are integers in units of the second-stage LSB,
// the second-stage full scale being +/-1. A tri-level v1 of +/-1 full scale
// is therefore v1 * 2^(N2-1) in these units. m2 is a power of two,
// 2^M2_SHIFT, and m1 is a small integer M1; both are exact. The block is
// combinational; both inputs must belong to the same sample (v1 already
// delayed by N2).
module ve_combiner #(
  parameter int unsigned N2       = 10,
  parameter int unsigned M2_SHIFT = 1,
  parameter int          M1       = 1,
  parameter int unsigned VE_W     = N2 + M2_SHIFT + 2
) (
  input  logic signed [1:0]      v1,
  input  logic signed [N2-1:0]   v2,
  output logic signed [VE_W-1:0] ve
);

  always_comb begin
    ve = (VE_W'(v2) <<< M2_SHIFT) + VE_W'(M1) * (VE_W'(v1) <<< (N2 - 1));
  end

endmodule
