// ts_gen: pseudorandom two-level test-signal generator.
//
// The correction scheme injects a zero-mean, two-level, white pseudorandom
// sequence ts in front of the first-stage quantizer and looks for it again
// in the converter output. This block produces that sequence as one bit per
// sample: ts_bit = 1 stands for +A and ts_bit = 0 for -A, A being the analog
// injection amplitude, which is set outside this block.
//
// The sequence comes from a Fibonacci linear-feedback shift register with
// the feedback polynomial x^W + x^TAP + 1 (default x^23 + x^18 + 1, a maximal
// length polynomial, period 2^23 - 1). The register shifts toward its MSB;
// the new bit is state[W-1] ^ state[TAP-1] and the output is state[W-1], so
// the output sequence obeys ts[n] = ts[n-W] ^ ts[n-TAP].
//
// The document asks only for a deterministic pseudorandom two-level
// zero-mean white sequence; the LFSR, its length and seed are this design's
// choice. The output is registered and advances on every clock while en is
// high; reset loads SEED.
module ts_gen #(
  parameter int unsigned W    = 23,
  parameter int unsigned TAP  = 18,
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic ts_bit
);

  logic [W-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= SEED;
    else if (en) state <= {state[W-2:0], state[W-1] ^ state[TAP-1]};
  end

  assign ts_bit = state[W-1];

  initial assert (SEED != '0) else $error("ts_gen: SEED must be non-zero");

endmodule
